// tb_fifo_bank: the 64 x 1024 x 64-bit FIFO bank against 64 reference
// queues. Random writes and reads on random FIFOs (bank and FIFO select
// lines) with data, empty flag and word count checked; one FIFO is filled
// past 1024 words to check full, the dropped writes and the overflow flag;
// clear empties everything.
module tb_fifo_bank;
  logic        clk = 0, rst = 1, clear = 0;
  logic        wr_en = 0, rd_en = 0;
  logic [5:0]  wr_sel = 0;
  logic [63:0] wr_data = 0, rd_data;
  logic [1:0]  rd_bank = 0;
  logic [3:0]  rd_fifo = 0;
  logic        rd_valid, rd_empty;
  logic [10:0] rd_count;
  logic [63:0] full, overflow;
  int checks = 0, failures = 0, reads = 0;
  logic [63:0] q [64][$];
  logic [63:0] exp_rd;
  logic        exp_rv;

  fifo_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%t FAIL %s", $time, what);
    end
  endtask

  // one clock: apply inputs, check the flags before the edge, update model
  task automatic cycle();
    int s;
    s = {rd_bank, rd_fifo};
    #1;
    check(rd_count == 11'(q[s].size()), "count");
    check(rd_empty == (q[s].size() == 0), "empty");
    for (int n = 0; n < 64; n += 9) check(full[n] == (q[n].size() == 1024), "full");
    @(posedge clk);
    exp_rv = 0;
    if (rd_en && q[s].size() > 0) begin exp_rd = q[s].pop_front(); exp_rv = 1; end
    if (wr_en && q[wr_sel].size() < 1024) q[wr_sel].push_back(wr_data);
    #1;
    check(rd_valid == exp_rv, "rd_valid");
    if (exp_rv) begin check(rd_data == exp_rd, "rd_data"); reads++; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // random traffic
    for (int t = 0; t < 20000; t++) begin
      wr_en   = $urandom_range(0, 1);
      wr_sel  = 6'($urandom_range(0, 7));
      wr_data = {$urandom, $urandom};
      rd_en   = $urandom_range(0, 2) == 0;
      {rd_bank, rd_fifo} = 6'($urandom_range(0, 7));
      cycle();
    end
    // fill gate 37 (bank 2, FIFO 5) past full
    rd_en = 0; wr_en = 1; wr_sel = 6'd37;
    {rd_bank, rd_fifo} = 6'd37;
    check(overflow == '0, "no overflow yet");
    for (int t = 0; t < 1030; t++) begin wr_data = 64'(t); cycle(); end
    check(full[37] && rd_count == 11'd1024, "gate 37 full");
    check(overflow == 64'd1 << 37, "overflow flag");
    // drain it through the select lines
    wr_en = 0; rd_en = 1;
    for (int t = 0; t < 1030; t++) cycle();
    check(rd_empty, "drained");
    // clear
    wr_en = 1; rd_en = 0; wr_sel = 6'd63;
    repeat (5) cycle();
    wr_en = 0; clear = 1; @(posedge clk); #1 clear = 0;
    for (int n = 0; n < 64; n++) q[n].delete();
    {rd_bank, rd_fifo} = 6'd63;
    cycle();
    check(rd_empty && overflow == '0, "clear");
    check(reads > 3000, "enough reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
