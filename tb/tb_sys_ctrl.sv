// tb_sys_ctrl: system controller against a queue model of the selected
// FIFO. Checks START (FIFO clear, run enable for exactly PULSES windows),
// TEST (test_mode), STOP during an acquisition, and READ: every FIFO word
// comes out as four 16-bit words, most significant first, under random
// back-pressure, and the controller goes idle when the FIFO is empty.
module tb_sys_ctrl;
  import hf_radar_pkg::*;
  localparam int PULSES = 8;
  logic        clk = 0, rst = 1;
  logic        sys_valid = 0;
  sys_op_t     sys_op = OP_STOP;
  logic [5:0]  sys_fifo = 0;
  logic        window_done = 0, run_en, test_mode, fifo_clear, fifo_rd_en;
  logic [1:0]  rd_bank;
  logic [3:0]  rd_fifo;
  logic [63:0] fifo_rd_data;
  logic        fifo_rd_valid = 0, fifo_rd_empty;
  logic [15:0] in_data;
  logic        in_valid, in_ready = 0, busy;
  logic [3:0]  pulse_cnt;
  int checks = 0, failures = 0;
  logic [63:0] fq [$];
  logic [15:0] words [$];

  sys_ctrl #(.PULSES(PULSES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model: one-clock read latency
  assign fifo_rd_empty = (fq.size() == 0);
  always @(posedge clk) begin
    fifo_rd_valid <= 1'b0;
    if (fifo_rd_en && fq.size() > 0) begin
      fifo_rd_data  <= fq.pop_front();
      fifo_rd_valid <= 1'b1;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%t FAIL %s", $time, what); end
  endtask

  task automatic command(input sys_op_t op, input logic [5:0] f);
    sys_op = op; sys_fifo = f; sys_valid = 1;
    @(posedge clk); #1 sys_valid = 0;
  endtask

  task automatic windows(input int n);
    repeat (n) begin
      repeat (5) @(posedge clk);
      #1 window_done = 1; @(posedge clk); #1 window_done = 0;
    end
  endtask

  initial begin
    int n_words;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // START: clear pulse, then run for PULSES windows
    command(OP_START, 0);
    check(fifo_clear && run_en && !test_mode, "start");
    @(posedge clk); #1 check(!fifo_clear, "clear is one pulse");
    windows(PULSES - 1);
    check(run_en && pulse_cnt == 4'(PULSES - 1), "still running");
    windows(1);
    check(!run_en && !busy, "stopped after PULSES windows");
    // TEST then STOP
    command(OP_TEST, 0);
    check(run_en && test_mode, "test mode");
    windows(2);
    command(OP_STOP, 0);
    check(!run_en && !test_mode, "stop");
    // READ FIFO 0x2B: bank 2, FIFO 11
    for (int k = 0; k < 20; k++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      fq.push_back(w);
      for (int j = 3; j >= 0; j--) words.push_back(w[16*j +: 16]);
    end
    n_words = words.size();
    command(OP_READ, 6'h2B);
    check(rd_bank == 2'd2 && rd_fifo == 4'd11, "select lines");
    for (int t = 0; t < 2000 && busy; t++) begin
      in_ready = $urandom_range(0, 1);
      #1;
      if (in_valid && in_ready) begin
        checks++;
        if (words.size() == 0 || in_data != words.pop_front()) begin
          failures++; $display("word %0d wrong", t);
        end
      end
      @(posedge clk); #1;
    end
    check(!busy && words.size() == 0 && n_words == 80, "all words sent, idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
