// tb_usb_core: USB peripheral controller against the behavioural USB chip
// model. Checks the configuration message, a control setup on EP0 (setup
// packet delivered after the ACK), OUT transfers on EP1 (every word comes
// out as a command, in order), IN transfers on EP2 (words of a test stream
// written to the chip in order, zero-padded when the stream runs dry),
// that each state of the state machine is visited, and the HPI timing of one
// access (STROBE + 1 clocks).
module tb_usb_core;
  import hf_radar_pkg::*;
  logic        clk = 0, rst = 1;
  logic [1:0]  hpi_a;
  logic        hpi_cs_n, hpi_rd_n, hpi_wr_n, hpi_d_oe, hpi_int;
  logic [15:0] hpi_d_o, hpi_d_i;
  logic        cmd_valid, setup_valid, configured;
  logic [15:0] cmd, in_data;
  logic [63:0] setup_pkt;
  logic        in_valid, in_ready;
  logic [3:0]  state_o;
  logic [7:0]  bad_msgs;
  int checks = 0, failures = 0;
  int visited [11];
  logic [15:0] got_cmds [$];
  int in_left = 0;
  logic [15:0] in_next = 16'h1000;

  usb_core dut (.*);
  cy7c67300_model chip (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lengths of chip-select pulses and gaps between them
  int cs_len = 0, gap_len = 0, cs_min = 99, cs_max = 0, gap_min = 99;
  always @(posedge clk) if (!rst) begin
    if (!hpi_cs_n) begin
      cs_len++;
      if (gap_len > 0 && gap_len < gap_min) gap_min = gap_len;
      gap_len = 0;
    end else begin
      if (cs_len > 0) begin
        if (cs_len < cs_min) cs_min = cs_len;
        if (cs_len > cs_max) cs_max = cs_len;
      end
      cs_len = 0;
      gap_len++;
    end
  end

  always @(posedge clk) begin
    visited[state_o]++;
    if (cmd_valid) got_cmds.push_back(cmd);
    if (in_valid && in_ready) begin in_next <= in_next + 1'b1; in_left <= in_left - 1; end
  end
  assign in_valid = in_left > 0;
  assign in_data  = in_next;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%t FAIL %s", $time, what); end
  endtask

  initial begin
    logic [15:0] out_w [$];
    logic [15:0] in_w [$];
    int t1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chip.wait_configured();
    @(posedge clk);
    check(configured, "configured");
    chip.host_setup(64'h8006_0100_0000_0040);
    // setup packet
    fork
      begin : wait_setup
        while (!setup_valid) @(posedge clk);
      end
    join
    check(setup_pkt == 64'h8006_0100_0000_0040, "setup packet");
    // OUT transfers
    for (int r = 0; r < 5; r++) begin
      out_w.delete();
      for (int k = 0; k < 1 + r * 3; k++) out_w.push_back(16'($urandom));
      got_cmds.delete();
      chip.host_out(out_w);
      t1 = 0;
      while (got_cmds.size() < out_w.size() && t1 < 5000) begin t1++; @(posedge clk); end
      check(got_cmds == out_w, "OUT words become commands");
    end
    // IN transfer with enough stream data
    in_left = 12;
    chip.host_in(12, in_w);
    for (int k = 0; k < 12; k++) check(in_w[k] == 16'h1000 + 16'(k), "IN word");
    // IN transfer where the stream has only 3 words: padded with zeros
    in_left = 3;
    chip.host_in(6, in_w);
    for (int k = 0; k < 6; k++)
      check(in_w[k] == ((k < 3) ? 16'h100C + 16'(k) : 16'h0000), "IN padding");
    check(cs_min == 4 && cs_max == 4, "strobe length");
    check(gap_min >= 1, "recovery clock between accesses");
    for (int s = 0; s <= 10; s++) check(visited[s] > 0, $sformatf("state %0d visited", s));
    check(bad_msgs == 0 && chip.protocol_errors == 0, "no protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
