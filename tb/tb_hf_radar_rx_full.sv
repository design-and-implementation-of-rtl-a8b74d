// tb_hf_radar_rx_full: one complete operation of the receiver with every
// parameter at its default (245.76 MHz clock, 18.1 MHz oscillator,
// 64 FIFOs of 1024 x 64 bit, 1024 pulses per acquisition), host played by
// the USB chip model.
//  1. START with the reset settings (20 us pulse, 167 Hz, window at 540 us,
//     64 gates); an 18.1 MHz tone of amplitude 100*(g+1) in range gate g is
//     on the ADC; after the first pulse the host sends STOP;
//  2. the host reads FIFOs 0, 31 and 63 (one word each) and checks
//     sqrt(I^2+Q^2) = 4915*A*131000/2/2^13 within 1 %;
//  3. 100 us pulse, 500 Hz, TEST for two pulses, STOP, and FIFO 42 must
//     hold {0, 42} and {1, 42};
//  4. a 2048-word IN request (half of one gate's 1024 FIFO words) is
//     timed: the link must run well above the radar's 1048576 bit/s.
// The TX widths (4915 and 24576 clocks) and the PRT lengths (1471616 and
// 491520 clocks) are measured on the outputs.
module tb_hf_radar_rx_full;
  import hf_radar_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real FS = 245.76e6, FLO = 18.1e6;

  logic               clk = 0, rst = 1;
  logic signed [13:0] adc_data = 0;
  logic signed [17:0] dac_i, dac_q;
  logic               tr_pulse, tx_pulse, rx_window, beam_en;
  logic [1:0]         beam;
  logic [1:0]         hpi_a;
  logic               hpi_cs_n, hpi_rd_n, hpi_wr_n, hpi_d_oe, hpi_int;
  logic [15:0]        hpi_d_o, hpi_d_i;
  tcsg_state_t        tcsg_state;
  logic [3:0]         usb_state;
  logic               sys_busy;
  logic [63:0]        fifo_overflow;
  int checks = 0, failures = 0;

  hf_radar_rx dut (.*);
  cy7c67300_model chip (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (7000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, what); end
  endtask

  // TX width, PRT length and window closings
  int cyc = 0, open_cyc = 0, tx_len = 0, tr_rise = -1, n_tr = 0, n_win = 0;
  int tx_lens [$], prts [$];
  logic win_q = 0, tx_q = 0, tr_q = 0;
  always @(posedge clk) begin
    int g, off;
    real a;
    #1;
    cyc++;
    if (tx_pulse) tx_len++;
    if (!tx_pulse && tx_q) begin tx_lens.push_back(tx_len); tx_len = 0; end
    if (tr_pulse && !tr_q) begin
      if (tr_rise >= 0) prts.push_back(cyc - tr_rise);
      tr_rise = cyc; n_tr++;
    end
    if (rx_window && !win_q) open_cyc = cyc;
    if (!rx_window && win_q) n_win++;
    win_q = rx_window; tx_q = tx_pulse; tr_q = tr_pulse;
    off = rx_window ? cyc - open_cyc : -1;
    g   = (off + 1) / 4915;
    if (g > 63) g = 63;
    a   = 100.0 * real'(g + 1);
    adc_data = 14'($rtoi($floor(a * $cos(2.0 * PI * FLO / FS * real'(cyc)) + 0.5)));
  end

  function automatic logic [15:0] sys(sys_op_t op, int fifo);
    return {4'h0, 6'(fifo), op, CMD_SYS};
  endfunction

  task automatic send(input logic [15:0] words [$]);
    int a0;
    a0 = chip.n_acks;
    chip.host_out(words);
    while (chip.n_acks == a0 || usb_state != 4'd2 || chip.hpi_int) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  task automatic read_fifo(input int f, input int n, output logic [63:0] w [$]);
    logic [15:0] q [$];
    logic [15:0] c [$];
    c = '{sys(OP_READ, f)};
    send(c);
    chip.host_in(4 * n, q);
    w.delete();
    for (int k = 0; k < n; k++) w.push_back({q[4*k], q[4*k+1], q[4*k+2], q[4*k+3]});
  endtask

  initial begin
    logic [15:0] c [$];
    logic [63:0] w [$];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chip.wait_configured();
    // 1. acquisition with the reset settings, stopped after one pulse
    c = '{sys(OP_START, 0)};
    send(c);
    while (n_win < 1) @(posedge clk);
    c = '{sys(OP_STOP, 0)};
    send(c);
    while (tcsg_state != TS0_INIT) @(posedge clk);
    check(n_tr == 1 && tx_lens.size() == 1 && tx_lens[0] == 4915, "20 us TX pulse");
    // 2. read three range gates
    for (int i = 0; i < 3; i++) begin
      int f;
      real iv, qv, mag, expv;
      f = 31 * i + ((i == 2) ? 1 : 0);
      read_fifo(f, 1, w);
      iv   = real'($signed(w[0][63:32]));
      qv   = real'($signed(w[0][31:0]));
      mag  = $sqrt(iv * iv + qv * qv);
      expv = 4915.0 * 100.0 * real'(f + 1) * 131000.0 / 2.0 / 8192.0;
      check(mag > 0.99 * expv && mag < 1.01 * expv,
            $sformatf("gate %0d |IQ| %f exp %f", f, mag, expv));
    end
    // 3. test acquisition, 100 us at 500 Hz, two pulses
    c = '{{12'd3, CMD_PW}, {12'd3, CMD_PRF}, sys(OP_TEST, 0)};
    send(c);
    while (n_tr < 3) @(posedge clk);
    while (n_win < 3) @(posedge clk);
    c = '{sys(OP_STOP, 0)};
    send(c);
    while (tcsg_state != TS0_INIT) @(posedge clk);
    check(tx_lens.size() == 3 && tx_lens[1] == 24576 && tx_lens[2] == 24576,
          "100 us TX pulses");
    check(prts.size() >= 2 && prts[prts.size() - 1] == 491520, "500 Hz PRT");
    read_fifo(42, 2, w);
    check(w[0] == {32'd0, 32'd42} && w[1] == {32'd1, 32'd42}, "test words of gate 42");
    // 4. readout rate: half a gate's worth of IN words (2048; a request
    //    carries at most 4095) must move far faster than 1048576 bit/s
    begin
      logic [15:0] q [$];
      int c0;
      real rate;
      c0 = cyc;
      chip.host_in(2048, q);
      rate = 2048.0 * 16.0 * FS / real'(cyc - c0);
      $display("IN transfer: %0d clocks for 2048 words, %f Mbit/s", cyc - c0, rate / 1e6);
      check(rate > 1048576.0 * 100.0, "readout rate");
      check(q.size() == 2048 && cyc - c0 < 2048 * 8, "at most 8 clocks per IN word");
    end
    check(fifo_overflow == '0 && chip.protocol_errors == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
