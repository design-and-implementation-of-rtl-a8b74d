// tb_hf_radar_workloads: the receiver at its default parameters running the
// radar's two measurement set-ups, sent over USB as the PC would:
//  E region: 20 us pulse, 250 Hz, 16 range gates, window at 630 us
//            (code 63, next to the 633.49 us used in practice), east beam;
//  F region: 80 us pulse, 100 Hz, 64 range gates, window at 2420 us
//            (code 242, first gate at 363 km), zenith beam.
// Each runs two pulses with an 18.1 MHz tone of amplitude 100*(g+1) in gate
// g on the ADC and is stopped; T/R, TX width, window opening and length,
// PRT and beam are measured on the outputs, and three gates per set-up
// are read back and their I/Q magnitude checked (1 %).
module tb_hf_radar_workloads;
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
    repeat (9000000) @(posedge clk);
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
  int tx_lens [$], prts [$], win_offs [$], win_lens [$];
  int win_len = 0;
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
    if (rx_window && !win_q) begin open_cyc = cyc; win_offs.push_back(cyc - tr_rise); end
    if (rx_window) win_len++;
    if (!rx_window && win_q) begin n_win++; win_lens.push_back(win_len); win_len = 0; end
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

  // one set-up: settings, START, two pulses, STOP, checks, readback
  task automatic setup_run(input int pw, input int prf, input int ws, input int gates,
                           input int bm, input int pw_clk, input int prt, input int f3);
    logic [15:0] c [$];
    logic [63:0] w [$];
    int n0, w0, t0, p0, o0;
    n0 = n_tr; w0 = n_win; t0 = tx_lens.size(); p0 = prts.size(); o0 = win_offs.size();
    c = '{{12'(pw), CMD_PW}, {12'(prf), CMD_PRF}, {12'(ws), CMD_WS},
          {12'(gates), CMD_GATES}, {12'(bm), CMD_BEAM}, sys(OP_START, 0)};
    send(c);
    while (!beam_en) @(posedge clk);
    #1 check(beam == 2'(bm), "beam");
    while (n_win < w0 + 2) @(posedge clk);
    c = '{sys(OP_STOP, 0)};
    send(c);
    while (tcsg_state != TS0_INIT) @(posedge clk);
    check(n_tr == n0 + 2, "two pulses");
    check(tx_lens[t0] == pw_clk && tx_lens[t0 + 1] == pw_clk, $sformatf("TX %0d", tx_lens[t0]));
    check(prts[prts.size() - 1] == prt, $sformatf("PRT %0d", prts[prts.size() - 1]));
    check(win_offs[o0] == int'(longint'(ws) * 2457600 / 1000),
          $sformatf("window opens at %0d", win_offs[o0]));
    check(win_lens[win_lens.size() - 1] == gates * 4915, "window length");
    for (int i = 0; i < 3; i++) begin
      int f;
      real iv, qv, mag, expv;
      f = (i == 0) ? 0 : (i == 1) ? gates / 2 : f3;
      read_fifo(f, 2, w);
      for (int k = 0; k < 2; k++) begin
        iv   = real'($signed(w[k][63:32]));
        qv   = real'($signed(w[k][31:0]));
        mag  = $sqrt(iv * iv + qv * qv);
        expv = 4915.0 * 100.0 * real'(f + 1) * 131000.0 / 2.0 / 8192.0;
        check(mag > 0.99 * expv && mag < 1.01 * expv,
              $sformatf("gate %0d |IQ| %f exp %f", f, mag, expv));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chip.wait_configured();
    // E region
    setup_run(0, 2, 63, 16, 1, 4915, 983040, 15);
    // F region
    setup_run(2, 0, 242, 64, 0, 19660, 2457600, 63);
    check(fifo_overflow == '0 && chip.protocol_errors == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
