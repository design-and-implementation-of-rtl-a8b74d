// tb_tcsg: timing of the TCSG at a 1 MHz clock (one clock per microsecond,
// so the radar's microsecond figures are clock counts). For every pulse
// repetition time it measures, from the rise of T/R: the PRT length, the
// T/R length (200 us), the TX start (50 us) and width (20/60/80/100 us),
// the window opening (window-start setting, but not before T/R has
// dropped), the number, spacing (20 us) and range-gate order of the sample
// pulses and FIFO write bits, and the beam output. Covers all four pulse
// widths and PRFs, gate counts 0, 16, 64 and above 64, early and late
// window starts, and stopping with run_en low.
module tb_tcsg;
  import hf_radar_pkg::*;
  logic        clk = 0, rst = 1, run_en = 0;
  tcsg_cfg_t   cfg;
  tcsg_state_t state;
  logic        tr_pulse, tx_pulse, rx_window, sampling_pulse, beam_en;
  logic        window_done, prt_done;
  logic [63:0] fifo_wr_en_vct;
  logic [5:0]  range_gate;
  logic [1:0]  beam;
  int checks = 0, failures = 0;

  tcsg #(.CLK_KHZ(1000)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, what); end
  endtask

  // ---- per-PRT measurement, offsets from the T/R rise
  int cyc = 0, t0 = -1, prts = 0;
  int tr_len, tx_start, tx_len, win_start, win_len, nsamp, bad_samp, bad_vct;
  logic tr_q = 0, tx_q = 0, win_q = 0;
  tcsg_cfg_t cur;

  function automatic int gates_of(tcsg_cfg_t c);
    if (c.num_gates == 0) return 1;
    if (c.num_gates > 64) return 64;
    return int'(c.num_gates);
  endfunction

  task automatic judge();
    int ws, open, ng;
    ws   = int'(cur.ws_code) * 10;
    open = (ws > 201) ? ws : 201;
    ng   = gates_of(cur);
    check(tr_len == 200, $sformatf("T/R length %0d", tr_len));
    check(tx_start == 50, $sformatf("TX start %0d", tx_start));
    check(tx_len == PW_US[cur.pw_sel], $sformatf("TX width %0d", tx_len));
    check(win_start == open, $sformatf("window start %0d exp %0d", win_start, open));
    check(win_len == 20 * ng, $sformatf("window length %0d", win_len));
    check(nsamp == ng && bad_samp == 0 && bad_vct == 0,
          $sformatf("samples %0d bad %0d/%0d", nsamp, bad_samp, bad_vct));
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (tr_pulse && !tr_q) begin
      if (t0 >= 0) begin
        judge();
        check(cyc - t0 == 1000000 / PRF_HZ[cur.prf_sel],
              $sformatf("PRT %0d", cyc - t0));
      end
      prts++;
      t0 = cyc; cur = cfg;
      tr_len = 0; tx_len = 0; win_len = 0; nsamp = 0; bad_samp = 0; bad_vct = 0;
      tx_start = -1; win_start = -1;
      check(beam_en && beam == cfg.beam, "beam output at T/R rise");
    end
    if (t0 >= 0) begin
      if (tr_pulse) tr_len++;
      if (tx_pulse) begin tx_len++; if (!tx_q) tx_start = cyc - t0; end
      if (rx_window) begin win_len++; if (!win_q) win_start = cyc - t0; end
      if (sampling_pulse) begin
        if (cyc - t0 != win_start + 20 * nsamp + 19 || range_gate != 6'(nsamp))
          bad_samp++;
        if (fifo_wr_en_vct != 64'd1 << nsamp) bad_vct++;
        nsamp++;
      end else if (fifo_wr_en_vct != '0) bad_vct++;
    end
    tr_q = tr_pulse; tx_q = tx_pulse; win_q = rx_window;
  end

  // run n PRTs with setting c, then stop and wait for state 0
  task automatic run(input tcsg_cfg_t c, input int n);
    int p0;
    cfg = c;
    repeat (3) @(posedge clk);
    run_en = 1;
    p0 = prts;
    while (prts < p0 + n) @(posedge clk);
    #2 run_en = 0;
    while (state != TS0_INIT) @(posedge clk);
    // the last PRT is judged here
    @(posedge clk); #2;
    judge();
    t0 = -1;
  endtask

  initial begin
    cfg = '{pw_sel: 0, prf_sel: 1, ws_code: 54, num_gates: 64, beam: 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(state == TS0_INIT && !tr_pulse && !tx_pulse, "idle after reset");
    // the radar's example: 20 us, 540 us window start, 167 Hz
    run('{pw_sel: 0, prf_sel: 1, ws_code: 54, num_gates: 64, beam: 0}, 2);
    run('{pw_sel: 1, prf_sel: 2, ws_code: 63, num_gates: 16, beam: 1}, 2);
    run('{pw_sel: 2, prf_sel: 0, ws_code: 242, num_gates: 0,  beam: 2}, 2);
    run('{pw_sel: 3, prf_sel: 3, ws_code: 8,  num_gates: 100, beam: 3}, 2);
    run('{pw_sel: 3, prf_sel: 2, ws_code: 20,  num_gates: 33, beam: 0}, 1);
    // F-region setting: 80 us pulse, 100 Hz, window at 2420 us, 64 gates
    run('{pw_sel: 2, prf_sel: 0, ws_code: 242, num_gates: 64, beam: 0}, 1);
    check(prts == 10, "PRT count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
