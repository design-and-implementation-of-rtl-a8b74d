// tcsg: timing and control signal generator of the HF radar receiver.
//
// A state machine (states 0..6 of the radar's TCSG diagram) sequences one
// pulse repetition time (PRT) at a time, timed by four counters:
//   PRF counter     - free-running cycle count over one PRT; the time base
//                     for T/R, TX and the window (its terminal count is the
//                     PRT of the selected PRF);
//   PW counter      - counts the transmit pulse; terminal count set by the
//                     pulse-width code;
//   window counter  - counts from the PRT start to the window-start time
//                     read from the window-start ROM (ws_rom);
//   range gate ctr  - counts sample pulses while the window is open and
//                     selects the FIFO the sample is written to.
// A fifth counter of the same kind spaces the sample pulses one range gate
// (GATE_US) apart.
//
// Sequence, with t = PRF counter value (cycles from the PRT start):
//   state 0 : idle, settings latched; leaves when run_en is high
//   state 1 : T/R high, beam orientation output enabled, t < T_PRE_US (50 us)
//   state 2 : T/R and TX high for the selected width (2_00..2_11 =
//             20/60/80/100 us)
//   state 3 : TX low, T/R still high until t = T_PRE_US + T_TR_US, i.e. for
//             150 us - PW
//   state 4 : T/R low, waiting for the window start
//   state 5 : receive window open; every GATE_US a one-cycle sampling_pulse
//             and a one-hot fifo_wr_en_vct bit for the current range gate;
//             closes after num_gates gates
//   state 6 : done, waits out the PRT, then state 1 again (state 0 if
//             run_en has dropped)
// Settings in `cfg` are sampled in state 0 and at every PRT start, so they
// may be changed at run time and take effect with the next pulse.
// The state list, the 50/150 us times and the four pulse widths follow the
// radar's timing description; the gate spacing, PRF codes, window-start
// grid and the rule that the window start is measured from the PRT start
// are this design's choices. A window start earlier than the end of state 3
// opens the window right after state 3. Outputs are decoded from the state
// register (and the gate counter for sampling_pulse), no extra latency.
module tcsg
  import hf_radar_pkg::*;
#(
  parameter int unsigned CLK_KHZ   = 245760,
  parameter int unsigned NUM_GATES = 64,
  parameter int unsigned GATE_US   = 20,
  parameter int unsigned W         = 24
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run_en,
  input  tcsg_cfg_t            cfg,
  output tcsg_state_t          state,
  output logic                 tr_pulse,
  output logic                 tx_pulse,
  output logic                 rx_window,
  output logic                 sampling_pulse,
  output logic [NUM_GATES-1:0] fifo_wr_en_vct,
  output logic [$clog2(NUM_GATES)-1:0] range_gate,
  output logic [1:0]           beam,
  output logic                 beam_en,
  output logic                 window_done,
  output logic                 prt_done
);
  localparam int unsigned GW = $clog2(NUM_GATES);

  localparam logic [W-1:0] T_PRE  = W'(us_to_clk(T_PRE_US, CLK_KHZ));
  localparam logic [W-1:0] T_TREND = W'(us_to_clk(64'(T_PRE_US) + 64'(T_TR_US), CLK_KHZ));
  localparam logic [W-1:0] T_GATE = W'(us_to_clk(GATE_US, CLK_KHZ));

  function automatic logic [W-1:0] pw_clk(logic [1:0] sel);
    return W'(us_to_clk(PW_US[sel], CLK_KHZ));
  endfunction
  function automatic logic [W-1:0] prt_term(logic [1:0] sel);
    return W'(prt_clk(PRF_HZ[sel], CLK_KHZ));
  endfunction

  initial begin
    assert (prt_clk(64'(PRF_HZ[0]), 64'(CLK_KHZ)) < (64'd1 << W))
      else $error("tcsg: W too small for the longest PRT");
  end

  tcsg_cfg_t   cfg_q;
  tcsg_state_t nstate;

  logic [W-1:0] prf_count, pw_count, ws_count, gate_count, rg_count;
  logic         prf_tc, pw_tc, ws_tc, gate_tc, rg_tc;
  logic [W-1:0] ws_term, prf_term_q, pw_term_q, rg_term;
  logic         ws_hit;
  logic         in_s2, in_tr;

  always_comb begin
    in_s2 = (state == TS2_PW00) || (state == TS2_PW01) ||
            (state == TS2_PW10) || (state == TS2_PW11);
    in_tr = (state == TS1_TR) || in_s2 || (state == TS3_TXOFF);
    if (cfg_q.num_gates == '0)                    rg_term = W'(1);
    else if (cfg_q.num_gates > 7'(NUM_GATES))     rg_term = W'(NUM_GATES);
    else                                          rg_term = W'(cfg_q.num_gates);
  end

  // PRF counter: runs in every state but 0.
  tc_counter #(.W(W)) u_prf (
    .clk, .rst, .clear(state == TS0_INIT), .en(state != TS0_INIT),
    .term(prf_term_q), .count(prf_count), .tc(prf_tc));

  // PW counter: runs only in state 2.
  tc_counter #(.W(W)) u_pw (
    .clk, .rst, .clear(!in_s2), .en(in_s2),
    .term(pw_term_q), .count(pw_count), .tc(pw_tc));

  // Window-start counter: from the PRT start until the ROM's count.
  ws_rom #(.CLK_KHZ(CLK_KHZ), .W(W)) u_rom (
    .clk, .code(cfg_q.ws_code), .count(ws_term));

  tc_counter #(.W(W)) u_ws (
    .clk, .rst, .clear(state == TS0_INIT || state == TS6_DONE),
    .en(!ws_hit && (in_tr || state == TS4_WAIT)),
    .term(ws_term), .count(ws_count), .tc(ws_tc));

  // Gate interval counter: one sample pulse per range gate.
  tc_counter #(.W(W)) u_gate (
    .clk, .rst, .clear(state != TS5_WINDOW), .en(state == TS5_WINDOW),
    .term(T_GATE), .count(gate_count), .tc(gate_tc));

  // Range gate counter: counts sample pulses in the window.
  tc_counter #(.W(W)) u_rg (
    .clk, .rst, .clear(state != TS5_WINDOW), .en(gate_tc),
    .term(rg_term), .count(rg_count), .tc(rg_tc));

  always_comb begin
    nstate = state;
    unique case (state)
      TS0_INIT:   if (run_en) nstate = TS1_TR;
      TS1_TR:     if (prf_count == T_PRE - 1'b1)
                    unique case (cfg_q.pw_sel)
                      2'b00: nstate = TS2_PW00;
                      2'b01: nstate = TS2_PW01;
                      2'b10: nstate = TS2_PW10;
                      2'b11: nstate = TS2_PW11;
                    endcase
      TS2_PW00, TS2_PW01, TS2_PW10, TS2_PW11:
                  if (pw_tc) nstate = TS3_TXOFF;
      TS3_TXOFF:  if (prf_count == T_TREND - 1'b1) nstate = TS4_WAIT;
      TS4_WAIT:   if (ws_hit || ws_tc) nstate = TS5_WINDOW;
      TS5_WINDOW: if (rg_tc) nstate = TS6_DONE;
      TS6_DONE:   if (prf_tc) nstate = run_en ? TS1_TR : TS0_INIT;
      default:    nstate = TS0_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= TS0_INIT;
      cfg_q      <= '0;
      prf_term_q <= prt_term(2'b00);
      pw_term_q  <= pw_clk(2'b00);
      ws_hit     <= 1'b0;
      beam       <= '0;
    end else begin
      state <= nstate;
      // settings are taken in state 0 and at each PRT start
      if (state == TS0_INIT || (state == TS6_DONE && prf_tc)) begin
        cfg_q      <= cfg;
        prf_term_q <= prt_term(cfg.prf_sel);
        pw_term_q  <= pw_clk(cfg.pw_sel);
      end
      if (state == TS0_INIT || state == TS6_DONE) ws_hit <= 1'b0;
      else if (ws_tc)                               ws_hit <= 1'b1;
      if (state != TS1_TR && nstate == TS1_TR) beam <= cfg_q.beam;
    end
  end

  always_comb begin
    tr_pulse       = in_tr;
    tx_pulse       = in_s2;
    rx_window      = (state == TS5_WINDOW);
    beam_en        = (state == TS1_TR);
    sampling_pulse = gate_tc;
    range_gate     = GW'(rg_count);
    fifo_wr_en_vct = '0;
    if (gate_tc) fifo_wr_en_vct[range_gate] = 1'b1;
    window_done    = rg_tc;
    prt_done       = (state == TS6_DONE) && prf_tc;
  end

  // Only one range gate is written per sample pulse.
  assert property (@(posedge clk) disable iff (rst) $onehot0(fifo_wr_en_vct));
  // TX is never on without T/R.
  assert property (@(posedge clk) disable iff (rst) tx_pulse |-> tr_pulse);
endmodule
