// hf_radar_rx: FPGA part of the HF radar digital receiver.
//
// Wires the receiver's blocks as in its block diagram:
//   USB core (host port of the CY7C67300) -> command decoder -> settings to
//   the TCSG and commands to the system controller -> TCSG run enable;
//   TCSG -> T/R, TX and beam-steering outputs, receive window and sample
//   pulses; DDS -> local oscillator for the DDC and, gated by the TX pulse,
//   the transmit carrier for the DAC; ADC -> DDC -> FIFO bank, one FIFO per
//   range gate; FIFO bank -> system controller -> USB core -> host PC.
// During the receive window the DDC integrates the mixed-down samples over
// one range gate; at each sample pulse the sum goes into the FIFO of that
// gate (selected by the TCSG's one-hot FIFO write vector). After PULSES
// pulses the acquisition stops and the host reads the FIFOs one at a time.
// In test mode the FIFOs receive {pulse number, gate number} (32 bits each)
// instead of I and Q, so the data path to the host can be checked without
// a radar signal.
// The ADC, DAC, clocking and FMC card logic are outside this module: samples
// enter on `adc_data`, the transmit carrier leaves on dac_i/dac_q, and
// everything runs on one clock, the ADC sample clock (245.76 MHz assumed).
// The TX gating of the DAC, the test pattern and the single clock are this
// design's choices.
module hf_radar_rx
  import hf_radar_pkg::*;
#(
  parameter int unsigned CLK_KHZ = 245760,
  parameter longint unsigned LO_HZ = 18100000,
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned PULSES  = 1024,
  parameter int unsigned STROBE  = 4
) (
  input  logic               clk,
  input  logic               rst,
  // ADC / DAC
  input  logic signed [13:0] adc_data,
  output logic signed [17:0] dac_i,
  output logic signed [17:0] dac_q,
  // radar control
  output logic               tr_pulse,
  output logic               tx_pulse,
  output logic               rx_window,
  output logic [1:0]         beam,
  output logic               beam_en,
  // HPI bus of the USB controller
  output logic [1:0]         hpi_a,
  output logic               hpi_cs_n,
  output logic               hpi_rd_n,
  output logic               hpi_wr_n,
  output logic [15:0]        hpi_d_o,
  output logic               hpi_d_oe,
  input  logic [15:0]        hpi_d_i,
  input  logic               hpi_int,
  // status
  output tcsg_state_t        tcsg_state,
  output logic [3:0]         usb_state,
  output logic               sys_busy,
  output logic [63:0]        fifo_overflow
);
  localparam int unsigned NG = 64;
  localparam logic [29:0] FTW =
    30'((LO_HZ * (64'd1 << 30) + (CLK_KHZ * 1000) / 2) / (CLK_KHZ * 1000));

  // ---------------------------------------------------------- USB side
  logic        cmd_valid, setup_valid, configured;
  logic [15:0] cmd, in_data;
  logic [63:0] setup_pkt;
  logic        in_valid, in_ready;
  logic [7:0]  bad_msgs, bad_cmds;

  usb_core #(.STROBE(STROBE)) u_usb (
    .clk, .rst, .hpi_a, .hpi_cs_n, .hpi_rd_n, .hpi_wr_n, .hpi_d_o, .hpi_d_oe,
    .hpi_d_i, .hpi_int, .cmd_valid, .cmd, .setup_valid, .setup_pkt,
    .in_data, .in_valid, .in_ready, .state_o(usb_state), .configured,
    .bad_msgs);

  tcsg_cfg_t   cfg;
  logic        sys_valid;
  sys_op_t     sys_op;
  logic [5:0]  sys_fifo;

  cmd_decoder u_dec (
    .clk, .rst, .cmd_valid, .cmd, .cfg, .sys_valid, .sys_op, .sys_fifo,
    .bad_cmds);

  // ------------------------------------------------- system controller
  logic        run_en, test_mode, fifo_clear, fifo_rd_en;
  logic [1:0]  rd_bank;
  logic [3:0]  rd_fifo;
  logic [63:0] fifo_rd_data;
  logic        fifo_rd_valid, fifo_rd_empty, window_done;
  logic [$clog2(PULSES+1)-1:0] pulse_cnt;

  sys_ctrl #(.PULSES(PULSES)) u_sys (
    .clk, .rst, .sys_valid, .sys_op, .sys_fifo, .window_done, .run_en,
    .test_mode, .fifo_clear, .fifo_rd_en, .rd_bank, .rd_fifo, .fifo_rd_data,
    .fifo_rd_valid, .fifo_rd_empty, .in_data, .in_valid, .in_ready,
    .busy(sys_busy), .pulse_cnt);

  // --------------------------------------------------------------- TCSG
  logic          sampling_pulse, prt_done;
  logic [NG-1:0] fifo_wr_en_vct;
  logic [5:0]    range_gate;

  tcsg #(.CLK_KHZ(CLK_KHZ), .NUM_GATES(NG)) u_tcsg (
    .clk, .rst, .run_en, .cfg, .state(tcsg_state), .tr_pulse, .tx_pulse,
    .rx_window, .sampling_pulse, .fifo_wr_en_vct, .range_gate, .beam,
    .beam_en, .window_done, .prt_done);

  // ---------------------------------------------------------- DDS / DDC
  logic [15:0]        angle;
  logic signed [17:0] lo_sin, lo_cos;
  logic signed [31:0] ddc_i, ddc_q;
  logic               ddc_valid;

  dds u_dds (
    .clk, .rst, .ftw(FTW), .angle, .sin_o(lo_sin), .cos_o(lo_cos));

  ddc u_ddc (
    .clk, .rst, .adc(adc_data), .lo_cos, .lo_sin, .acc_en(rx_window),
    .dump(sampling_pulse), .i_o(ddc_i), .q_o(ddc_q), .valid(ddc_valid));

  always_comb begin
    dac_i = tx_pulse ? lo_cos : '0;
    dac_q = tx_pulse ? lo_sin : '0;
  end

  // FIFO number from the one-hot write vector, held for the DDC's latency.
  logic [5:0]  wr_sel, wr_sel_q;
  logic [31:0] pulse_q;
  always_comb begin
    wr_sel = '0;
    for (int g = 0; g < NG; g++)
      if (fifo_wr_en_vct[g]) wr_sel = 6'(g);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_sel_q <= '0;
      pulse_q  <= '0;
    end else if (sampling_pulse) begin
      wr_sel_q <= wr_sel;
      pulse_q  <= 32'(pulse_cnt);
    end
  end

  // ----------------------------------------------------------- FIFO bank
  logic [$clog2(DEPTH):0] rd_count;
  logic [63:0] fifo_full;

  fifo_bank #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clear(fifo_clear), .wr_en(ddc_valid), .wr_sel(wr_sel_q),
    .wr_data(test_mode ? {pulse_q, 26'd0, wr_sel_q} : {ddc_i, ddc_q}),
    .rd_en(fifo_rd_en), .rd_bank, .rd_fifo, .rd_data(fifo_rd_data),
    .rd_valid(fifo_rd_valid), .rd_empty(fifo_rd_empty), .rd_count,
    .full(fifo_full), .overflow(fifo_overflow));
endmodule
