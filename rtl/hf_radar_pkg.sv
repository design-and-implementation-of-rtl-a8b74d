// hf_radar_pkg: types, codes and time conversions shared by the HF radar
// digital receiver.
//
// Run-time radar settings travel as one packed struct (tcsg_cfg_t) from the
// command decoder to the timing and control signal generator (TCSG). The
// four pulse widths (20/60/80/100 us), the 50 us T/R lead before the
// transmit pulse and the 150 us T/R hold from the start of the transmit pulse
// follow the radar's timing description. The PRF codes, the command word
// layout and the mailbox message codes used on the USB controller's host port
// are this design's own choices. Every time is converted to clock cycles
// at elaboration from the clock frequency parameter CLK_KHZ; the default is
// 245.76 MHz, the rate at which a 20 us pulse lasts 4915 cycles (0x1333).
package hf_radar_pkg;

  // ---------------------------------------------------------------- TCSG
  typedef struct packed {
    logic [1:0] pw_sel;     // 00:20us 01:60us 10:80us 11:100us
    logic [1:0] prf_sel;    // 00:100Hz 01:167Hz 10:250Hz 11:500Hz
    logic [7:0] ws_code;    // window-start ROM index, 10 us per step
    logic [6:0] num_gates;  // range gates per window, 1..64
    logic [1:0] beam;       // 00 zenith, 01 east, 10 west, 11 spare
  } tcsg_cfg_t;

  // State numbering follows the TCSG state diagram (state 0..6).
  typedef enum logic [3:0] {
    TS0_INIT   = 4'd0,
    TS1_TR     = 4'd1,
    TS2_PW00   = 4'd2,
    TS2_PW01   = 4'd3,
    TS2_PW10   = 4'd4,
    TS2_PW11   = 4'd5,
    TS3_TXOFF  = 4'd6,
    TS4_WAIT   = 4'd7,
    TS5_WINDOW = 4'd8,
    TS6_DONE   = 4'd9
  } tcsg_state_t;

  localparam int unsigned PW_US [4]  = '{20, 60, 80, 100};
  localparam int unsigned PRF_HZ [4] = '{100, 167, 250, 500};
  localparam int unsigned T_PRE_US   = 50;   // T/R high before TX
  localparam int unsigned T_TR_US    = 150;  // T/R held from TX start

  // Cycles in `us` microseconds at clk_khz kHz (truncated).
  function automatic longint unsigned us_to_clk(longint unsigned us,
                                                longint unsigned clk_khz);
    return (us * clk_khz) / 1000;
  endfunction

  // Cycles in `ns` nanoseconds at clk_khz kHz (truncated).
  function automatic longint unsigned ns_to_clk(longint unsigned ns,
                                                longint unsigned clk_khz);
    return (ns * clk_khz) / 1000000;
  endfunction

  // Cycles in one pulse repetition time at prf_hz.
  function automatic longint unsigned prt_clk(longint unsigned prf_hz,
                                              longint unsigned clk_khz);
    return (clk_khz * 1000) / prf_hz;
  endfunction

  // ------------------------------------------------------ command word
  // 16-bit command: [3:0] selects the destination, [15:4] is its data.
  typedef enum logic [3:0] {
    CMD_PW     = 4'd0,  // data[1:0]  pulse-width code
    CMD_PRF    = 4'd1,  // data[1:0]  PRF code
    CMD_WS     = 4'd2,  // data[7:0]  window-start code
    CMD_GATES  = 4'd3,  // data[6:0]  number of range gates
    CMD_BEAM   = 4'd4,  // data[1:0]  beam orientation
    CMD_SYS    = 4'd5   // data[1:0]  sys_op_t, data[7:2] FIFO number
  } cmd_sel_t;

  typedef enum logic [1:0] {
    OP_STOP  = 2'd0,
    OP_START = 2'd1,  // start acquisition
    OP_READ  = 2'd2,  // read one FIFO out to the host
    OP_TEST  = 2'd3   // acquisition with a known test pattern as data
  } sys_op_t;

  // ------------------------------------------------- HPI mailbox words
  // [15:12] message type, [11:0] word count.
  localparam logic [3:0] MB_EP0_SETUP = 4'h1;  // from USB chip
  localparam logic [3:0] MB_EP1_OUT   = 4'h2;  // from USB chip
  localparam logic [3:0] MB_EP2_IN    = 4'h3;  // from USB chip
  localparam logic [3:0] MB_ACK       = 4'h4;  // from USB chip: transfer complete
  localparam logic [3:0] MB_CONFIG    = 4'h8;  // to USB chip: configured
  localparam logic [3:0] MB_SETUP_RX  = 4'h9;  // to USB chip: setup packet read
  localparam logic [3:0] MB_OUT_RX    = 4'hA;  // to USB chip: OUT setup seen
  localparam logic [3:0] MB_IN_RX     = 4'hB;  // to USB chip: IN setup seen
  localparam logic [3:0] MB_IN_DONE   = 4'hC;  // to USB chip: IN data written

  // HPI port register addresses of the CY7C67300.
  localparam logic [1:0] HPI_DATA    = 2'b00;
  localparam logic [1:0] HPI_MAILBOX = 2'b01;
  localparam logic [1:0] HPI_ADDR    = 2'b10;
  localparam logic [1:0] HPI_STATUS  = 2'b11;

endpackage
