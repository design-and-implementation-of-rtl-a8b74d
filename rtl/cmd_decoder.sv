// cmd_decoder: command decoder between the USB core and the radar.
//
// Every 16-bit command word from the host is split as in a multiplexer:
// the low four bits select the destination (cmd_sel_t), the upper twelve
// bits are the value routed to it. Destinations 0..4 are the run-time
// TCSG settings (pulse width, PRF, window start, number of range gates,
// beam orientation), held in `cfg`; destination 5 issues a one-clock system
// command (`sys_valid`, `sys_op`, `sys_fifo`) to the system controller.
// Other selects are ignored and counted in `bad_cmds`.
// The select/data split follows the receiver description; the bit layout,
// the codes and the reset settings (20 us pulse, 167 Hz PRF, window start at
// 540 us, 64 gates, zenith beam) are this design's choices.
// Timing: registered, the new setting or system command appears one clock
// after `cmd_valid`.
module cmd_decoder
  import hf_radar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_valid,
  input  logic [15:0] cmd,
  output tcsg_cfg_t   cfg,
  output logic        sys_valid,
  output sys_op_t     sys_op,
  output logic [5:0]  sys_fifo,
  output logic [7:0]  bad_cmds
);
  cmd_sel_t    sel;
  logic [11:0] data;

  always_comb begin
    sel  = cmd_sel_t'(cmd[3:0]);
    data = cmd[15:4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.pw_sel    <= 2'b00;
      cfg.prf_sel   <= 2'b01;
      cfg.ws_code   <= 8'd54;
      cfg.num_gates <= 7'd64;
      cfg.beam      <= 2'b00;
      sys_valid     <= 1'b0;
      sys_op        <= OP_STOP;
      sys_fifo      <= '0;
      bad_cmds      <= '0;
    end else begin
      sys_valid <= 1'b0;
      if (cmd_valid) begin
        case (sel)
          CMD_PW:    cfg.pw_sel    <= data[1:0];
          CMD_PRF:   cfg.prf_sel   <= data[1:0];
          CMD_WS:    cfg.ws_code   <= data[7:0];
          CMD_GATES: cfg.num_gates <= data[6:0];
          CMD_BEAM:  cfg.beam      <= data[1:0];
          CMD_SYS: begin
            sys_valid <= 1'b1;
            sys_op    <= sys_op_t'(data[1:0]);
            sys_fifo  <= data[7:2];
          end
          default:   bad_cmds <= bad_cmds + 1'b1;
        endcase
      end
    end
  end
endmodule
