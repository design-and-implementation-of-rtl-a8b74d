// sys_ctrl: system controller of the radar receiver.
//
// A state machine that carries out the host's four system commands:
//   START - empty all FIFOs and run the TCSG for PULSES pulse repetition
//           times (one FIFO word per range gate per pulse), then stop;
//   TEST  - the same, but with `test_mode` high so that a known pattern is
//           stored instead of receiver data;
//   READ  - stream the FIFO chosen by the command (bank = fifo[5:4], FIFO in
//           bank = fifo[3:0]) to the USB core as 16-bit words, most
//           significant first (four per 64-bit FIFO word), until it is empty;
//   STOP  - end whatever is running; the TCSG completes its current PRT.
// Commands other than STOP are ignored while one is running.
// The four commands come from the receiver description; everything about
// how they are carried out (the pulse count, the test pattern being
// produced elsewhere, the word order) is this design's choice.
// Timing: `run_en` rises one clock after START; a FIFO word is popped when
// the previous one has been fully sent and appears on the stream two clocks
// later; `in_valid`/`in_ready` is a plain valid/ready handshake.
module sys_ctrl
  import hf_radar_pkg::*;
#(
  parameter int unsigned PULSES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // from the command decoder
  input  logic        sys_valid,
  input  sys_op_t     sys_op,
  input  logic [5:0]  sys_fifo,
  // TCSG
  input  logic        window_done,
  output logic        run_en,
  output logic        test_mode,
  // FIFO bank
  output logic        fifo_clear,
  output logic        fifo_rd_en,
  output logic [1:0]  rd_bank,
  output logic [3:0]  rd_fifo,
  input  logic [63:0] fifo_rd_data,
  input  logic        fifo_rd_valid,
  input  logic        fifo_rd_empty,
  // 16-bit data stream to the USB core
  output logic [15:0] in_data,
  output logic        in_valid,
  input  logic        in_ready,
  // status
  output logic        busy,
  output logic [$clog2(PULSES+1)-1:0] pulse_cnt
);
  typedef enum logic [1:0] {SC_IDLE, SC_ACQ, SC_TEST, SC_READ} sc_state_t;
  sc_state_t   st;
  logic [63:0] hold;
  logic [2:0]  left;
  logic        pend;

  always_comb begin
    run_en     = (st == SC_ACQ) || (st == SC_TEST);
    test_mode  = (st == SC_TEST);
    busy       = (st != SC_IDLE);
    in_valid   = (st == SC_READ) && (left != '0);
    in_data    = hold[63:48];
    fifo_rd_en = (st == SC_READ) && (left == '0) && !pend && !fifo_rd_empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= SC_IDLE;
      pulse_cnt  <= '0;
      fifo_clear <= 1'b0;
      rd_bank    <= '0;
      rd_fifo    <= '0;
      hold       <= '0;
      left       <= '0;
      pend       <= 1'b0;
    end else begin
      fifo_clear <= 1'b0;
      unique case (st)
        SC_IDLE: if (sys_valid) begin
          unique case (sys_op)
            OP_START, OP_TEST: begin
              fifo_clear <= 1'b1;
              pulse_cnt  <= '0;
              st         <= (sys_op == OP_TEST) ? SC_TEST : SC_ACQ;
            end
            OP_READ: begin
              rd_bank <= sys_fifo[5:4];
              rd_fifo <= sys_fifo[3:0];
              left    <= '0;
              pend    <= 1'b0;
              st      <= SC_READ;
            end
            OP_STOP: ;
          endcase
        end
        SC_ACQ, SC_TEST: begin
          if (window_done) begin
            pulse_cnt <= pulse_cnt + 1'b1;
            if (pulse_cnt == ($bits(pulse_cnt))'(PULSES - 1)) st <= SC_IDLE;
          end
          if (sys_valid && sys_op == OP_STOP) st <= SC_IDLE;
        end
        SC_READ: begin
          if (fifo_rd_en) pend <= 1'b1;
          if (fifo_rd_valid) begin
            hold <= fifo_rd_data;
            left <= 3'd4;
            pend <= 1'b0;
          end else if (in_valid && in_ready) begin
            hold <= {hold[47:0], 16'h0000};
            left <= left - 1'b1;
          end
          if ((left == '0 && !pend && fifo_rd_empty) ||
              (sys_valid && sys_op == OP_STOP))
            st <= SC_IDLE;
        end
      endcase
    end
  end

  // A FIFO word never arrives while the previous one is still being sent.
  assert property (@(posedge clk) disable iff (rst) fifo_rd_valid |-> left == '0);
endmodule
