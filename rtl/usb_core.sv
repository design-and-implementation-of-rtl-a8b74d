// usb_core: USB peripheral controller of the radar receiver.
//
// Connects the radar to a PC through a Cypress CY7C67300 USB controller,
// reached over the chip's 16-bit host port interface (HPI, see hpi_master).
// The USB chip's firmware owns the USB protocol; the two sides exchange
// short messages through the HPI mailbox register ([15:12] message type,
// [11:0] word count, codes in hf_radar_pkg) and move data through the
// chip's memory (address register, then auto-incrementing data register).
// An HPI interrupt tells this core that a mailbox message is waiting.
//
// States follow the USB core's state diagram:
//   0  idle (reset)               1  configure: send MB_CONFIG
//   2  wait for interrupt; read the mailbox and branch on the endpoint
//   3  control setup (EP0): read the 4-word setup packet at EP0_BUF, answer
//      MB_SETUP_RX                10 wait ACK: transfer complete, back to 2
//   4  OUT setup (EP1): answer MB_OUT_RX
//   6  wait ACK for the OUT transfer
//   7  read OUT data: read the words at EP1_BUF; each is a command word
//      (`cmd_valid`/`cmd`); reading complete, back to 2
//   5  IN setup (EP2): answer MB_IN_RX
//   9  wait ACK for the IN transfer
//   8  write IN data: write the requested number of words from the radar
//      stream to EP2_BUF (a zero word where the stream has nothing),
//      then MB_IN_DONE; writing complete, back to 2
// The states and their conditions are the design's documented USB core
// state machine. The mailbox messages, buffer addresses and the zero
// padding are this design's choices (the firmware of the USB chip is not
// part of this design). A mailbox message of an unexpected type is
// dropped and counted in `bad_msgs`.
// Timing: every HPI access takes STROBE+1 clocks and the next starts one
// clock after it ends.
module usb_core
  import hf_radar_pkg::*;
#(
  parameter int unsigned STROBE  = 4,
  parameter logic [15:0] EP0_BUF = 16'h0500,
  parameter logic [15:0] EP1_BUF = 16'h0600,
  parameter logic [15:0] EP2_BUF = 16'h0700
) (
  input  logic        clk,
  input  logic        rst,
  // HPI pins
  output logic [1:0]  hpi_a,
  output logic        hpi_cs_n,
  output logic        hpi_rd_n,
  output logic        hpi_wr_n,
  output logic [15:0] hpi_d_o,
  output logic        hpi_d_oe,
  input  logic [15:0] hpi_d_i,
  input  logic        hpi_int,
  // commands to the command decoder
  output logic        cmd_valid,
  output logic [15:0] cmd,
  // last control setup packet
  output logic        setup_valid,
  output logic [63:0] setup_pkt,
  // radar data to the host
  input  logic [15:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  // status
  output logic [3:0]  state_o,
  output logic        configured,
  output logic [7:0]  bad_msgs
);
  typedef enum logic [3:0] {
    U0_IDLE = 4'd0, U1_CONFIG = 4'd1, U2_WAIT_INT = 4'd2,
    U3_CTRL_SETUP = 4'd3, U4_OUT_SETUP = 4'd4, U5_IN_SETUP = 4'd5,
    U6_WAIT_ACK = 4'd6, U7_READ_OUT = 4'd7, U8_WRITE_IN = 4'd8,
    U9_WAIT_ACK = 4'd9, U10_WAIT_ACK = 4'd10
  } usb_state_t;

  usb_state_t  st;
  logic        op_req, op_we, op_done;
  logic [1:0]  op_a;
  logic [15:0] op_wd, op_rd;
  logic [1:0]  step;       // 0: address write, 1: data words, 2: message
  logic [11:0] len, cnt;
  logic [3:0]  mtype;

  hpi_master #(.STROBE(STROBE)) u_hpi (
    .clk, .rst, .req(op_req), .we(op_we), .addr(op_a), .wdata(op_wd),
    .done(op_done), .rdata(op_rd),
    .hpi_a, .hpi_cs_n, .hpi_rd_n, .hpi_wr_n, .hpi_d_o, .hpi_d_oe, .hpi_d_i);

  assign state_o = st;
  assign mtype   = op_rd[15:12];

  // Issue one HPI access.
  task automatic issue(input logic w, input logic [1:0] a,
                       input logic [15:0] d);
    op_req <= 1'b1;
    op_we  <= w;
    op_a   <= a;
    op_wd  <= d;
  endtask

  always_comb in_ready = (st == U8_WRITE_IN) && !op_req && step == 2'd1 &&
                         cnt != len && in_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= U0_IDLE;
      op_req      <= 1'b0;
      op_we       <= 1'b0;
      op_a        <= '0;
      op_wd       <= '0;
      step        <= '0;
      len         <= '0;
      cnt         <= '0;
      cmd_valid   <= 1'b0;
      cmd         <= '0;
      setup_valid <= 1'b0;
      setup_pkt   <= '0;
      configured  <= 1'b0;
      bad_msgs    <= '0;
    end else begin
      cmd_valid   <= 1'b0;
      setup_valid <= 1'b0;
      if (op_req) begin
        // ------------------------------------------ an access completes
        if (op_done) begin
          op_req <= 1'b0;
          unique case (st)
            U1_CONFIG: begin configured <= 1'b1; st <= U2_WAIT_INT; end
            U2_WAIT_INT: begin
              len  <= op_rd[11:0];
              cnt  <= '0;
              step <= '0;
              if      (mtype == MB_EP0_SETUP) st <= U3_CTRL_SETUP;
              else if (mtype == MB_EP1_OUT)   st <= U4_OUT_SETUP;
              else if (mtype == MB_EP2_IN)    st <= U5_IN_SETUP;
              else bad_msgs <= bad_msgs + 1'b1;
            end
            U3_CTRL_SETUP:
              if (step == 2'd0) step <= 2'd1;
              else if (step == 2'd1) begin
                setup_pkt <= {setup_pkt[47:0], op_rd};
                cnt <= cnt + 1'b1;
                if (cnt == 12'd3) step <= 2'd2;
              end else st <= U10_WAIT_ACK;     // setup packet received
            U4_OUT_SETUP: st <= U6_WAIT_ACK;
            U5_IN_SETUP:  st <= U9_WAIT_ACK;
            U6_WAIT_ACK, U9_WAIT_ACK, U10_WAIT_ACK: begin
              if (mtype == MB_ACK) begin       // transfer complete
                step <= '0;
                cnt  <= '0;
                if (st == U6_WAIT_ACK)      st <= U7_READ_OUT;
                else if (st == U9_WAIT_ACK) st <= U8_WRITE_IN;
                else begin
                  setup_valid <= 1'b1;
                  st <= U2_WAIT_INT;
                end
              end else bad_msgs <= bad_msgs + 1'b1;
            end
            U7_READ_OUT:
              if (step == 2'd0) begin
                step <= 2'd1;
                if (len == '0) st <= U2_WAIT_INT;
              end else begin
                cmd_valid <= 1'b1;
                cmd       <= op_rd;
                cnt       <= cnt + 1'b1;
                if (cnt + 1'b1 == len) st <= U2_WAIT_INT;  // reading complete
              end
            U8_WRITE_IN:
              if (step == 2'd0) step <= 2'd1;
              else if (step == 2'd1) begin
                cnt <= cnt + 1'b1;
              end else st <= U2_WAIT_INT;      // writing complete
            default: st <= U0_IDLE;
          endcase
        end
      end else begin
        // --------------------------------------------- start an access
        unique case (st)
          U0_IDLE:      st <= U1_CONFIG;
          U1_CONFIG:    issue(1'b1, HPI_MAILBOX, {MB_CONFIG, 12'd0});
          U2_WAIT_INT, U6_WAIT_ACK, U9_WAIT_ACK, U10_WAIT_ACK:
            if (hpi_int) issue(1'b0, HPI_MAILBOX, 16'h0000);
          U3_CTRL_SETUP:
            if (step == 2'd0)      issue(1'b1, HPI_ADDR, EP0_BUF);
            else if (step == 2'd1) issue(1'b0, HPI_DATA, 16'h0000);
            else                   issue(1'b1, HPI_MAILBOX, {MB_SETUP_RX, 12'd4});
          U4_OUT_SETUP: issue(1'b1, HPI_MAILBOX, {MB_OUT_RX, len});
          U5_IN_SETUP:  issue(1'b1, HPI_MAILBOX, {MB_IN_RX, len});
          U7_READ_OUT:
            if (step == 2'd0) issue(1'b1, HPI_ADDR, EP1_BUF);
            else              issue(1'b0, HPI_DATA, 16'h0000);
          U8_WRITE_IN:
            if (step == 2'd0)      issue(1'b1, HPI_ADDR, EP2_BUF);
            else if (step == 2'd1) begin
              if (cnt == len) step <= 2'd2;
              else issue(1'b1, HPI_DATA, in_valid ? in_data : 16'h0000);
            end else               issue(1'b1, HPI_MAILBOX, {MB_IN_DONE, len});
          default: st <= U0_IDLE;
        endcase
      end
    end
  end

  // An HPI access is never requested while the controller is not configured
  // except the configuration message itself.
  assert property (@(posedge clk) disable iff (rst)
                   (op_req && !configured) |-> st == U1_CONFIG);
endmodule
