// cy7c67300_model: behavioural model of the HPI side of a Cypress
// CY7C67300 USB controller running this receiver's firmware protocol.
// Not synthesizable; testbench use only.
//
// HPI registers: 00 data (memory at the address register, auto-increment
// after each access), 01 mailbox, 10 address, 11 status (reads 0). A read
// or write takes effect when its strobe rises. Mailbox messages for the
// FPGA wait in a queue; hpi_int is high while the queue is not empty and a
// mailbox read takes the oldest one. Messages from the FPGA are answered
// as the firmware would: MB_SETUP_RX, MB_OUT_RX and MB_IN_RX get an MB_ACK
// (transfer complete) ACK_DELAY clocks later; MB_CONFIG and MB_IN_DONE are
// recorded. Host-side tasks stand for the PC: send a control setup, send
// OUT data (command words) and ask for IN data.
module cy7c67300_model
  import hf_radar_pkg::*;
#(
  parameter int ACK_DELAY = 20,
  parameter logic [15:0] EP0_BUF = 16'h0500,
  parameter logic [15:0] EP1_BUF = 16'h0600,
  parameter logic [15:0] EP2_BUF = 16'h0700
) (
  input  logic        clk,
  input  logic [1:0]  hpi_a,
  input  logic        hpi_cs_n,
  input  logic        hpi_rd_n,
  input  logic        hpi_wr_n,
  input  logic [15:0] hpi_d_o,
  input  logic        hpi_d_oe,
  output logic [15:0] hpi_d_i,
  output logic        hpi_int
);
  logic [15:0] mem [65536];
  logic [15:0] addr = 0;
  logic [15:0] to_fpga [$];
  logic [15:0] from_fpga [$];
  int          ack_timer = -1;
  logic        rd_q = 1, wr_q = 1;
  logic [1:0]  a_q;
  logic [15:0] d_q;
  int          n_config = 0, n_in_done = 0, n_acks = 0, protocol_errors = 0;

  assign hpi_int = (to_fpga.size() != 0);

  always_comb begin
    unique case (hpi_a)
      HPI_DATA:    hpi_d_i = mem[addr];
      HPI_MAILBOX: hpi_d_i = (to_fpga.size() != 0) ? to_fpga[0] : 16'h0000;
      HPI_ADDR:    hpi_d_i = addr;
      default:     hpi_d_i = 16'h0000;
    endcase
  end

  always @(posedge clk) begin
    rd_q <= hpi_cs_n | hpi_rd_n;
    wr_q <= hpi_cs_n | hpi_wr_n;
    a_q  <= hpi_a;
    d_q  <= hpi_d_o;
    if (!(hpi_cs_n | hpi_wr_n) && !hpi_d_oe) protocol_errors++;
    // end of a read strobe
    if (!rd_q && (hpi_cs_n | hpi_rd_n)) begin
      if (a_q == HPI_DATA) addr <= addr + 1'b1;
      if (a_q == HPI_MAILBOX && to_fpga.size() != 0) void'(to_fpga.pop_front());
    end
    // end of a write strobe
    if (!wr_q && (hpi_cs_n | hpi_wr_n)) begin
      unique case (a_q)
        HPI_DATA:    begin mem[addr] <= d_q; addr <= addr + 1'b1; end
        HPI_ADDR:    addr <= d_q;
        HPI_MAILBOX: begin
          from_fpga.push_back(d_q);
          case (d_q[15:12])
            MB_CONFIG:  n_config++;
            MB_IN_DONE: n_in_done++;
            MB_SETUP_RX, MB_OUT_RX, MB_IN_RX: ack_timer <= ACK_DELAY;
            default: protocol_errors++;
          endcase
        end
        default: ;
      endcase
    end
    if (ack_timer > 0) ack_timer <= ack_timer - 1;
    else if (ack_timer == 0) begin
      to_fpga.push_back({MB_ACK, 12'd0});
      n_acks++;
      ack_timer <= -1;
    end
  end

  // ------------------------------------------------------ host side
  task automatic wait_configured();
    while (n_config == 0) @(posedge clk);
  endtask

  task automatic host_setup(input logic [63:0] pkt);
    for (int k = 0; k < 4; k++) mem[EP0_BUF + 16'(k)] = pkt[63 - 16*k -: 16];
    to_fpga.push_back({MB_EP0_SETUP, 12'd4});
  endtask

  task automatic host_out(input logic [15:0] words [$]);
    for (int k = 0; k < words.size(); k++) mem[EP1_BUF + 16'(k)] = words[k];
    to_fpga.push_back({MB_EP1_OUT, 12'(words.size())});
  endtask

  // Ask for n IN words and wait until the FPGA has written them.
  task automatic host_in(input int n, output logic [15:0] words [$]);
    int done0;
    done0 = n_in_done;
    to_fpga.push_back({MB_EP2_IN, 12'(n)});
    while (n_in_done == done0) @(posedge clk);
    words.delete();
    for (int k = 0; k < n; k++) words.push_back(mem[EP2_BUF + 16'(k)]);
  endtask
endmodule
