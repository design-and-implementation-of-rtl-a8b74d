// hpi_master: one read or write cycle on the host port interface (HPI) of
// a CY7C67300 USB controller.
//
// `req` with `we`, `addr` (00 data, 01 mailbox, 10 address, 11 status) and
// `wdata` starts a cycle when the port is idle: chip select and the read
// or write strobe go low for STROBE clocks (the write data is driven for the
// whole strobe), read data is sampled in the strobe's last clock, then all
// strobes are high for one recovery clock, during which `done` pulses and
// `rdata` is valid. The requester drops `req` when it sees `done`.
// The strobe length is a parameter because the required HPI timing depends
// on the clock; the default of 4 clocks (16 ns at 245.76 MHz) is this
// design's choice.
module hpi_master #(
  parameter int unsigned STROBE = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [1:0]  addr,
  input  logic [15:0] wdata,
  output logic        done,
  output logic [15:0] rdata,
  // HPI pins
  output logic [1:0]  hpi_a,
  output logic        hpi_cs_n,
  output logic        hpi_rd_n,
  output logic        hpi_wr_n,
  output logic [15:0] hpi_d_o,
  output logic        hpi_d_oe,
  input  logic [15:0] hpi_d_i
);
  typedef enum logic [1:0] {HM_IDLE, HM_STROBE, HM_RECOVER} hm_state_t;
  hm_state_t st;
  logic [$clog2(STROBE+1)-1:0] cnt;
  logic we_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= HM_IDLE;
      cnt      <= '0;
      we_q     <= 1'b0;
      hpi_a    <= '0;
      hpi_d_o  <= '0;
      rdata    <= '0;
    end else begin
      unique case (st)
        HM_IDLE: if (req) begin
          st      <= HM_STROBE;
          cnt     <= '0;
          we_q    <= we;
          hpi_a   <= addr;
          hpi_d_o <= wdata;
        end
        HM_STROBE: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(STROBE - 1)) begin
            if (!we_q) rdata <= hpi_d_i;
            st <= HM_RECOVER;
          end
        end
        HM_RECOVER: st <= HM_IDLE;
        default:    st <= HM_IDLE;
      endcase
    end
  end

  always_comb begin
    hpi_cs_n = (st != HM_STROBE);
    hpi_rd_n = !(st == HM_STROBE && !we_q);
    hpi_wr_n = !(st == HM_STROBE && we_q);
    hpi_d_oe = (st == HM_STROBE) && we_q;
    done     = (st == HM_RECOVER);
  end
endmodule
