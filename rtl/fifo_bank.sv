// fifo_bank: the receiver's bank of range-gate FIFOs.
//
// NUM_BANKS x FIFOS_PER_BANK FIFOs (4 x 16 = 64), each DEPTH words (1024) of
// WIDTH bits (64: 32-bit I and 32-bit Q). FIFO n holds the samples of range
// gate n, one per pulse, so a full FIFO is 1024 pulses of one gate.
// Write side: `wr_en` with the FIFO number `wr_sel` (from the TCSG's range
// gate counter). Read side: the FIFO is chosen by the bank select lines
// `rd_bank` and the FIFO select lines `rd_fifo`; `rd_en` pops one word,
// which appears on `rd_data` one clock later with `rd_valid`. A write to a
// full FIFO is dropped and sets its bit in `overflow`; a read of an empty
// FIFO is ignored. `clear` empties every FIFO and clears `overflow`.
// Sizes and the bank/select organisation follow the receiver description.
// Sharing one memory array (address = {FIFO number, pointer}) among all
// FIFOs, with one write and one read per clock, is this design's choice:
// the TCSG writes only one gate per sample pulse and the host reads one
// FIFO at a time.
module fifo_bank #(
  parameter int unsigned NUM_BANKS      = 4,
  parameter int unsigned FIFOS_PER_BANK = 16,
  parameter int unsigned DEPTH          = 1024,
  parameter int unsigned WIDTH          = 64,
  localparam int unsigned NF  = NUM_BANKS * FIFOS_PER_BANK,
  localparam int unsigned FW  = $clog2(NF),
  localparam int unsigned BW  = $clog2(NUM_BANKS),
  localparam int unsigned SW  = $clog2(FIFOS_PER_BANK),
  localparam int unsigned AW  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [FW-1:0]    wr_sel,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [BW-1:0]    rd_bank,
  input  logic [SW-1:0]    rd_fifo,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             rd_empty,   // selected FIFO is empty
  output logic [AW:0]      rd_count,   // words in the selected FIFO
  output logic [NF-1:0]    full,
  output logic [NF-1:0]    overflow
);
  logic [WIDTH-1:0] mem [NF * DEPTH];
  logic [AW:0]      wptr [NF];
  logic [AW:0]      rptr [NF];
  logic [FW-1:0]    rsel;
  logic             do_wr, do_rd;

  always_comb begin
    rsel = FW'({rd_bank, rd_fifo});
    for (int n = 0; n < NF; n++)
      full[n] = (wptr[n] - rptr[n]) == (AW + 1)'(DEPTH);
    rd_count = wptr[rsel] - rptr[rsel];
    rd_empty = (rd_count == '0);
    do_wr    = wr_en && !full[wr_sel];
    do_rd    = rd_en && !rd_empty;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[{wr_sel, wptr[wr_sel][AW-1:0]}] <= wr_data;
    if (do_rd) rd_data <= mem[{rsel, rptr[rsel][AW-1:0]}];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int n = 0; n < NF; n++) begin
        wptr[n] <= '0;
        rptr[n] <= '0;
      end
      overflow <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr[wr_sel] <= wptr[wr_sel] + 1'b1;
      if (wr_en && full[wr_sel]) overflow[wr_sel] <= 1'b1;
      if (do_rd) rptr[rsel] <= rptr[rsel] + 1'b1;
    end
  end
endmodule
