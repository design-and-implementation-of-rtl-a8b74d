// tc_counter: up-counter with a run-time terminal count.
//
// The TCSG builds its PRF, pulse-width, window-start and range-gate counters
// from this one module. While `en` is high the count advances by one per
// clock and wraps to zero after reaching term-1; `tc` is high during the
// cycle in which the count equals term-1 and `en` is high, i.e. the cycle of
// the wrap. `clear` has priority and zeroes the count on the next edge.
// A term of 0 is treated as 1 (tc every enabled cycle). Reset is
// synchronous and active high.
module tc_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] term,
  output logic [W-1:0] count,
  output logic         tc
);
  logic [W-1:0] last;

  always_comb begin
    last = (term == '0) ? '0 : term - 1'b1;
    tc   = en && (count == last);
  end

  always_ff @(posedge clk) begin
    if (rst || clear)  count <= '0;
    else if (en)       count <= (count == last) ? '0 : count + 1'b1;
  end
endmodule
