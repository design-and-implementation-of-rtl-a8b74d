// ws_rom: window-start ROM of the TCSG.
//
// Maps the 8-bit window-start setting to the number of clock cycles from the
// start of the pulse repetition time (start of the T/R pulse) to the opening
// of the receive window. The table is filled at elaboration by the formula
//   count(code) = code * STEP_NS ns * CLK_KHZ / 10^6   (truncated),
// i.e. a 10 us grid (half a 20 us range gate) by default, 0 .. 2550 us,
// enough for E-region (about 540 us) and F-region (about 2.4 ms) windows;
// code 54 gives 540 us.
// The ROM's existence comes from the TCSG block diagram; its contents and
// step are this design's choice. The output is registered: one cycle of
// latency.
module ws_rom
  import hf_radar_pkg::*;
#(
  parameter int unsigned CLK_KHZ = 245760,
  parameter int unsigned STEP_NS = 10000,
  parameter int unsigned W       = 24
) (
  input  logic         clk,
  input  logic [7:0]   code,
  output logic [W-1:0] count
);
  typedef logic [W-1:0] rom_t [256];

  function automatic rom_t fill();
    rom_t r;
    for (int i = 0; i < 256; i++)
      r[i] = W'(ns_to_clk(longint'(i) * STEP_NS, CLK_KHZ));
    return r;
  endfunction

  localparam rom_t ROM = fill();

  always_ff @(posedge clk) count <= ROM[code];
endmodule
