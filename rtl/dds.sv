// dds: direct digital synthesizer giving the receiver's local oscillator.
//
// A PHASE_W-bit phase accumulator advances by the run-time tuning word
// `ftw` every clock; f_out = ftw * f_clk / 2^PHASE_W. Its top ANGLE_W bits
// (the phase angle) are turned into a sine and a cosine of OUT_W bits by a
// pipelined CORDIC in rotation mode, so no sine table is stored.
// The angle is first folded into [-pi/2, pi/2) (quadrants 1 and 2 are
// rotated by pi and the results negated), then STAGES micro-rotations by
// atan(2^-i) run one per clock (19 by default). The start vector is AMP/K on the x axis,
// K = 1.64676 being the CORDIC gain, so the outputs peak near AMP.
// Output widths (18 bit), phase width (30 bit) and angle width (16 bit) are
// the radar's DDS settings; the CORDIC, AMP and the 20-bit internal angle
// are this design's choices. With a 245.76 MHz clock one tuning-word LSB is
// 0.229 Hz and ftw = 79080107 gives 18.1 MHz.
// Timing: sin_o/cos_o follow the phase by STAGES+2 clocks; full throughput.
module dds #(
  parameter int unsigned PHASE_W = 30,
  parameter int unsigned ANGLE_W = 16,
  parameter int unsigned OUT_W   = 18,
  parameter int unsigned STAGES  = 19,
  parameter int          AMP     = 131000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PHASE_W-1:0]      ftw,
  output logic [ANGLE_W-1:0]      angle,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);
  localparam int ZW = 20;            // internal angle: 2^ZW = one turn
  localparam int G  = 3;             // guard bits below the output LSB
  localparam int XW = OUT_W + G + 2; // internal vector width
  // atan(2^-i) / (2*pi) * 2^20, rounded, i = 0..19
  localparam int ATAN [20] = '{131072, 77376, 40884, 20753, 10417, 5213,
                               2607, 1304, 652, 326, 163, 81, 41, 20, 10,
                               5, 3, 1, 1, 0};
  localparam int X0 = int'(real'(AMP) / 1.6467602581);

  logic [PHASE_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + ftw;
  end
  assign angle = acc[PHASE_W-1 -: ANGLE_W];

  logic signed [XW-1:0] x [STAGES+1];
  logic signed [XW-1:0] y [STAGES+1];
  logic signed [ZW-1:0] z [STAGES+1];
  logic                 neg [STAGES+1];

  // Fold into the right half plane.
  always_ff @(posedge clk) begin
    logic [ANGLE_W-1:0] a;
    a = angle;
    neg[0] <= a[ANGLE_W-1] ^ a[ANGLE_W-2];
    if (a[ANGLE_W-1] ^ a[ANGLE_W-2]) a[ANGLE_W-1] = ~a[ANGLE_W-1];
    z[0] <= ZW'(signed'(a)) <<< (ZW - ANGLE_W);
    x[0] <= XW'(X0) <<< G;
    y[0] <= '0;
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      neg[i+1] <= neg[i];
      if (!z[i][ZW-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ZW'(ATAN[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ZW'(ATAN[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    cos_o <= OUT_W'((neg[STAGES] ? -x[STAGES] : x[STAGES]) + XW'(1 << (G - 1)) >>> G);
    sin_o <= OUT_W'((neg[STAGES] ? -y[STAGES] : y[STAGES]) + XW'(1 << (G - 1)) >>> G);
  end

  initial assert (STAGES <= 20) else $error("dds: at most 20 CORDIC stages");
endmodule
