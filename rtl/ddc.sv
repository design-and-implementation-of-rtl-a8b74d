// ddc: digital down converter.
//
// Two multipliers mix the 14-bit ADC sample with the DDS cosine and sine
// (18 bit each) into 32-bit in-phase and quadrature products. The low-pass
// filter and down-sampler is an accumulator (integrate and dump): while
// `acc_en` is high the products are summed; a `dump` pulse (the TCSG's
// sample pulse, one per range gate) outputs the sum including the current
// product, shifted right by SHIFT bits and cut to OUT_W bits, and restarts
// the sum from zero. With SHIFT = 13 a 20 us gate at 245.76 MHz (4915
// products) cannot overflow the 32-bit outputs.
// Mixer widths follow the receiver description; the accumulator width, the
// scaling and the register stage after the multipliers are this design's.
// Timing: one register after the multipliers, so a dump pulse closes the sum
// of the products of the samples up to one clock before it; i_o/q_o and
// `valid` appear one clock after `dump`.
module ddc #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned LO_W  = 18,
  parameter int unsigned OUT_W = 32,
  parameter int unsigned ACC_W = 48,
  parameter int unsigned SHIFT = 13
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  adc,
  input  logic signed [LO_W-1:0]  lo_cos,
  input  logic signed [LO_W-1:0]  lo_sin,
  input  logic                    acc_en,
  input  logic                    dump,
  output logic signed [OUT_W-1:0] i_o,
  output logic signed [OUT_W-1:0] q_o,
  output logic                    valid
);
  localparam int unsigned PW = IN_W + LO_W;

  logic signed [PW-1:0]    pi, pq;
  logic signed [ACC_W-1:0] acc_i, acc_q, sum_i, sum_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pi <= '0;
      pq <= '0;
    end else begin
      pi <= adc * lo_cos;
      pq <= adc * lo_sin;
    end
  end

  always_comb begin
    sum_i = acc_i + ACC_W'(pi);
    sum_q = acc_q + ACC_W'(pq);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i <= '0;
      acc_q <= '0;
      i_o   <= '0;
      q_o   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= dump;
      if (dump) begin
        i_o   <= OUT_W'(sum_i >>> SHIFT);
        q_o   <= OUT_W'(sum_q >>> SHIFT);
        acc_i <= '0;
        acc_q <= '0;
      end else if (acc_en) begin
        acc_i <= sum_i;
        acc_q <= sum_q;
      end
    end
  end
endmodule
