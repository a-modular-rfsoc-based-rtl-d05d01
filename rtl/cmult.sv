// Registered complex multiplier for 16-bit fixed-point I/Q samples.
//
// y = (a * b) >> SHIFT with saturation to 16 bits; with b = conj_b the
// second operand is conjugated (used for down-conversion, where the signal
// is multiplied by the oscillation of negative carrier frequency).
// One cycle of latency. SHIFT = 15 treats both operands as Q1.15.
// The document names the complex multiplier; its fixed-point scaling, rounding
// and saturation are this design's choices.
module cmult
  import qc_pkg::*;
#(
  parameter int SHIFT = 15
) (
  input  logic clk,
  input  logic conj_b,
  input  iq_t  a,
  input  iq_t  b,
  output iq_t  y
);

  logic signed [47:0] re, im;
  logic signed [15:0] bq;

  always_comb begin
    bq = conj_b ? 16'(-b.q) : b.q;
    re = 48'(a.i) * 48'(b.i) - 48'(a.q) * 48'(bq);
    im = 48'(a.i) * 48'(bq) + 48'(a.q) * 48'(b.i);
  end

  always_ff @(posedge clk) begin
    y.i <= sat16(re >>> SHIFT);
    y.q <= sat16(im >>> SHIFT);
  end

endmodule
