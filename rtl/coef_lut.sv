// coef_lut: coefficient products of the incremental PID ("LUT" block).
//
// Expanding u(k) = u(k-1) + Kp[e(k)-e(k-1)] + Ki e(k) + Kd[e(k)-2e(k-1)+e(k-2)]
// gives u(k) = u(k-1) + a e(k) + b e(k-1) + c e(k-2) with
//   a = Kp + Ki + Kd,   b = -(Kp + 2 Kd),   c = Kd.
// This block forms the three unsigned products a|e(k)|, |b||e(k-1)| and
// c|e(k-2)| from the error magnitudes; the signs are applied downstream.
// The controller this follows calls the block a look-up table. Because the
// MA-PID gains change from sample to sample, the products here are computed
// by multipliers from the current effective gains rather than read from a
// stored table; for fixed gains the two are equivalent.
//
// Timing: purely combinational.
module coef_lut
  import mapid_pkg::*;
#(
  parameter int ADC_BITS = 8
) (
  input  logic [ADC_BITS-1:0]        en,
  input  logic [ADC_BITS-1:0]        en1,
  input  logic [ADC_BITS-1:0]        en2,
  input  logic [GAIN_W-1:0]          kp,
  input  logic [GAIN_W-1:0]          ki,
  input  logic [GAIN_W-1:0]          kd,
  output logic [COEF_W+ADC_BITS-1:0] aen,
  output logic [COEF_W+ADC_BITS-1:0] ben1,
  output logic [COEF_W+ADC_BITS-1:0] cen2
);

  localparam int PW = COEF_W + ADC_BITS;

  logic [COEF_W-1:0] coef_a, coef_b, coef_c;

  always_comb begin
    coef_a = COEF_W'(kp) + COEF_W'(ki) + COEF_W'(kd);
    coef_b = COEF_W'(kp) + (COEF_W'(kd) << 1);
    coef_c = COEF_W'(kd);
    aen    = PW'(coef_a) * PW'(en);
    ben1   = PW'(coef_b) * PW'(en1);
    cen2   = PW'(coef_c) * PW'(en2);
  end

endmodule
