// d_correction: sign correction and summation of the PID increment.
//
// Takes the three unsigned coefficient products a|e(k)|, |b||e(k-1)|,
// c|e(k-2)| and the sign bits of the three error samples and returns the
// signed duty increment
//   delta_d = a e(k) + b e(k-1) + c e(k-2),  with a, c > 0 and b < 0,
// i.e. the first and last products take their error's sign and the middle
// one the opposite sign. The result carries the accumulator's FRAC
// fractional bits and is three bits wider than a product: a sign bit plus
// room for the sum of three full-scale products.
//
// Timing: purely combinational.
module d_correction #(
  parameter int PW = 26   // product width (COEF_W + ADC_BITS)
) (
  input  logic [PW-1:0]        aen,
  input  logic [PW-1:0]        ben1,
  input  logic [PW-1:0]        cen2,
  input  logic                 en_sign,
  input  logic                 en_sign1,
  input  logic                 en_sign2,
  output logic signed [PW+2:0] delta_d
);

  logic signed [PW+2:0] ta, tb, tc;

  always_comb begin
    ta = $signed({3'b000, aen});
    tb = $signed({3'b000, ben1});
    tc = $signed({3'b000, cen2});
    if (en_sign)   ta = -ta;
    if (!en_sign1) tb = -tb;   // b is negative: a positive e(k-1) subtracts
    if (en_sign2)  tc = -tc;
    delta_d = ta + tb + tc;
  end

endmodule
