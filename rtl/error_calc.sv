// error_calc: error sampling and history ("error" block of the compensator).
//
// It forms the current error e(k) = vref - vo from the ADC code of the
// output voltage and the reference code, and on every rising edge of the
// sample clock clk1 stores it as e(k-1) and moves the old e(k-1) to
// e(k-2). All three are presented as a magnitude (en, en1, en2) and a sign
// bit (en_sign*, 1 = negative), the form the coefficient products and the
// sign correction downstream expect. Because both codes are ADC_BITS wide
// the magnitude always fits ADC_BITS bits.
//
// Timing: en/en_sign are combinational from vo and vref, so the value at a
// clk1 rising edge is the sample consumed at that edge; en1, en2 and their
// signs are registered. Reset (asynchronous, active low) clears the history
// to zero, as the PID initialisation requires. The sign convention
// (positive when the output is below the reference) is this design's
// choice.
module error_calc #(
  parameter int ADC_BITS = 8
) (
  input  logic                clk1,
  input  logic                n_rst,
  input  logic [ADC_BITS-1:0] vo,
  input  logic [ADC_BITS-1:0] vref,
  output logic [ADC_BITS-1:0] en,
  output logic [ADC_BITS-1:0] en1,
  output logic [ADC_BITS-1:0] en2,
  output logic                en_sign,
  output logic                en_sign1,
  output logic                en_sign2
);

  logic                neg;
  logic [ADC_BITS-1:0] mag;

  always_comb begin
    neg     = (vo > vref);
    mag     = neg ? (vo - vref) : (vref - vo);
    en      = mag;
    en_sign = neg;
  end

  always_ff @(posedge clk1 or negedge n_rst) begin
    if (!n_rst) begin
      en1      <= '0;
      en2      <= '0;
      en_sign1 <= 1'b0;
      en_sign2 <= 1'b0;
    end else begin
      en2      <= en1;
      en_sign2 <= en_sign1;
      en1      <= mag;
      en_sign1 <= neg;
    end
  end

endmodule
