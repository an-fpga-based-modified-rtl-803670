// comparator_7bits: coarse comparator of the hybrid DPWM.
//
// Compares the period counter with the coarse duty bits dn[9:3]:
// is_zero is high while the count is zero (start of the on-time) and
// is_high while the count equals the coarse duty (start of the fine
// interval handled by the delay line). While reset is asserted both are
// held low and clear_delay_line empties the delay line. Using
// clear_delay_line only during reset is this design's choice.
//
// Timing: purely combinational.
module comparator_7bits #(
  parameter int CNT_BITS = 7
) (
  input  logic [CNT_BITS-1:0] cnt,
  input  logic [CNT_BITS-1:0] dn_hi,
  input  logic                n_rst,
  output logic                is_zero,
  output logic                is_high,
  output logic                clear_delay_line
);

  always_comb begin
    is_zero          = n_rst && (cnt == '0);
    is_high          = n_rst && (cnt == dn_hi);
    clear_delay_line = !n_rst;
  end

endmodule
