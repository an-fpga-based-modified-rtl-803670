// counter_7bits: period counter of the hybrid DPWM.
//
// A free-running CNT_BITS-bit up-counter on dpwm_clk; one full count is one
// switching period. syn is high while the count is zero and marks the start
// of each period (used by the DPWM to load a new duty command and as the
// period sync output). The meaning of syn is this design's reading of the
// block diagram, which only names it.
//
// Timing: the count advances on every rising edge of dpwm_clk; syn is
// combinational from the count. Reset (asynchronous, active low) clears it.
module counter_7bits #(
  parameter int CNT_BITS = 7
) (
  input  logic                dpwm_clk,
  input  logic                n_rst,
  output logic [CNT_BITS-1:0] counter_7bits_out,
  output logic                syn
);

  always_ff @(posedge dpwm_clk or negedge n_rst) begin
    if (!n_rst) counter_7bits_out <= '0;
    else        counter_7bits_out <= counter_7bits_out + 1'b1;
  end

  assign syn = (counter_7bits_out == '0);

endmodule
