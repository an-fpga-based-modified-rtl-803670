// mux8to1: fine-step selector of the hybrid DPWM.
//
// Returns delay-line tap sel (the fine duty bits dn[2:0]) as
// mux_delay_out. Timing: purely combinational.
module mux8to1 #(
  parameter int TAPS = 8
) (
  input  logic [TAPS-1:0]         delay_vec,
  input  logic [$clog2(TAPS)-1:0] sel,
  output logic                    mux_delay_out
);

  assign mux_delay_out = delay_vec[sel];

endmodule
