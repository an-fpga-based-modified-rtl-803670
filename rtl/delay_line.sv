// delay_line: clocked tapped delay line of the hybrid DPWM.
//
// In the DPWM, is_high arrives here as a single pulse one fine step long.
// Tap 0 of delay_vec is is_high itself; tap j (j = 1..TAPS-1) is is_high
// delayed by j periods of delay_line_clk, which runs TAPS times faster than
// the DPWM counter. Selecting tap j therefore moves the end of the on-time
// by j fine steps inside one counter step. clear_delay_line empties the
// stages.
//
// Timing: stage j-1 -> j on each rising edge of delay_line_clk; the clear is
// synchronous.
module delay_line #(
  parameter int TAPS = 8
) (
  input  logic            delay_line_clk,
  input  logic            clear_delay_line,
  input  logic            is_high,
  output logic [TAPS-1:0] delay_vec
);

  logic [TAPS-1:1] stage;

  always_ff @(posedge delay_line_clk) begin
    if (clear_delay_line) stage <= '0;
    else                  stage <= {stage[TAPS-2:1], is_high};
  end

  assign delay_vec = {stage, is_high};

endmodule
