// fre_divider: clock generation for the MA-PID controller.
//
// A free-running binary counter on the fast input clock produces every
// clock the rest of the design uses. The fast clock itself drives the DPWM
// delay line (delay_line_clk). The DPWM period counter runs at
// dpwm_clk = clk / 2^DL_BITS, so the 2^DL_BITS delay-line taps split one
// counter step into equal fine steps. One switching period is
// 2^(CNT_BITS+DL_BITS) fast clocks; clk1, clk2, clk4 and clk8 are 1, 2, 4
// and 8 times the switching frequency, and clk1 is the sample clock of the
// compensator. The names of the outputs come from the controller's block
// diagram; the ratios are this design's choice (the diagram gives none).
//
// Timing: each divided clock is a counter bit, so it has a 50 % duty cycle
// and its rising edge follows a rising edge of clk. n_rst is asynchronous
// and active low; while it is low all divided clocks are held low.
module fre_divider #(
  parameter int DL_BITS  = 3,  // fine DPWM bits (delay-line taps = 2^DL_BITS)
  parameter int CNT_BITS = 7   // coarse DPWM bits (period counter width)
) (
  input  logic clk,
  input  logic n_rst,
  output logic clk1,
  output logic clk2,
  output logic clk4,
  output logic clk8,
  output logic dpwm_clk,
  output logic delay_line_clk
);

  localparam int W = CNT_BITS + DL_BITS;

  logic [W-1:0] div_cnt;

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) div_cnt <= '0;
    else        div_cnt <= div_cnt + 1'b1;
  end

  assign delay_line_clk = clk;
  assign dpwm_clk       = div_cnt[DL_BITS-1];
  assign clk8           = div_cnt[W-4];
  assign clk4           = div_cnt[W-3];
  assign clk2           = div_cnt[W-2];
  assign clk1           = div_cnt[W-1];

endmodule
