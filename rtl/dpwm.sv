// dpwm: hybrid counter / delay-line digital pulse-width modulator.
//
// Produces a constant-frequency PWM with DPWM_BITS bits of duty resolution
// from a CNT_BITS-bit counter (coarse bits dn[DPWM_BITS-1:DL_BITS]) and a
// 2^DL_BITS-tap clocked delay line (fine bits dn[DL_BITS-1:0]). The switching
// period is 2^CNT_BITS dpwm_clk periods = 2^DPWM_BITS delay_line_clk periods,
// and the on-time is exactly dn delay_line_clk periods (dn = 0 gives no
// pulse). Structure, following the block diagram:
//   counter_7bits   -> period count and syn
//   comparator_7bits-> is_zero (period start), is_high (coarse match)
//   delay_line      -> is_high delayed by 0..7 fine steps
//   mux8to1         -> tap selected by the fine bits
//   output stage    -> set_pwm / reset_pwm held in latch_out
// A strobe, high for the first delay_line_clk period after each rising edge
// of dpwm_clk, gates is_zero into set_pwm and is_high into the delay line,
// so both become one-fine-step pulses. The pulse reaches the selected tap
// exactly dn[2:0] fine steps after the coarse match and resets latch_out
// (reset wins, which gives dn = 0 no pulse). Working with single pulses
// keeps each period independent of the previous one, including a coarse
// match at count 127 followed by one at count 0. The duty command is copied
// into a shadow register at the last count of each period so that a new dn
// never changes a period already under way. The strobe, the pulse form and
// the shadow register are this design's choices; the block diagram shows
// the signals but not the gate types.
//
// Timing: delay_line_clk must be 2^DL_BITS times dpwm_clk and in phase with
// it (as fre_divider makes them). dpwm_out rises one delay_line_clk after
// the counter reaches zero. n_rst is asynchronous and active low.
module dpwm #(
  parameter int DPWM_BITS = 10,
  parameter int DL_BITS   = 3
) (
  input  logic                 dpwm_clk,
  input  logic                 delay_line_clk,
  input  logic                 n_rst,
  input  logic [DPWM_BITS-1:0] dn,
  output logic                 dpwm_out,
  output logic                 syn
);

  localparam int CNT_BITS = DPWM_BITS - DL_BITS;
  localparam int TAPS     = 1 << DL_BITS;

  logic [CNT_BITS-1:0]  cnt;
  logic [DPWM_BITS-1:0] dn_q;
  logic                 is_zero, is_high, clear_delay_line;
  logic [TAPS-1:0]      delay_vec;
  logic                 mux_delay_out;
  logic                 dpwm_clk_d, strobe, is_high_pulse;
  logic                 set_pwm, reset_pwm, latch_out;

  counter_7bits #(.CNT_BITS(CNT_BITS)) u_counter (
    .dpwm_clk, .n_rst, .counter_7bits_out(cnt), .syn
  );

  // Shadow copy of the duty command, loaded for the next period.
  always_ff @(posedge dpwm_clk or negedge n_rst) begin
    if (!n_rst)         dn_q <= '0;
    else if (&cnt)      dn_q <= dn;
  end

  comparator_7bits #(.CNT_BITS(CNT_BITS)) u_comparator (
    .cnt, .dn_hi(dn_q[DPWM_BITS-1:DL_BITS]), .n_rst,
    .is_zero, .is_high, .clear_delay_line
  );

  delay_line #(.TAPS(TAPS)) u_delay_line (
    .delay_line_clk, .clear_delay_line, .is_high(is_high_pulse), .delay_vec
  );

  mux8to1 #(.TAPS(TAPS)) u_mux (
    .delay_vec, .sel(dn_q[DL_BITS-1:0]), .mux_delay_out
  );

  // First fine step of every counter step.
  always_ff @(posedge delay_line_clk or negedge n_rst) begin
    if (!n_rst) dpwm_clk_d <= 1'b0;
    else        dpwm_clk_d <= dpwm_clk;
  end

  assign strobe        = dpwm_clk && !dpwm_clk_d;
  assign is_high_pulse = is_high && strobe;
  assign set_pwm       = is_zero && strobe;
  assign reset_pwm     = mux_delay_out;

  always_ff @(posedge delay_line_clk or negedge n_rst) begin
    if (!n_rst) begin
      latch_out <= 1'b0;
    end else begin
      if (reset_pwm)    latch_out <= 1'b0;
      else if (set_pwm) latch_out <= 1'b1;
    end
  end

  assign dpwm_out = latch_out;

  // Set and reset meet only for a zero duty command; anything else would
  // mean a pulse from one period leaking into the next.
  a_set_reset_apart: assert property (
    @(posedge delay_line_clk) disable iff (!n_rst)
      (set_pwm && reset_pwm) |-> (dn_q == '0)
  ) else $error("dpwm: set and reset coincide with dn = %0d", dn_q);

endmodule
