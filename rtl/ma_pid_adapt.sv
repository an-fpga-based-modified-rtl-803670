// ma_pid_adapt: gain adaptation of the modified adaptive PID (MA-PID).
//
// For the current error sample e(k) (magnitude en, sign en_sign) and the
// previous one e(k-1) it selects the extra gains alpha, beta, gamma that are
// added to the steady-state gains Kp, Ki, Kd:
//   |e(k)| <  VTHR                     steady:     alpha = beta = gamma = 0
//   otherwise gamma = DKD and
//   e(k), e(k-1) of opposite sign      transition: alpha = DKP2, beta = DKI2
//   |e(k-1)| > |e(k)|                  falling:    alpha = DKP*|e|/|peak|,
//                                                  beta  = DKI*|e|/|peak|
//   else                               rising:     alpha = DKP, beta = DKI,
//                                                  peak <= |e(k)|
// The checks are made in that order. The peak register holds the largest
// error of the present excursion; the ratio |e|/|peak| is formed as a Q8
// fraction by one integer division and clamped to 1. Effective gains below
// zero are clamped to zero (they cannot occur with the default values).
//
// The rules, their order and the parameter values follow the MA-PID
// algorithm; the integer scaling, the clamping and a strict sign-change test
// (a jump from exactly zero error counts as rising) are this design's
// choices. Gains are integers: K_hw = round(K * V_LSB * 2^10 * 2^8) for a
// 10 mV ADC step, a 10-bit DPWM and 8 fractional accumulator bits, so
// Kp = 2 becomes 5243.
//
// Timing: kp_eff, ki_eff, kd_eff and state are combinational from the
// current inputs and the peak register; peak updates on the rising edge of
// clk1 that consumes the sample (the same edge on which the duty command is
// updated).
module ma_pid_adapt
  import mapid_pkg::*;
#(
  parameter int ADC_BITS = 8,
  parameter int KP   = 5243,   // 2
  parameter int KI   = 262,    // 0.1
  parameter int KD   = 10486,  // 4
  parameter int DKP  = 1835,   // 0.7
  parameter int DKI  = 786,    // 0.3
  parameter int DKD  = 6029,   // 2.3
  parameter int DKP2 = -4719,  // -1.8
  parameter int DKI2 = -52,    // -0.02
  parameter int VTHR = 6       // 60 mV in 10 mV ADC steps
) (
  input  logic                clk1,
  input  logic                n_rst,
  input  logic [ADC_BITS-1:0] en,
  input  logic                en_sign,
  input  logic [ADC_BITS-1:0] en1,
  input  logic                en_sign1,
  output logic [GAIN_W-1:0]   kp_eff,
  output logic [GAIN_W-1:0]   ki_eff,
  output logic [GAIN_W-1:0]   kd_eff,
  output adapt_state_t        state
);

  localparam int RW = 9;             // ratio bits: Q8, 0..256
  localparam int XW = GAIN_W + RW + 2;

  logic [ADC_BITS-1:0] peak;
  logic [RW-1:0]       ratio;
  logic [ADC_BITS+7:0] quot;
  logic signed [XW-1:0] alpha, beta, gamma;
  logic signed [XW-1:0] kp_s, ki_s, kd_s;

  // Saturate a signed sum to the unsigned gain range.
  function automatic logic [GAIN_W-1:0] clamp_gain(input logic signed [XW-1:0] v);
    if (v < 0)                            return '0;
    else if (v > XW'((1 << GAIN_W) - 1))  return '1;
    else                                  return v[GAIN_W-1:0];
  endfunction

  always_comb begin
    // |e(k)| / |peak| in Q8, clamped to 1.0 (also when peak is still 0).
    if (peak == '0 || en >= peak) begin
      quot  = '0;
      ratio = RW'(256);
    end else begin
      quot  = {en, 8'd0} / {8'd0, peak};
      ratio = RW'(quot);
    end

    if (en < ADC_BITS'(VTHR)) begin
      state = ST_STEADY;
    end else if (en1 != '0 && en_sign != en_sign1) begin
      state = ST_TRANSITION;
    end else if (en1 > en) begin
      state = ST_FALLING;
    end else begin
      state = ST_RISING;
    end

    unique case (state)
      ST_STEADY: begin
        alpha = '0;
        beta  = '0;
        gamma = '0;
      end
      ST_TRANSITION: begin
        alpha = XW'(DKP2);
        beta  = XW'(DKI2);
        gamma = XW'(DKD);
      end
      ST_FALLING: begin
        alpha = (XW'(DKP) * $signed({1'b0, ratio})) >>> 8;
        beta  = (XW'(DKI) * $signed({1'b0, ratio})) >>> 8;
        gamma = XW'(DKD);
      end
      default: begin  // ST_RISING
        alpha = XW'(DKP);
        beta  = XW'(DKI);
        gamma = XW'(DKD);
      end
    endcase

    kp_s   = XW'(KP) + alpha;
    ki_s   = XW'(KI) + beta;
    kd_s   = XW'(KD) + gamma;
    kp_eff = clamp_gain(kp_s);
    ki_eff = clamp_gain(ki_s);
    kd_eff = clamp_gain(kd_s);
  end

  always_ff @(posedge clk1 or negedge n_rst) begin
    if (!n_rst)                  peak <= '0;
    else if (state == ST_RISING) peak <= en;
  end

endmodule
