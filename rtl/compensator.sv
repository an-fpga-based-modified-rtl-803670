// compensator: modified adaptive PID (MA-PID) compensator.
//
// Once per sample clock it evaluates the incremental PID law
//   u(k) = u(k-1) + (Kp+alpha)[e(k)-e(k-1)] + (Ki+beta) e(k)
//                 + (Kd+gamma)[e(k)-2e(k-1)+e(k-2)]
// where alpha, beta, gamma are zero in steady state and are switched in by
// the gain adaptation during transients. The datapath is the chain of the
// controller's block diagram: error (sample and history), LUT (coefficient
// products), d_correction (signs and sum) and dn_output (accumulator and
// scaling), with the gain adaptation added between error and LUT.
// Setting all DK* parameters to 0 turns it into the conventional PID.
//
// Interface: vo and vref are ADC codes, dn is the DPWM_BITS-bit duty command
// (duty = dn / 2^DPWM_BITS). Timing: the vo present at a rising edge of
// clk1 is the sample e(k); the dn computed from it is registered at that
// same edge, so there is no extra sample of latency. adapt_state is
// combinational and shows how the present vo would be treated; sat shows
// that the last update hit a duty limit.
module compensator
  import mapid_pkg::*;
#(
  parameter int ADC_BITS  = 8,
  parameter int DPWM_BITS = 10,
  parameter int FRAC      = 8,
  parameter int KP   = 5243,
  parameter int KI   = 262,
  parameter int KD   = 10486,
  parameter int DKP  = 1835,
  parameter int DKI  = 786,
  parameter int DKD  = 6029,
  parameter int DKP2 = -4719,
  parameter int DKI2 = -52,
  parameter int VTHR = 6
) (
  input  logic                 clk1,
  input  logic                 n_rst,
  input  logic [ADC_BITS-1:0]  vo,
  input  logic [ADC_BITS-1:0]  vref,
  output logic [DPWM_BITS-1:0] dn,
  output adapt_state_t         adapt_state,
  output logic                 sat
);

  localparam int PW = COEF_W + ADC_BITS;

  logic [ADC_BITS-1:0] en, en1, en2;
  logic                en_sign, en_sign1, en_sign2;
  logic [GAIN_W-1:0]   kp_eff, ki_eff, kd_eff;
  logic [PW-1:0]       aen, ben1, cen2;
  logic signed [PW+2:0] delta_d;

  error_calc #(.ADC_BITS(ADC_BITS)) u_error (
    .clk1, .n_rst, .vo, .vref,
    .en, .en1, .en2, .en_sign, .en_sign1, .en_sign2
  );

  ma_pid_adapt #(
    .ADC_BITS(ADC_BITS), .KP(KP), .KI(KI), .KD(KD), .DKP(DKP), .DKI(DKI),
    .DKD(DKD), .DKP2(DKP2), .DKI2(DKI2), .VTHR(VTHR)
  ) u_adapt (
    .clk1, .n_rst, .en, .en_sign, .en1, .en_sign1,
    .kp_eff, .ki_eff, .kd_eff, .state(adapt_state)
  );

  coef_lut #(.ADC_BITS(ADC_BITS)) u_lut (
    .en, .en1, .en2, .kp(kp_eff), .ki(ki_eff), .kd(kd_eff),
    .aen, .ben1, .cen2
  );

  d_correction #(.PW(PW)) u_dcorr (
    .aen, .ben1, .cen2, .en_sign, .en_sign1, .en_sign2, .delta_d
  );

  dn_output #(.DPWM_BITS(DPWM_BITS), .FRAC(FRAC), .DW(PW + 3)) u_dn (
    .clk1, .n_rst, .delta_d, .dn, .sat
  );

endmodule
