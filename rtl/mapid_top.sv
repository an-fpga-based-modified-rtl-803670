// mapid_top: FPGA controller for a digitally controlled DC/DC buck converter
// using the modified adaptive PID (MA-PID) law.
//
// The ADC code of the output voltage (vo) is compared with the reference
// code (vref) once per switching period. The compensator turns the error
// into a DPWM_BITS-bit duty command dn, raising its gains while the error
// is large and dropping them back when it crosses zero or is small; the
// hybrid DPWM turns dn into the gate-drive pulse dpwm_out. fre_divider
// derives every clock from clk: delay_line_clk = clk, dpwm_clk = clk/8 and
// the sample clock clk1 = clk/1024, one sample per switching period (a
// 1.024 GHz clk gives the 1 MHz switching frequency of the reference
// design; any lower clk scales the whole controller in time).
//
// Interface: vo, vref are ADC codes (10 mV per code assumed in the gain
// scaling), n_rst is an asynchronous active-low reset, syn is high during
// the first counter step of every PWM period. dn, adapt_state and sat are
// extra observation outputs. Timing: vo is sampled at each rising edge of
// the internal sample clock; the resulting duty takes effect from the next
// PWM period that starts after the following sample edge.
module mapid_top
  import mapid_pkg::*;
#(
  parameter int ADC_BITS  = 8,
  parameter int DPWM_BITS = 10,
  parameter int DL_BITS   = 3,
  parameter int FRAC      = 8,
  parameter int KP   = 5243,   // 2
  parameter int KI   = 262,    // 0.1
  parameter int KD   = 10486,  // 4
  parameter int DKP  = 1835,   // 0.7
  parameter int DKI  = 786,    // 0.3
  parameter int DKD  = 6029,   // 2.3
  parameter int DKP2 = -4719,  // -1.8
  parameter int DKI2 = -52,    // -0.02
  parameter int VTHR = 6       // 60 mV
) (
  input  logic                 clk,
  input  logic                 n_rst,
  input  logic [ADC_BITS-1:0]  vo,
  input  logic [ADC_BITS-1:0]  vref,
  output logic                 dpwm_out,
  output logic                 syn,
  output logic [DPWM_BITS-1:0] dn,
  output adapt_state_t         adapt_state,
  output logic                 sat
);

  logic clk1, clk2, clk4, clk8, dpwm_clk, delay_line_clk;

  fre_divider #(.DL_BITS(DL_BITS), .CNT_BITS(DPWM_BITS - DL_BITS)) u_div (
    .clk, .n_rst, .clk1, .clk2, .clk4, .clk8, .dpwm_clk, .delay_line_clk
  );

  compensator #(
    .ADC_BITS(ADC_BITS), .DPWM_BITS(DPWM_BITS), .FRAC(FRAC),
    .KP(KP), .KI(KI), .KD(KD), .DKP(DKP), .DKI(DKI), .DKD(DKD),
    .DKP2(DKP2), .DKI2(DKI2), .VTHR(VTHR)
  ) u_comp (
    .clk1, .n_rst, .vo, .vref, .dn, .adapt_state, .sat
  );

  dpwm #(.DPWM_BITS(DPWM_BITS), .DL_BITS(DL_BITS)) u_dpwm (
    .dpwm_clk, .delay_line_clk, .n_rst, .dn, .dpwm_out, .syn
  );

endmodule
