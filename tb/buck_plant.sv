// buck_plant: behavioural model of a synchronous buck power stage and its
// 8-bit ADC, for closed-loop simulation only (not synthesizable).
//
// On every rising edge of clk it advances the averaged-free switching
// model by one step of DT seconds with the high-side switch on when gate is
// 1 and the low-side switch on otherwise:
//   L di/dt = (gate ? vin : 0) - i (r_on + r_l) - vout
//   C dvc/dt = i - vout / rload,  vout = (vc + r_c i) rload / (rload + r_c)
// Component values are the reference design's (L = 4.7 uH with 200 mOhm,
// C = 10 uF with 100 mOhm); r_on = 50 mOhm is assumed. adc_code is vout
// quantised to 10 mV steps (2.56 V full scale), saturated to 8 bits.
module buck_plant #(
  parameter real DT   = 1.0e-6 / 1024.0,
  parameter real L    = 4.7e-6,
  parameter real RL   = 0.2,
  parameter real RON  = 0.05,
  parameter real C    = 10.0e-6,
  parameter real RC   = 0.1,
  parameter real VLSB = 0.01
) (
  input  logic       clk,
  input  logic       gate,
  input  real        vin,
  input  real        rload,
  output real        vout,
  output logic [7:0] adc_code
);

  real il = 0.0;
  real vc = 0.0;

  always_comb begin
    vout = (vc + RC * il) * rload / (rload + RC);
  end

  always @(posedge clk) begin
    real vsw, di, dv;
    vsw = gate ? vin : 0.0;
    di  = (vsw - il * (RON + RL) - vout) / L;
    dv  = (il - vout / rload) / C;
    il  <= il + di * DT;
    vc  <= vc + dv * DT;
  end

  always_comb begin
    int code;
    code = $rtoi(vout / VLSB + 0.5);
    if (code < 0)   code = 0;
    if (code > 255) code = 255;
    adc_code = 8'(code);
  end

endmodule
