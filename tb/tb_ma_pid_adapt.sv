// tb_ma_pid_adapt: drives error sequences (random walks with sign changes,
// excursions above and below the threshold) and checks, sample by sample,
// the state and the three effective gains against a model of the
// adaptation rules written with real arithmetic: in the falling state
// alpha = DKP*|e|/|peak| and beta = DKI*|e|/|peak| are accepted within the
// Q8 rounding of the ratio.
module tb_ma_pid_adapt;
  import mapid_pkg::*;
  localparam int KP = 5243, KI = 262, KD = 10486;
  localparam int DKP = 1835, DKI = 786, DKD = 6029, DKP2 = -4719, DKI2 = -52;
  localparam int VTHR = 6;

  logic clk1 = 1'b0, n_rst = 1'b0;
  logic [7:0] en, en1;
  logic en_sign, en_sign1;
  logic [GAIN_W-1:0] kp_eff, ki_eff, kd_eff;
  adapt_state_t state;
  int checks = 0, failures = 0;
  int n_st [4];

  ma_pid_adapt dut (.*);

  always #5 clk1 = ~clk1;

  int e_prev = 0, peak = 0;

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic apply(input int e);
    adapt_state_t xs;
    real r, xa, xb;
    int xg;
    @(negedge clk1);
    en = 8'(iabs(e)); en_sign = (e < 0);
    en1 = 8'(iabs(e_prev)); en_sign1 = (e_prev < 0);
    #1;
    // model, following the rules of the MA-PID algorithm
    if (iabs(e) < VTHR) begin
      xs = ST_STEADY; xa = 0; xb = 0; xg = 0;
    end else begin
      xg = DKD;
      if (e * e_prev < 0) begin
        xs = ST_TRANSITION; xa = DKP2; xb = DKI2;
      end else if (iabs(e_prev) > iabs(e)) begin
        xs = ST_FALLING;
        r  = (peak == 0) ? 1.0 : real'(iabs(e)) / real'(peak);
        if (r > 1.0) r = 1.0;
        xa = DKP * r; xb = DKI * r;
      end else begin
        xs = ST_RISING; xa = DKP; xb = DKI;
      end
    end
    n_st[xs]++;
    checks += 4;
    if (state != xs) begin
      failures++;
      $display("FAIL e=%0d e1=%0d state %0d expected %0d", e, e_prev, state, xs);
    end
    if (kd_eff != GAIN_W'(KD + xg)) begin failures++; $display("FAIL kd_eff %0d", kd_eff); end
    if ((real'(kp_eff) - (KP + xa)) > 0.01 || (real'(kp_eff) - (KP + xa)) < -(DKP / 256.0 + 1.0)) begin
      failures++; $display("FAIL kp_eff %0d expected %f (e=%0d peak=%0d)", kp_eff, KP + xa, e, peak);
    end
    if ((real'(ki_eff) - (KI + xb)) > 0.01 || (real'(ki_eff) - (KI + xb)) < -(DKI / 256.0 + 1.0)) begin
      failures++; $display("FAIL ki_eff %0d expected %f", ki_eff, KI + xb);
    end
    @(posedge clk1);
    if (xs == ST_RISING) peak = iabs(e);
    e_prev = e;
  endtask

  initial begin
    int e;
    foreach (n_st[i]) n_st[i] = 0;
    en = '0; en1 = '0; en_sign = 0; en_sign1 = 0;
    #12 n_rst = 1'b1;
    // a damped oscillation: rises, falls, crosses zero, settles
    for (int k = 0; k < 60; k++)
      apply($rtoi(80.0 * $sin(k * 0.35) * $exp(-k * 0.05)));
    // random walk
    e = 0;
    repeat (3000) begin
      e = e + $urandom_range(0, 20) - 10;
      if ($urandom_range(0, 30) == 0) e = -e;
      if (e > 255) e = 255;
      if (e < -255) e = -255;
      apply(e);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_st[i] == 0) begin failures++; $display("FAIL state %0d never exercised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
