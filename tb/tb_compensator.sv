// tb_compensator: open-loop check of the MA-PID compensator. A sequence of
// ADC codes (a decaying oscillation around the reference, steps and random
// values) is applied one per sample clock. A model evaluates the control
// law directly in velocity form,
//   u(k) = u(k-1) + Kp'[e(k)-e(k-1)] + Ki' e(k) + Kd'[e(k)-2e(k-1)+e(k-2)],
// with the adaptive gains Kp', Ki', Kd' from the MA-PID rules (Q8 ratio in
// the falling state) and u clamped to the 18-bit range, and dn = u >> 8 is
// compared after every sample. Every adaptation state and both duty limits
// must occur.
module tb_compensator;
  import mapid_pkg::*;
  localparam int KP = 5243, KI = 262, KD = 10486;
  localparam int DKP = 1835, DKI = 786, DKD = 6029, DKP2 = -4719, DKI2 = -52;
  localparam int VTHR = 6;

  logic clk1 = 1'b0, n_rst = 1'b0;
  logic [7:0] vo, vref;
  logic [9:0] dn;
  adapt_state_t adapt_state;
  logic sat;
  int checks = 0, failures = 0;
  int n_st [4];
  int n_lo = 0, n_hi = 0;

  compensator dut (.*);

  always #5 clk1 = ~clk1;

  longint u = 0;
  int e1 = 0, e2 = 0, peak = 0;

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic sample(input int code);
    int e, kp, ki, kd, r, st;
    @(negedge clk1);
    vo = 8'(code);
    e  = int'(vref) - code;
    kp = KP; ki = KI; kd = KD; st = 0;
    if (iabs(e) >= VTHR) begin
      kd = KD + DKD;
      if (e * e1 < 0) begin
        kp = KP + DKP2; ki = KI + DKI2; st = 3;
      end else if (iabs(e1) > iabs(e)) begin
        r  = (peak == 0 || iabs(e) >= peak) ? 256 : (iabs(e) * 256) / peak;
        kp = KP + (DKP * r) / 256; ki = KI + (DKI * r) / 256; st = 2;
      end else begin
        kp = KP + DKP; ki = KI + DKI; st = 1; peak = iabs(e);
      end
    end
    n_st[st]++;
    u = u + longint'(kp) * (e - e1) + longint'(ki) * e + longint'(kd) * (e - 2 * e1 + e2);
    if (u < 0) begin u = 0; n_lo++; end
    if (u > (1 << 18) - 1) begin u = (1 << 18) - 1; n_hi++; end
    e2 = e1;
    e1 = e;
    #1;
    checks++;
    if (int'(adapt_state) != st) begin
      failures++; $display("FAIL state %0d expected %0d (e=%0d)", adapt_state, st, e);
    end
    @(posedge clk1);
    #1;
    checks++;
    if (longint'(dn) != (u >> 8)) begin
      failures++;
      $display("FAIL vo=%0d dn %0d expected %0d", code, dn, u >> 8);
    end
  endtask

  initial begin
    foreach (n_st[i]) n_st[i] = 0;
    vref = 8'd180;
    vo   = 8'd180;
    #12 n_rst = 1'b1;
    for (int k = 0; k < 40; k++) sample(140);            // output low: duty rises
    for (int k = 0; k < 80; k++)                          // decaying ring
      sample(180 + $rtoi(40.0 * $sin(k * 0.4) * $exp(-k * 0.04)));
    for (int k = 0; k < 30; k++) sample(230);            // output high: duty falls
    for (int k = 0; k < 30; k++) sample(178 + $urandom_range(0, 4));
    repeat (800) sample(int'($urandom_range(150, 210)));
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_st[i] == 0) begin failures++; $display("FAIL state %0d never exercised", i); end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL duty limits not reached"); end
    $display("states %0d %0d %0d %0d, limits %0d %0d", n_st[0], n_st[1], n_st[2], n_st[3], n_lo, n_hi);
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
