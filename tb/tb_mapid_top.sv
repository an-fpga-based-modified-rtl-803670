// tb_mapid_top: closed-loop end-to-end test of the MA-PID buck controller at
// its default (full) size.
//
// The controller drives a switching buck model (buck_plant) whose ADC code
// is fed back; one switching period is 1024 clk cycles (1 us at the nominal
// clock). Sequence: start-up from 0 V with a 0.5 A load, a 5 V -> 4 V -> 5 V
// line step and a 0.5 A -> 1 A -> 0.5 A load step. Checks:
//  * every PWM pulse is exactly dn clk cycles long and periods are 1024
//    cycles apart (hybrid DPWM resolution and switching rate);
//  * after start-up and after every step the output code returns to and
//    stays within +-2 codes (about 1 % of 1.8 V) of the reference within
//    RECOVER_LIMIT periods;
//  * each adaptation state (steady, rising, falling, transition) and the
//    duty limit occur at least once.
module tb_mapid_top;
  import mapid_pkg::*;

  localparam int PERIOD_CLKS   = 1024;
  localparam int RECOVER_LIMIT = 300;   // periods
  localparam int SETTLE_BAND   = 2;     // ADC codes

  logic clk = 1'b0;
  logic n_rst = 1'b1;   // pulsed low at start (power-on reset edge)
  logic [7:0] vo, vref;
  logic dpwm_out, syn, sat;
  logic [9:0] dn;
  adapt_state_t adapt_state;
  real vin = 5.0, rload = 3.6, vout;

  int checks = 0, failures = 0;
  int n_state [4];
  int n_sat = 0, n_pulses = 0, n_period_ok = 0;

  always #1 clk = ~clk;   // one clk = 2 time units

  mapid_top dut (
    .clk, .n_rst, .vo, .vref, .dpwm_out, .syn, .dn, .adapt_state, .sat
  );

  buck_plant plant (
    .clk, .gate(dpwm_out), .vin, .rload, .vout, .adc_code(vo)
  );

  logic [7:0] vref_set = 8'd180;   // 1.8 V
  assign vref = vref_set;

  // --- DPWM pulse width and period check ---------------------------------
  longint cyc = 0, rise_cyc = -1, prev_rise = -1;
  int     dn_at_rise;
  logic   out_d = 1'b0;
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    out_d <= dpwm_out;
    if (!n_rst) begin
      rise_cyc  = -1;
      prev_rise = -1;
    end else if (dpwm_out && !out_d) begin
      if (prev_rise >= 0 && n_rst) begin
        // a rise every period; a 1023 pulse leaves one low cycle
        if ((cyc - prev_rise) % longint'(PERIOD_CLKS) != 0) begin
          failures++;
          $display("FAIL period: rise spacing %0d", cyc - prev_rise);
        end else n_period_ok++;
        checks++;
      end
      prev_rise  = cyc;
      rise_cyc   = cyc;
      dn_at_rise = int'(dn);
    end
    if (n_rst && !dpwm_out && out_d && rise_cyc >= 0) begin
      checks++;
      n_pulses++;
      if (cyc - rise_cyc != longint'(dn_at_rise)) begin
        failures++;
        if (failures < 10)
          $display("FAIL pulse: width %0d expected %0d at cycle %0d dn %0d q %0d", cyc - rise_cyc, dn_at_rise, cyc, dn, dut.u_dpwm.dn_q);
      end
    end
  end

  // --- mechanism counters, sampled at each sample-clock edge --------------
  always @(posedge dut.clk1) begin
    if (n_rst) begin
      n_state[adapt_state]++;
      if (sat) n_sat++;
    end
  end

  function automatic int dev(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  // Wait until the output has stayed inside the band for 20 periods;
  // returns the number of periods that took.
  task automatic settle(input string what);
    int inband = 0, periods = 0;
    while (inband < 20 && periods < RECOVER_LIMIT + 20) begin
      @(posedge dut.clk1);
      periods++;
      if (dev(vo, vref) <= SETTLE_BAND) inband++;
      else inband = 0;
    end
    checks++;
    if (inband < 20) begin
      failures++;
      $display("FAIL %s: not settled after %0d periods (vo code %0d)", what, periods, vo);
    end else
      $display("%s: settled in %0d us (%0d periods incl. 20 in band)", what, periods - 20, periods);
  endtask

  task automatic hold_check(input string what, input int periods);
    int worst = 0;
    repeat (periods) begin
      @(posedge dut.clk1);
      if (dev(vo, vref) > worst) worst = dev(vo, vref);
    end
    checks++;
    if (worst > SETTLE_BAND) begin
      failures++;
      $display("FAIL %s: deviation %0d codes in steady state", what, worst);
    end
  endtask

  // Largest deviation seen while waiting a fixed number of periods.
  task automatic step_peak(input string what, input int periods);
    int worst = 0;
    repeat (periods) begin
      @(posedge dut.clk1);
      if (dev(vo, vref) > worst) worst = dev(vo, vref);
    end
    $display("%s: peak deviation %0d codes", what, worst);
  endtask

  initial begin
    foreach (n_state[i]) n_state[i] = 0;
    #1 n_rst = 1'b0;
    repeat (20) @(posedge clk);
    n_rst = 1'b1;
    settle("start-up");
    hold_check("steady 5 V / 0.5 A", 50);
    vin = 4.0;   settle("line step 5->4 V");
    hold_check("steady 4 V", 30);
    vin = 5.0;   settle("line step 4->5 V");
    rload = 1.8; settle("load step 0.5->1 A");
    hold_check("steady 1 A", 30);
    rload = 3.6; settle("load step 1->0.5 A");
    hold_check("steady 0.5 A", 30);
    rload = 2.25; settle("load 0.8 A");
    rload = 1.2;  settle("load step 0.8->1.5 A");
    rload = 2.25; settle("load step 1.5->0.8 A");
    vin = 3.6;    settle("line step 5->3.6 V");
    vin = 5.0;    settle("line step 3.6->5 V");
    vref_set = 8'd120; settle("reference step 1.8->1.2 V");
    vref_set = 8'd180; settle("reference step 1.2->1.8 V");

    $display("states: steady=%0d rising=%0d falling=%0d transition=%0d sat=%0d pulses=%0d",
             n_state[ST_STEADY], n_state[ST_RISING], n_state[ST_FALLING],
             n_state[ST_TRANSITION], n_sat, n_pulses);
    foreach (n_state[i]) begin
      checks++;
      if (n_state[i] == 0) begin
        failures++;
        $display("FAIL adaptation state %0d never occurred", i);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL duty limit never reached"); end
    checks++;
    if (n_pulses < 100) begin failures++; $display("FAIL too few PWM pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * 1024 * 4000);   // 4000 switching periods
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
