// tb_transient_compare: the transient workloads of the MA-PID buck
// controller, run side by side on two closed loops.
//
// Loop A uses the controller at its default (MA-PID) gains; loop B is the
// same controller with every adaptive increment set to zero, i.e. the
// conventional PID with Kp = 2, Ki = 0.1, Kd = 4. Both drive identical buck
// models (5 V in, 1.8 V out, 4.7 uH / 10 uF). Workloads:
//   line step 4 V <-> 5 V at 0.5 A, load step 0.5 A <-> 1 A at 5 V,
//   load step 0.8 A <-> 1.5 A at 5 V, and the output code at 0.5, 0.8, 1.0
//   and 1.5 A load (load regulation).
// For each step the recovery time (periods until the output stays within
// +-2 codes for 20 periods) and the peak deviation are printed for both
// loops; the comparison is reported, not checked, since it depends on the
// power-stage model. Checks: both loops recover within 300 periods after
// every step, and the steady output at every load is within 1 code of the
// reference.
module tb_transient_compare;
  import mapid_pkg::*;

  logic clk = 1'b0;
  logic n_rst = 1'b1;
  logic [7:0] vo_a, vo_b;
  logic [7:0] vref = 8'd180;
  logic out_a, out_b, syn_a, syn_b, sat_a, sat_b;
  logic [9:0] dn_a, dn_b;
  adapt_state_t st_a, st_b;
  real vin = 5.0, rload = 3.6, v_a, v_b;
  int checks = 0, failures = 0;
  int sum_rec_a = 0, sum_rec_b = 0;

  always #1 clk = ~clk;

  mapid_top dut_a (
    .clk, .n_rst, .vo(vo_a), .vref, .dpwm_out(out_a), .syn(syn_a), .dn(dn_a),
    .adapt_state(st_a), .sat(sat_a)
  );
  mapid_top #(.DKP(0), .DKI(0), .DKD(0), .DKP2(0), .DKI2(0)) dut_b (
    .clk, .n_rst, .vo(vo_b), .vref, .dpwm_out(out_b), .syn(syn_b), .dn(dn_b),
    .adapt_state(st_b), .sat(sat_b)
  );
  buck_plant plant_a (.clk, .gate(out_a), .vin, .rload, .vout(v_a), .adc_code(vo_a));
  buck_plant plant_b (.clk, .gate(out_b), .vin, .rload, .vout(v_b), .adc_code(vo_b));

  function automatic int dev(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  // Apply nothing; wait until both loops have settled and report.
  task automatic measure(input string what);
    int in_a = 0, in_b = 0, rec_a = -1, rec_b = -1, pk_a = 0, pk_b = 0, n = 0;
    while ((rec_a < 0 || rec_b < 0) && n < 320) begin
      @(posedge dut_a.clk1);
      n++;
      if (dev(vo_a, vref) > pk_a) pk_a = dev(vo_a, vref);
      if (dev(vo_b, vref) > pk_b) pk_b = dev(vo_b, vref);
      in_a = (dev(vo_a, vref) <= 2) ? in_a + 1 : 0;
      in_b = (dev(vo_b, vref) <= 2) ? in_b + 1 : 0;
      if (rec_a < 0 && in_a == 20) rec_a = n - 20;
      if (rec_b < 0 && in_b == 20) rec_b = n - 20;
    end
    $display("%-22s MA-PID: recovery %3d us, peak %3d mV | PID: recovery %3d us, peak %3d mV",
             what, rec_a, pk_a * 10, rec_b, pk_b * 10);
    checks += 2;
    if (rec_a < 0) begin failures++; $display("FAIL %s: MA-PID did not recover", what); end
    if (rec_b < 0) begin failures++; $display("FAIL %s: PID did not recover", what); end
    sum_rec_a += rec_a;
    sum_rec_b += rec_b;
  endtask

  task automatic regulation(input real r);
    rload = r;
    repeat (400) @(posedge dut_a.clk1);
    checks += 2;
    $display("load %.2f A: MA-PID code %0d, PID code %0d", 1.8 / r, vo_a, vo_b);
    if (dev(vo_a, vref) > 1) begin failures++; $display("FAIL MA-PID regulation at %.2f A", 1.8 / r); end
    if (dev(vo_b, vref) > 1) begin failures++; $display("FAIL PID regulation at %.2f A", 1.8 / r); end
  endtask

  initial begin
    #1 n_rst = 1'b0;
    repeat (20) @(posedge clk);
    n_rst = 1'b1;
    repeat (300) @(posedge dut_a.clk1);
    vin = 4.0;    measure("line 5 V -> 4 V");
    vin = 5.0;    measure("line 4 V -> 5 V");
    rload = 1.8;  measure("load 0.5 A -> 1 A");
    rload = 3.6;  measure("load 1 A -> 0.5 A");
    rload = 2.25; repeat (300) @(posedge dut_a.clk1);
    rload = 1.2;  measure("load 0.8 A -> 1.5 A");
    rload = 2.25; measure("load 1.5 A -> 0.8 A");
    regulation(3.6);
    regulation(2.25);
    regulation(1.8);
    regulation(1.2);
    $display("summed recovery: MA-PID %0d us, PID %0d us", sum_rec_a, sum_rec_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * 1024 * 6000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
