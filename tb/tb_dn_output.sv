// tb_dn_output: drives random increments into the accumulator and checks
// u(k) = clamp(u(k-1) + delta_d, 0, 2^18 - 1), dn = u >> 8 and the sat flag
// after every clk1 edge; forces both limits.
module tb_dn_output;
  localparam int DW = 29;
  logic clk1 = 1'b0, n_rst = 1'b0;
  logic signed [DW-1:0] delta_d;
  logic [9:0] dn;
  logic sat;
  int checks = 0, failures = 0;
  longint u_model = 0;
  int n_hi = 0, n_lo = 0;

  dn_output dut (.*);

  always #5 clk1 = ~clk1;

  initial begin
    delta_d = '0;
    #12;
    checks++;
    if (dn != 0) begin failures++; $display("FAIL reset dn %0d", dn); end
    n_rst = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      logic lim;
      @(negedge clk1);
      case (k % 100)
        10:      delta_d = DW'(longint'(1) << 22);       // push far up
        60:      delta_d = -DW'(longint'(1) << 22);      // push far down
        default: delta_d = DW'(int'($urandom_range(0, 40000)) - 20000);
      endcase
      @(posedge clk1);
      u_model = u_model + longint'(delta_d);
      lim = 1'b0;
      if (u_model < 0)            begin u_model = 0;            lim = 1'b1; n_lo++; end
      if (u_model > (1 << 18) - 1) begin u_model = (1 << 18) - 1; lim = 1'b1; n_hi++; end
      #1;
      checks++;
      if (longint'(dn) != (u_model >> 8) || sat != lim) begin
        failures++;
        $display("FAIL k=%0d dn %0d sat %0d expected %0d %0d", k, dn, sat, u_model >> 8, lim);
      end
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL limits not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
