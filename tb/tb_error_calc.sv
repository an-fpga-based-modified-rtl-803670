// tb_error_calc: random ADC and reference codes; checks e(k) = vref - vo as
// sign and magnitude against a signed-integer model, and the two-sample
// history after each clk1 edge, including the reset to zero.
module tb_error_calc;
  logic clk1 = 1'b0, n_rst = 1'b0;
  logic [7:0] vo, vref, en, en1, en2;
  logic en_sign, en_sign1, en_sign2;
  int checks = 0, failures = 0;
  int h1, h2;

  error_calc dut (.*);

  always #5 clk1 = ~clk1;

  task automatic check(input string what, input logic [7:0] mag, input logic sgn, input int exp);
    int got;
    got = sgn ? -int'(mag) : int'(mag);
    checks++;
    if (got != exp || (exp == 0 && sgn)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    vo = 8'd10; vref = 8'd200;
    h1 = 0; h2 = 0;
    #12;
    check("en1 in reset", en1, en_sign1, 0);
    check("en2 in reset", en2, en_sign2, 0);
    vo = 8'd50; vref = 8'd50;   // zero error until the model starts
    n_rst = 1'b1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk1);
      vo   = (k % 50 == 0) ? 8'd255 : 8'($urandom_range(0, 255));
      vref = (k % 50 == 0) ? 8'd0   : 8'($urandom_range(0, 255));
      #1;
      check("en", en, en_sign, int'(vref) - int'(vo));
      check("en1", en1, en_sign1, h1);
      check("en2", en2, en_sign2, h2);
      @(posedge clk1);
      h2 = h1;
      h1 = int'(vref) - int'(vo);
    end
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
