// tb_d_correction: random products and signs; checks
// delta_d = s0*aen - s1*ben1 + s2*cen2 (s = +1 for a positive error).
module tb_d_correction;
  localparam int PW = 26;
  logic [PW-1:0] aen, ben1, cen2;
  logic en_sign, en_sign1, en_sign2;
  logic signed [PW+2:0] delta_d;
  int checks = 0, failures = 0;

  d_correction dut (.*);

  initial begin
    repeat (1000) begin
      longint e;
      aen  = PW'($urandom);
      ben1 = PW'($urandom);
      cen2 = PW'($urandom);
      if ($urandom_range(0, 9) == 0) begin aen = '1; ben1 = '1; cen2 = '1; end
      {en_sign, en_sign1, en_sign2} = 3'($urandom);
      #1;
      e = (en_sign ? -longint'(aen) : longint'(aen))
        - (en_sign1 ? -longint'(ben1) : longint'(ben1))
        + (en_sign2 ? -longint'(cen2) : longint'(cen2));
      checks++;
      if (longint'(delta_d) != e) begin
        failures++;
        $display("FAIL delta_d %0d expected %0d", delta_d, e);
      end
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
