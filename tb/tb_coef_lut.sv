// tb_coef_lut: random and extreme gains and error magnitudes; checks the
// three products against a*e, (Kp+2Kd)*e1 and Kd*e2 computed with 64-bit
// integers.
module tb_coef_lut;
  import mapid_pkg::*;
  logic [7:0] en, en1, en2;
  logic [GAIN_W-1:0] kp, ki, kd;
  logic [COEF_W+7:0] aen, ben1, cen2;
  int checks = 0, failures = 0;

  coef_lut dut (.*);

  task automatic one();
    longint ea, eb, ec;
    #1;
    ea = (longint'(kp) + longint'(ki) + longint'(kd)) * longint'(en);
    eb = (longint'(kp) + 2 * longint'(kd)) * longint'(en1);
    ec = longint'(kd) * longint'(en2);
    checks += 3;
    if (longint'(aen) != ea)  begin failures++; $display("FAIL aen %0d exp %0d", aen, ea); end
    if (longint'(ben1) != eb) begin failures++; $display("FAIL ben1 %0d exp %0d", ben1, eb); end
    if (longint'(cen2) != ec) begin failures++; $display("FAIL cen2 %0d exp %0d", cen2, ec); end
  endtask

  initial begin
    // reference-design gains: Kp = 2, Ki = 0.1, Kd = 4 scaled
    kp = 16'd5243; ki = 16'd262; kd = 16'd10486;
    en = 8'd1; en1 = 8'd1; en2 = 8'd1;
    one();
    kp = '1; ki = '1; kd = '1; en = '1; en1 = '1; en2 = '1;
    one();
    repeat (500) begin
      kp = 16'($urandom); ki = 16'($urandom); kd = 16'($urandom);
      en = 8'($urandom); en1 = 8'($urandom); en2 = 8'($urandom);
      one();
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
