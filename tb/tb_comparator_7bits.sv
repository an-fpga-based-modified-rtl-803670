// tb_comparator_7bits: all count / coarse-duty pairs in and out of reset.
module tb_comparator_7bits;
  logic [6:0] cnt, dn_hi;
  logic n_rst, is_zero, is_high, clear_delay_line;
  int checks = 0, failures = 0;

  comparator_7bits dut (.*);

  initial begin
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 128; c++)
        for (int d = 0; d < 128; d++) begin
          n_rst = r[0]; cnt = 7'(c); dn_hi = 7'(d);
          #1;
          checks++;
          if (is_zero != (r == 1 && c == 0) || is_high != (r == 1 && c == d)
              || clear_delay_line != (r == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL r=%0d c=%0d d=%0d", r, c, d);
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
