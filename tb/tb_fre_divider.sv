// tb_fre_divider: checks the divided clocks of fre_divider.
// Measures the spacing of rising edges of each output in fast-clock cycles
// (dpwm_clk 8, clk8 128, clk4 256, clk2 512, clk1 1024), checks the 50 %
// duty cycle, that delay_line_clk follows clk, and that reset holds the
// divided clocks low.
module tb_fre_divider;
  logic clk = 1'b0, n_rst = 1'b0;
  logic clk1, clk2, clk4, clk8, dpwm_clk, delay_line_clk;
  int checks = 0, failures = 0;

  fre_divider dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  int last [5];
  int high [5];
  logic [4:0] prev;
  localparam int EXP [5] = '{8, 128, 256, 512, 1024};
  logic [4:0] now;
  assign now = {clk1, clk2, clk4, clk8, dpwm_clk};

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (n_rst) begin
      for (int i = 0; i < 5; i++) begin
        if (now[i]) high[i]++;
        if (now[i] && !prev[i]) begin
          if (last[i] >= 0) begin
            checks++;
            if (cyc - last[i] != EXP[i]) begin
              failures++;
              $display("FAIL output %0d: period %0d expected %0d", i, cyc - last[i], EXP[i]);
            end
          end
          last[i] = cyc;
        end
      end
    end
    prev <= now;
  end

  initial begin
    foreach (last[i]) begin last[i] = -1; high[i] = 0; end
    prev = '0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (now != '0) begin failures++; $display("FAIL clocks run in reset"); end
    n_rst = 1'b1;
    repeat (4096) @(posedge clk);
    #1;
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (high[i] != 2048) begin
        failures++;
        $display("FAIL output %0d high for %0d of 4096 cycles", i, high[i]);
      end
    end
    for (int k = 0; k < 8; k++) begin
      #1;
      checks++;
      if (delay_line_clk != clk) begin failures++; $display("FAIL delay_line_clk"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
