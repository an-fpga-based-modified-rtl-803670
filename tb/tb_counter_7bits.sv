// tb_counter_7bits: checks that the counter steps by one per dpwm_clk edge,
// wraps after 128 counts and that syn is high exactly at count 0.
module tb_counter_7bits;
  logic dpwm_clk = 1'b0, n_rst = 1'b0;
  logic [6:0] counter_7bits_out;
  logic syn;
  int checks = 0, failures = 0, n_syn = 0;

  counter_7bits dut (.*);

  always #4 dpwm_clk = ~dpwm_clk;

  initial begin
    int exp = 0;
    #10;
    checks++;
    if (counter_7bits_out != 0 || !syn) begin failures++; $display("FAIL reset"); end
    n_rst = 1'b1;
    repeat (300) begin
      @(posedge dpwm_clk); #1;
      exp = (exp + 1) % 128;
      checks++;
      if (int'(counter_7bits_out) != exp || syn != (exp == 0)) begin
        failures++;
        $display("FAIL count %0d syn %0d expected %0d", counter_7bits_out, syn, exp);
      end
      if (syn) n_syn++;
    end
    checks++;
    if (n_syn != 2) begin failures++; $display("FAIL %0d periods in 300 counts", n_syn); end
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
