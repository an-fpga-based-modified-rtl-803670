// tb_delay_line: random input bits; checks that tap j equals the input j
// clock cycles earlier (tap 0 the present input) and that clear empties the
// line.
module tb_delay_line;
  logic delay_line_clk = 1'b0, clear_delay_line = 1'b1, is_high = 1'b0;
  logic [7:0] delay_vec;
  int checks = 0, failures = 0;
  logic [7:0] hist;   // hist[j] = input j cycles ago

  delay_line dut (.*);

  always #5 delay_line_clk = ~delay_line_clk;

  initial begin
    hist = '0;
    @(posedge delay_line_clk);
    @(negedge delay_line_clk);
    clear_delay_line = 1'b0;
    for (int k = 0; k < 1000; k++) begin
      is_high = 1'($urandom);
      #1;
      hist[0] = is_high;
      checks++;
      if (delay_vec != hist) begin
        failures++;
        $display("FAIL k=%0d taps %b expected %b", k, delay_vec, hist);
      end
      if (k == 500) clear_delay_line = 1'b1;
      @(posedge delay_line_clk);
      hist = clear_delay_line ? '0 : {hist[6:0], 1'b0};
      @(negedge delay_line_clk);
      clear_delay_line = 1'b0;
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
