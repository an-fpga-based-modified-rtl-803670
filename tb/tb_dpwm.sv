// tb_dpwm: hybrid DPWM with a delay-line clock 8 times the counter clock.
// Each switching period the on-time of dpwm_out is counted in fast-clock
// cycles and must equal the duty command that was present at the end of
// the previous period (dn is changed in mid-period, as the compensator
// does). Covers dn = 0, 1, 7, 8, 9, 511, 512, 1022, 1023, the sequences
// 1023 -> 0 and 1023 -> 5 that cross a period boundary, and random values.
// Also checks that syn marks a period of exactly 1024 fast cycles (after
// the first period, which the divider phase at reset shortens).
module tb_dpwm;
  logic clk = 1'b0, n_rst = 1'b0;
  logic [2:0] div = '0;
  logic dpwm_clk;
  logic [9:0] dn = '0;
  logic dpwm_out, syn;
  int checks = 0, failures = 0;

  dpwm dut (.dpwm_clk, .delay_line_clk(clk), .n_rst, .dn, .dpwm_out, .syn);

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge n_rst)
    if (!n_rst) div <= '0; else div <= div + 1'b1;
  assign dpwm_clk = div[2];

  localparam int LIST [14] = '{0, 1, 7, 8, 9, 511, 512, 1022, 1023, 0, 1023, 5, 1023, 1023};
  int exp_q [$];
  int high_cnt = 0, cyc = 0, last_syn = -1, period_no = 0, nxt = 0;
  logic syn_d = 1'b0;
  bit   started = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (n_rst) begin
      if (syn && !syn_d) begin
        if (started) begin
          int e;
          e = exp_q.pop_front();
          checks += 2;
          if (high_cnt != e) begin
            failures++;
            $display("FAIL period %0d: on-time %0d expected %0d", period_no, high_cnt, e);
          end
          // the first period after reset is shortened by the clock divider phase
          if (period_no > 1 && cyc - last_syn != 1024) begin
            failures++;
            $display("FAIL period length %0d", cyc - last_syn);
          end
        end
        started  = 1;
        last_syn = cyc;
        high_cnt = 0;
        period_no++;
      end else if (started) begin
        if (dpwm_out) high_cnt++;
      end
      syn_d <= syn;
    end
  end

  // Present a new duty command in the middle of every period.
  always @(posedge clk) begin
    if (started && cyc - last_syn == 512) begin
      int d;
      d = (nxt < 14) ? LIST[nxt] : int'($urandom_range(0, 1023));
      nxt++;
      dn <= 10'(d);
      exp_q.push_back(d);
    end
  end

  initial begin
    exp_q.push_back(0);   // first period uses the reset value
    #23 n_rst = 1'b1;
    wait (period_no == 60);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
