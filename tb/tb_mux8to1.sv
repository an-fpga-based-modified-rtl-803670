// tb_mux8to1: every select value against random tap vectors.
module tb_mux8to1;
  logic [7:0] delay_vec;
  logic [2:0] sel;
  logic mux_delay_out;
  int checks = 0, failures = 0;

  mux8to1 dut (.*);

  initial begin
    repeat (200) begin
      delay_vec = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (mux_delay_out != ((delay_vec >> s) & 1)) begin
          failures++;
          $display("FAIL sel %0d vec %b out %0d", s, delay_vec, mux_delay_out);
        end
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
