// Test of the Toggle: input events must appear alternately on c and d, first
// on c, each one clock after the input event, and nowhere else.
module tb_di_toggle;

  logic clk = 1'b0;
  logic rst_n, a, c, d;
  logic c_exp, d_exp;
  int checks = 0, failures = 0;

  di_toggle dut (.clk, .rst_n, .a, .c, .d);

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; a = 1'b0; c_exp = 1'b0; d_exp = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      a = ~a;
      if (n % 2 == 0) c_exp = ~c_exp;
      else            d_exp = ~d_exp;
      @(negedge clk);   // one clock later
      checks++;
      if (c !== c_exp || d !== d_exp) begin
        failures++;
        $display("FAIL event %0d: c=%b d=%b expected %b %b", n, c, d, c_exp, d_exp);
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
