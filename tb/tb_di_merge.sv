// Test of the Merge: random single events on the inputs of a 2-input and a
// 5-input Merge; after every event the output must have made exactly one
// transition, in the same cycle (the Merge is combinational).
module tb_di_merge;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] in2;
  logic [4:0] in5;
  logic       out2, out5;
  logic       exp2, exp5;
  int checks = 0, failures = 0;

  di_merge            dut2 (.clk, .rst_n, .in(in2), .out(out2));
  di_merge #(.N(5))   dut5 (.clk, .rst_n, .in(in5), .out(out5));

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; in2 = '0; in5 = '0; exp2 = 1'b0; exp5 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in2[$urandom_range(1)] ^= 1'b1;
      exp2 = ~exp2;
      in5[$urandom_range(4)] ^= 1'b1;
      exp5 = ~exp5;
      #1;
      checks += 2;
      if (out2 !== exp2) begin failures++; $display("FAIL 2-input merge at event %0d", n); end
      if (out5 !== exp5) begin failures++; $display("FAIL 5-input merge at event %0d", n); end
      repeat ($urandom_range(2)) @(posedge clk);
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
