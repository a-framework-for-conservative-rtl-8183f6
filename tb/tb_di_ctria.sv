// Test of the Ctria: random pairs of edges, in random order and with random
// gaps; one clock after the second event both wires of the vertex between the
// two edges (a,b -> p, b,c -> q, a,c -> r) must have flipped, and nothing may
// change earlier. A second Ctria with a bubble on edge b checks the
// initialization used for the "initialized 1 x 1 Cjoin".
module tb_di_ctria;

  logic clk = 1'b0;
  logic rst_n;
  logic [2:0] e, eb;
  logic [2:0][1:0] v, exp_v, vb, exp_vb;
  int checks = 0, failures = 0;

  di_ctria dut (.clk, .rst_n, .e, .v);
  di_ctria #(.INIT_EDGE(1)) dutb (.clk, .rst_n, .e(eb), .v(vb));

  always #5 clk = ~clk;

  // vertex between edges x < y: (0,1) -> 0, (1,2) -> 1, (0,2) -> 2
  function automatic int vertex(int x, int y);
    if (x == 0 && y == 1) return 0;
    if (x == 1 && y == 2) return 1;
    return 2;
  endfunction

  initial begin
    int x, y, t;
    rst_n = 1'b0; e = '0; eb = '0; exp_v = '0; exp_vb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      x = int'($urandom_range(2));
      y = (x + 1 + int'($urandom_range(1))) % 3;
      if (x > y) begin t = x; x = y; y = t; end
      if ($urandom_range(1) == 0) e[x] = ~e[x]; else e[y] = ~e[y];
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (v !== exp_v) begin failures++; $display("FAIL early vertex at pair %0d", n); end
      end
      if (e[x] == dut.seen[x]) e[x] = ~e[x]; else e[y] = ~e[y];
      exp_v[vertex(x, y)] = ~exp_v[vertex(x, y)];
      @(negedge clk);
      checks++;
      if (v !== exp_v) begin
        failures++;
        $display("FAIL pair %0d edges %0d,%0d: v=%b expected %b", n, x, y, v, exp_v);
      end
    end
    // bubble on edge b: an event on a alone fires vertex p
    eb[0] = 1'b1; exp_vb[0] = 2'b11;
    @(negedge clk);
    checks++;
    if (vb !== exp_vb) begin failures++; $display("FAIL bubbled Ctria"); end
    eb[1] = 1'b1; eb[2] = 1'b0;
    eb[2] = 1'b1; exp_vb[1] = 2'b11;
    @(negedge clk);
    checks++;
    if (vb !== exp_vb) begin failures++; $display("FAIL bubbled Ctria second step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
