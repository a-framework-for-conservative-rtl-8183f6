// Test of the Cjoin. A 2 x 3 Cjoin gets random row/column pairs, the two
// events in random order and with random gaps; nothing may change before the
// second event, and one clock after it both wires of exactly the selected
// output (and no other) must have flipped. A 1 x 1 Cjoin with a bubble on its
// column must fire on its first row event alone, and then behave as a
// C-element.
module tb_di_cjoin;

  localparam int M = 2, N = 3;
  logic clk = 1'b0;
  logic rst_n;
  logic [M-1:0] row;
  logic [N-1:0] col;
  logic [M-1:0][N-1:0][1:0] out, exp_out;
  logic a1, b1;
  logic [0:0][0:0][1:0] o1;
  logic [1:0] exp1;
  int checks = 0, failures = 0;

  di_cjoin #(.M(M), .N(N)) dut (.clk, .rst_n, .row, .col, .out);
  di_cjoin #(.M(1), .N(1), .INIT_COL(0)) dut1 (.clk, .rst_n, .row(a1), .col(b1), .out(o1));

  always #5 clk = ~clk;

  initial begin
    int r, c;
    rst_n = 1'b0; row = '0; col = '0; exp_out = '0; a1 = 1'b0; b1 = 1'b0; exp1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      r = int'($urandom_range(M - 1));
      c = int'($urandom_range(N - 1));
      if ($urandom_range(1) == 0) row[r] = ~row[r];
      else                        col[c] = ~col[c];
      repeat ($urandom_range(4)) begin
        @(negedge clk);
        checks++;
        if (out !== exp_out) begin failures++; $display("FAIL early output at pair %0d", n); end
      end
      if (row[r] == dut.row_seen[r]) row[r] = ~row[r];
      else                           col[c] = ~col[c];
      exp_out[r][c] = ~exp_out[r][c];
      @(negedge clk);
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL pair %0d (%0d,%0d): out=%h expected %h", n, r, c, out, exp_out);
      end
    end
    // bubbled 1 x 1 Cjoin
    a1 = 1'b1; exp1 = 2'b11;
    @(negedge clk);
    checks++;
    if (o1[0][0] !== exp1) begin failures++; $display("FAIL bubbled Cjoin first event"); end
    for (int n = 0; n < 50; n++) begin
      a1 = ~a1;
      repeat (1 + $urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (o1[0][0] !== exp1) begin failures++; $display("FAIL bubbled Cjoin fired early"); end
      end
      b1 = ~b1;
      exp1 = ~exp1;
      @(negedge clk);
      checks++;
      if (o1[0][0] !== exp1) begin failures++; $display("FAIL bubbled Cjoin event %0d", n); end
    end
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
