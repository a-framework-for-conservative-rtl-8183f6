// Test of the decomposed Cjoin, at 2 x 8, 4 x 4, 3 x 5, 1 x 5 and 5 x 1. Each
// tree gets random row/column pairs, the two events in random order with a
// random gap. Checks: no output moves before the second event; after it
// exactly the selected output flips, both wires in the same clock, within the
// expected response time (4 clocks for 4 x 4, 10 for the others); nothing else moves for a few clocks afterwards (no
// event is left behind or created inside the tree). The next pair follows the
// output at once or after a pause, so re-arming is exercised at full rate.
module tb_di_cjoin_tree;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [1:0] r28; logic [7:0] c28; logic [1:0][7:0][1:0] o28;
  logic [3:0] r44; logic [3:0] c44; logic [3:0][3:0][1:0] o44;
  logic [2:0] r35; logic [4:0] c35; logic [2:0][4:0][1:0] o35;
  logic [0:0] r15; logic [4:0] c15; logic [0:0][4:0][1:0] o15;
  logic [4:0] r51; logic [0:0] c51; logic [4:0][0:0][1:0] o51;

  di_cjoin_tree #(.M(2), .N(8)) dut28 (.clk, .rst_n, .row(r28), .col(c28), .out(o28));
  di_cjoin_tree #(.M(4), .N(4)) dut44 (.clk, .rst_n, .row(r44), .col(c44), .out(o44));
  di_cjoin_tree #(.M(3), .N(5)) dut35 (.clk, .rst_n, .row(r35), .col(c35), .out(o35));
  di_cjoin_tree #(.M(1), .N(5)) dut15 (.clk, .rst_n, .row(r15), .col(c15), .out(o15));
  di_cjoin_tree #(.M(5), .N(1)) dut51 (.clk, .rst_n, .row(r51), .col(c51), .out(o51));

  `define TREE_HARNESS(NAME, M, N, R, C, O, LAT_MAX) \
  task automatic NAME(); \
    logic [M-1:0][N-1:0][1:0] exp_o, prev_o; \
    int r, c, lat, lat_max; \
    bit row_first; \
    exp_o = '0; lat_max = 0; \
    for (int n = 0; n < 300; n++) begin \
      r = int'($urandom_range(M - 1)); \
      c = int'($urandom_range(N - 1)); \
      row_first = ($urandom_range(1) == 0); \
      if (row_first) R[r] = ~R[r]; \
      else           C[c] = ~C[c]; \
      repeat ($urandom_range(6)) begin \
        @(negedge clk); \
        checks++; \
        if (O !== exp_o) begin failures++; $display("FAIL %s early output at pair %0d", `"NAME`", n); end \
      end \
      if (row_first) C[c] = ~C[c]; \
      else           R[r] = ~R[r]; \
      prev_o = exp_o; \
      exp_o[r][c] = ~exp_o[r][c]; \
      lat = 0; \
      do begin @(negedge clk); lat++; end while (O === prev_o && lat < 100); \
      checks++; \
      if (O !== exp_o) begin \
        failures++; \
        $display("FAIL %s pair %0d (%0d,%0d) after %0d clocks: out=%h expected %h", `"NAME`", n, r, c, lat, O, exp_o); \
        exp_o = O; \
      end \
      checks++; \
      if (lat > LAT_MAX) begin failures++; $display("FAIL %s response %0d clocks", `"NAME`", lat); end \
      if (lat > lat_max) lat_max = lat; \
      repeat (($urandom_range(1) == 0) ? 0 : 1 + $urandom_range(2 * LAT_MAX)) begin \
        @(negedge clk); \
        checks++; \
        if (O !== exp_o) begin failures++; $display("FAIL %s spurious output after pair %0d", `"NAME`", n); exp_o = O; end \
      end \
    end \
    $display("%s: longest response %0d clocks", `"NAME`", lat_max); \
  endtask

  `TREE_HARNESS(run28, 2, 8, r28, c28, o28, 10)
  `TREE_HARNESS(run44, 4, 4, r44, c44, o44, 4)
  `TREE_HARNESS(run35, 3, 5, r35, c35, o35, 10)
  `TREE_HARNESS(run15, 1, 5, r15, c15, o15, 10)
  `TREE_HARNESS(run51, 5, 1, r51, c51, o51, 10)

  initial begin
    rst_n = 1'b0;
    r28 = '0; c28 = '0; r44 = '0; c44 = '0; r35 = '0; c35 = '0;
    r15 = '0; c15 = '0; r51 = '0; c51 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      run28();
      run44();
      run35();
      run15();
      run51();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
