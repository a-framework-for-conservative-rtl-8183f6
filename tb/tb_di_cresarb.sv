// Test of the N-way CResource arbiter (N = 2 uses di_cresarb2 directly, N = 4
// and N = 3 use the tree). Clients request at random, the bench acts as the
// resource: on each res_req event it answers with res_done after a random
// delay. Checks: the resource is never invoked again before it has answered;
// each grant goes to a client with an outstanding request; every resource
// cycle ends in exactly one grant, with the latency from res_done to the grant
// of 3 clocks per arbiter level; all requests are served; and the event counts
// balance (conservation).
module tb_di_cresarb;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // one arbiter plus its resource and clients, checked independently
  logic [3:0] r4, g4;   logic q4, d4;
  logic [2:0] r3, g3;   logic q3, d3;
  logic [1:0] r2, g2;   logic q2, d2;

  di_cresarb #(.N(4)) dut4 (.clk, .rst_n, .r(r4), .g(g4), .res_req(q4), .res_done(d4));
  di_cresarb #(.N(3)) dut3 (.clk, .rst_n, .r(r3), .g(g3), .res_req(q3), .res_done(d3));
  di_cresarb2         dut2 (.clk, .rst_n, .r(r2), .g(g2), .res_req(q2), .res_done(d2));

  // one harness, instantiated as a task per arbiter size
  `define ARB_HARNESS(NAME, N, R, G, Q, D, LAT_LO, LAT_HI) \
  task automatic NAME(); \
    int outstanding [N]; \
    int served = 0, sent = 0, cycles = 0; \
    logic [N-1:0] g_q; \
    logic q_q; \
    bit busy = 0; \
    int since_done = -1; \
    for (int i = 0; i < N; i++) outstanding[i] = 0; \
    g_q = G; q_q = Q; \
    for (int t = 0; t < 6000; t++) begin \
      @(negedge clk); \
      for (int i = 0; i < N; i++) \
        if (G[i] != g_q[i]) begin \
          checks++; \
          if (outstanding[i] == 0) begin failures++; $display("FAIL %s grant to idle client %0d", `"NAME`", i); end \
          checks++; \
          if (since_done + 1 < LAT_LO || since_done + 1 > LAT_HI) begin failures++; \
            $display("FAIL %s grant %0d clocks after done", `"NAME`", since_done + 1); end \
          outstanding[i] = 0; served++; since_done = -1; \
        end \
      g_q = G; \
      if (since_done >= 0) since_done++; \
      if (Q != q_q) begin \
        checks++; \
        if (busy) begin failures++; $display("FAIL %s resource invoked while busy", `"NAME`"); end \
        busy = 1; q_q = Q; cycles++; \
        fork begin repeat (1 + $urandom_range(5)) @(negedge clk); D = ~D; busy = 0; since_done = 0; end join_none \
      end \
      if (t < 5000) \
        for (int i = 0; i < N; i++) \
          if (outstanding[i] == 0 && $urandom_range(7) == 0) begin R[i] = ~R[i]; outstanding[i] = 1; sent++; end \
    end \
    checks += 2; \
    if (served != sent) begin failures++; $display("FAIL %s sent %0d served %0d", `"NAME`", sent, served); end \
    if (cycles != served) begin failures++; $display("FAIL %s resource cycles %0d grants %0d", `"NAME`", cycles, served); end \
    $display("%s: %0d requests served", `"NAME`", served); \
  endtask

  `ARB_HARNESS(run4, 4, r4, g4, q4, d4, 6, 6)
  `ARB_HARNESS(run3, 3, r3, g3, q3, d3, 3, 6)
  `ARB_HARNESS(run2, 2, r2, g2, q2, d2, 3, 3)

  initial begin
    rst_n = 1'b0; r4 = '0; r3 = '0; r2 = '0; d4 = 1'b0; d3 = 1'b0; d2 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      run4();
      run3();
      run2();
    join
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
