// Test of the CSequencer, 2-way (di_cseq2) and M-way (di_cseq with M = 4, 3
// and 1). Clients request at random, one outstanding request each. The bench
// sends clock events on c; after each one it waits for the grant. Checks: the
// clock event comes back on c_out, one clock later when a request is already
// waiting at the sequencer's join; each clock event yields
// exactly one grant, to a client with an outstanding request; when requests
// and the previous grant are far enough in the past the grant follows c by 4 clocks plus 3 per
// arbiter level; all requests are served.
module tb_di_cseq;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [1:0] r2, g2;  logic c2, co2;
  logic [3:0] r4, g4;  logic c4, co4;
  logic [2:0] r3, g3;  logic c3, co3;
  logic [0:0] r1, g1;  logic c1, co1;

  di_cseq2          dut2 (.clk, .rst_n, .r(r2), .g(g2), .c(c2), .c_out(co2));
  di_cseq #(.M(4))  dut4 (.clk, .rst_n, .r(r4), .g(g4), .c(c4), .c_out(co4));
  di_cseq #(.M(3))  dut3 (.clk, .rst_n, .r(r3), .g(g3), .c(c3), .c_out(co3));
  di_cseq #(.M(1))  dut1 (.clk, .rst_n, .r(r1), .g(g1), .c(c1), .c_out(co1));

  `define SEQ_HARNESS(NAME, N, R, G, C, CO, LAT_LO, LAT_HI) \
  task automatic NAME(); \
    int age [N]; \
    int sent = 0, served = 0, n_lat = 0; \
    logic [N-1:0] g_q; \
    logic co_q; \
    int lat, grants, pre; \
    bit settled; \
    for (int i = 0; i < N; i++) age[i] = -1; \
    for (int k = 0; k < 300; k++) begin \
      pre = int'($urandom_range(16)); \
      repeat (pre) begin \
        @(negedge clk); \
        for (int i = 0; i < N; i++) begin \
          if (age[i] >= 0) age[i]++; \
          else if ($urandom_range(3) == 0) begin R[i] = ~R[i]; age[i] = 0; sent++; end \
        end \
      end \
      settled = (pre >= 10); \
      for (int i = 0; i < N; i++) if (age[i] >= 0 && age[i] < 10) settled = 1'b0; \
      if (!(age.or() with (item >= 10))) settled = 1'b0; \
      g_q = G; co_q = CO; \
      C = ~C; \
      lat = 0; grants = 0; \
      while (grants == 0 && lat < 200) begin \
        @(negedge clk); lat++; \
        if (lat == 1 && settled) begin checks++; if (CO == co_q) begin failures++; $display("FAIL %s c_out late", `"NAME`"); end end \
        for (int i = 0; i < N; i++) begin \
          if (G[i] != g_q[i]) begin \
            grants++; served++; checks++; \
            if (age[i] < 0) begin failures++; $display("FAIL %s grant to idle client %0d", `"NAME`", i); end \
            age[i] = -1; \
          end \
          else if (age[i] >= 0) age[i]++; \
          else if (lat > 2 && $urandom_range(15) == 0) begin R[i] = ~R[i]; age[i] = 0; sent++; end \
        end \
        g_q = G; \
      end \
      checks += 2; \
      if (CO == co_q) begin failures++; $display("FAIL %s no c_out", `"NAME`"); end \
      if (grants != 1) begin failures++; $display("FAIL %s %0d grants for one clock event", `"NAME`", grants); end \
      if (settled) begin \
        checks++; n_lat++; \
        if (lat < LAT_LO || lat > LAT_HI) begin failures++; $display("FAIL %s grant %0d clocks after c", `"NAME`", lat); end \
      end \
      repeat (3) @(negedge clk); \
      g_q = G; \
      checks++; \
      if (g_q != G) begin failures++; $display("FAIL %s grant without clock event", `"NAME`"); end \
    end \
    $display("%s: %0d grants, %0d latency checks", `"NAME`", served, n_lat); \
  endtask

  `SEQ_HARNESS(run2, 2, r2, g2, c2, co2, 4, 4)
  `SEQ_HARNESS(run4, 4, r4, g4, c4, co4, 7, 7)
  `SEQ_HARNESS(run3, 3, r3, g3, c3, co3, 4, 7)
  `SEQ_HARNESS(run1, 1, r1, g1, c1, co1, 1, 1)

  initial begin
    rst_n = 1'b0; r2 = '0; r4 = '0; r3 = '0; r1 = '0;
    c2 = 1'b0; c4 = 1'b0; c3 = 1'b0; c1 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      run2();
      run4();
      run3();
      run1();
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
