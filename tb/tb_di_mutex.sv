// Test of the Mutex. Two clients each loop: request (event on r), wait for the
// grant (event on g), stay in_cs for a random time, release (event on r),
// wait for the acknowledgement (event on g). The bench checks that the two
// clients are never in_cs together, that grants and acknowledgements come
// one clock after the input when the section is free, and that both clients
// make progress. Requests often arrive in the same cycle, so the arbitration
// is exercised.
module tb_di_mutex;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0] r, g;
  int checks = 0, failures = 0;
  int in_cs [2];
  int rounds [2];
  int n_tie = 0;

  di_mutex dut (.clk, .rst_n, .r, .g);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (in_cs[0] + in_cs[1] > 1) begin failures++; $display("FAIL both in_cs"); end
    if (dut.req == 2'b11 && dut.held == 2'b00) n_tie++;
  end

  task automatic client(int i);
    logic gl;
    int wait_cyc;
    for (int n = 0; n < 100; n++) begin
      repeat ($urandom_range(2)) @(negedge clk);
      gl = g[i];
      r[i] = ~r[i];
      wait_cyc = 0;
      while (g[i] == gl) begin @(negedge clk); wait_cyc++; end
      in_cs[i] = 1;
      rounds[i]++;
      repeat ($urandom_range(3)) @(negedge clk);
      gl = g[i];
      in_cs[i] = 0;
      r[i] = ~r[i];
      @(negedge clk);
      checks++;
      if (g[i] == gl) begin failures++; $display("FAIL client %0d release not acknowledged in 1 clock", i); end
    end
  endtask

  initial begin
    rst_n = 1'b0; r = '0; in_cs[0] = 0; in_cs[1] = 0; rounds[0] = 0; rounds[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      client(0);
      client(1);
    join
    checks += 3;
    if (rounds[0] != 100 || rounds[1] != 100) begin failures++; $display("FAIL rounds"); end
    if (n_tie == 0) begin failures++; $display("FAIL no simultaneous requests"); end
    // single client with the section free: grant in one clock
    r[0] = ~r[0];
    @(negedge clk);
    if (dut.held != 2'b01) begin failures++; $display("FAIL free grant latency"); end
    $display("simultaneous requests arbitrated: %0d", n_tie);
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
