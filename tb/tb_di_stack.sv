// Test of the storage stack at its default size (depth 4, two push and two
// pop channels, one event stored after reset). A random serial sequence of
// pushes and pops, kept within the stack's capacity, runs the pointer from
// empty to full and back. Each push (store and push events, in either order
// and with a random gap) must be acknowledged on its own channel's z, and each
// pop by both x and y of its channel, on no other wire and at the expected
// clock: 2 clocks after the push or pop request, or 1 clock after a store
// event that comes after the pointer has moved. The pointer (the pending
// column of the stack-pointer Cjoin) must follow the bench's own count.
module tb_di_stack;

  localparam int DEPTH = 4, PC = 2, QC = 2;
  logic clk = 1'b0;
  logic rst_n;
  logic [PC-1:0] store, push, z, z_exp;
  logic [QC-1:0] pop, x, y, x_exp, y_exp;
  int checks = 0, failures = 0;
  int count = 1;
  int n_full = 0, n_empty = 0;

  di_stack dut (.clk, .rst_n, .store, .push, .z, .pop, .x, .y);

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks++;
    if (z !== z_exp || x !== x_exp || y !== y_exp) begin
      failures++;
      $display("FAIL %s: z=%b x=%b y=%b expected %b %b %b", what, z, x, y, z_exp, x_exp, y_exp);
    end
    checks++;
    if (dut.u_sp.col_pend !== (5'(1) << count)) begin
      failures++;
      $display("FAIL %s: pointer %b, count %0d", what, dut.u_sp.col_pend, count);
    end
  endtask

  // outputs must not move for lat-1 clocks, then show the expected values
  task automatic answer(string what, int lat);
    logic [PC-1:0] z0;
    logic [QC-1:0] x0, y0;
    z0 = z; x0 = x; y0 = y;
    repeat (lat - 1) begin
      @(negedge clk);
      checks++;
      if (z !== z0 || x !== x0 || y !== y0) begin failures++; $display("FAIL %s: early answer", what); end
    end
    @(negedge clk);
    compare(what);
  endtask

  initial begin
    int ch, gap;
    bit push_first;
    rst_n = 1'b0; store = '0; push = '0; pop = '0; z_exp = '0; x_exp = '0; y_exp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare("reset");
    for (int n = 0; n < 400; n++) begin
      if (count < DEPTH && (count == 0 || $urandom_range(1) == 0)) begin
        ch = int'($urandom_range(PC - 1));
        push_first = ($urandom_range(1) == 0);
        gap = int'($urandom_range(3));
        if (push_first) push[ch] = ~push[ch]; else store[ch] = ~store[ch];
        repeat (gap) begin
          @(negedge clk);
          checks++;
          if (z !== z_exp) begin failures++; $display("FAIL half push answered"); end
        end
        if (push_first) store[ch] = ~store[ch]; else push[ch] = ~push[ch];
        z_exp[ch] = ~z_exp[ch];
        count++;
        if (count == DEPTH) n_full++;
        answer("push", (push_first && gap > 0) ? 1 : 2);
      end else begin
        ch = int'($urandom_range(QC - 1));
        pop[ch] = ~pop[ch];
        x_exp[ch] = ~x_exp[ch];
        y_exp[ch] = ~y_exp[ch];
        count--;
        if (count == 0) n_empty++;
        answer("pop", 2);
      end
      repeat ($urandom_range(2)) @(negedge clk);
    end
    checks += 2;
    if (n_full == 0)  begin failures++; $display("FAIL stack never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL stack never empty"); end
    $display("stack reached full %0d times, empty %0d times", n_full, n_empty);
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
