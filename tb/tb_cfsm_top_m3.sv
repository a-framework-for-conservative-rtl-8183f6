// End-to-end test of the conservative state machine in a second configuration:
// three inputs (so the input sequencer is an odd-sized tree), two states and
// three outputs, with a table in which every input has its own kind of step:
//   a: single output (x from S0, y from S1) and a change of state;
//   b: push (channel 0 in S0, channel 1 in S1), state unchanged;
//   c: pop (pair x,z on channel 0 in S0, pair y,z on channel 1 in S1).
// The bench drives the stack all the way from empty to full (it sends b only
// when the stack has room and c only when it holds an event), follows the
// machine in the grant order it observes, and checks output counts, grants and
// conservation at every quiet point, as tb_cfsm_top does.
module tb_cfsm_top_m3;

  import di_pkg::*;

  localparam int M = 3, N = 2, O = 3, DEPTH = 4;
  localparam int QUIET = 80;
  localparam cfsm_act_e   T_ACTION [M][N] = '{'{ACT_OUT, ACT_OUT}, '{ACT_PUSH, ACT_PUSH}, '{ACT_POP, ACT_POP}};
  localparam int unsigned T_NEXT   [M][N] = '{'{1, 0}, '{0, 1}, '{0, 1}};
  localparam int unsigned T_CHAN   [M][N] = '{'{0, 1}, '{0, 1}, '{0, 1}};
  localparam int unsigned T_PUSH_NEXT [2] = '{0, 1};
  localparam int unsigned T_POP_X     [2] = '{0, 1};
  localparam int unsigned T_POP_Y     [2] = '{2, 2};

  logic         clk = 1'b0;
  logic         rst_n;
  logic [M-1:0] in_req;
  logic [O-1:0] out_ev;

  cfsm_top #(
    .M(M), .N(N), .O(O), .INIT_STATE(0),
    .STACK_DEPTH(DEPTH), .PUSH_CH(2), .POP_CH(2), .STACK_INIT(1),
    .ACTION(T_ACTION), .NEXT(T_NEXT), .CHAN(T_CHAN),
    .PUSH_NEXT(T_PUSH_NEXT), .POP_X(T_POP_X), .POP_Y(T_POP_Y)
  ) dut (.clk, .rst_n, .in_req, .out_ev);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int state = 0, stack_n = 1;
  int exp_out [O], got_out [O];
  int sent [M], granted [M];
  int in_total = 0;
  int n_out = 0, n_push = 0, n_pop = 0, n_conc = 0, n_full = 0, n_empty = 0;

  function automatic int onehot_index(logic [DEPTH:0] v);
    for (int k = 0; k <= DEPTH; k++) if (v[k]) return k;
    return -1;
  endfunction

  logic [M-1:0] grant_q;
  logic [O-1:0] out_q;
  always @(posedge clk) begin
    if (!rst_n) begin
      grant_q <= '0;
      out_q   <= '0;
    end else begin
      grant_q <= dut.grant;
      out_q   <= out_ev;
      for (int o = 0; o < O; o++) if (out_ev[o] != out_q[o]) got_out[o]++;
      for (int i = 0; i < M; i++) begin
        if (dut.grant[i] != grant_q[i]) begin
          granted[i]++;
          case (i)
            0: begin exp_out[state]++; state = 1 - state; n_out++; end
            1: begin stack_n++; n_push++; if (stack_n == DEPTH) n_full++; end
            default: begin exp_out[state]++; exp_out[2]++; stack_n--; n_pop++;
                           if (stack_n == 0) n_empty++; end
          endcase
        end
      end
    end
  end

  task automatic check_quiet();
    int sum_got = 0;
    for (int o = 0; o < O; o++) begin
      checks++;
      if (got_out[o] != exp_out[o]) begin
        failures++;
        $display("FAIL output %0d: %0d events, expected %0d", o, got_out[o], exp_out[o]);
      end
      sum_got += got_out[o];
    end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (granted[i] != sent[i]) begin
        failures++;
        $display("FAIL input %0d: sent %0d, granted %0d", i, sent[i], granted[i]);
      end
    end
    checks++;
    if (in_total - sum_got != onehot_index(dut.u_stack.u_sp.col_pend) - 1) begin
      failures++;
      $display("FAIL conservation: in %0d out %0d stack %0d", in_total, sum_got,
               onehot_index(dut.u_stack.u_sp.col_pend));
    end
  endtask

  task automatic send(int i);
    in_req[i] = ~in_req[i];
    sent[i]++;
    in_total++;
  endtask

  initial begin
    int i;
    rst_n  = 1'b0;
    in_req = '0;
    for (int o = 0; o < O; o++) begin exp_out[o] = 0; got_out[o] = 0; end
    for (int k = 0; k < M; k++) begin sent[k] = 0; granted[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      if (stack_n >= 1 && stack_n <= DEPTH - 1 && $urandom_range(3) == 0) begin
        // all three inputs at once: at most one push and one pop, so the stack
        // stays within its bounds in any order
        send(0); send(1); send(2);
        n_conc++;
      end else begin
        // bias the stack towards its ends
        do i = int'($urandom_range(M - 1));
        while ((i == 1 && stack_n == DEPTH) || (i == 2 && stack_n == 0) ||
               (i == 1 && (it / 40) % 2 == 1 && $urandom_range(1) == 0) ||
               (i == 2 && (it / 40) % 2 == 0 && $urandom_range(1) == 0));
        send(i);
      end
      repeat (QUIET) @(posedge clk);
      check_quiet();
    end

    $display("mechanisms: output %0d, push %0d, pop %0d, concurrent triples %0d, full %0d, empty %0d",
             n_out, n_push, n_pop, n_conc, n_full, n_empty);
    checks += 6;
    if (n_out == 0)   begin failures++; $display("FAIL no single-output step"); end
    if (n_push == 0)  begin failures++; $display("FAIL no push"); end
    if (n_pop == 0)   begin failures++; $display("FAIL no pop"); end
    if (n_conc == 0)  begin failures++; $display("FAIL no concurrent inputs"); end
    if (n_full == 0)  begin failures++; $display("FAIL stack never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL stack never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
