// End-to-end test of the conservative state machine at its default size.
//
// The environment sends events on the two inputs, one at a time or both at
// once, and the bench runs its own copy of the example transition table for
// every input the sequencer grants (the grant order under concurrent inputs is
// the machine's free choice, so the bench follows the order it observes). At
// each quiet point it compares the number of events seen on every output with
// the model, checks that each sent input was granted exactly once, and checks
// conservation: inputs minus outputs equals the events held in the stack
// beyond its initial one. The latency from input to output of single-output
// steps is checked, and every mechanism (single output, push,
// pop, concurrent inputs served one after the other) must occur.
module tb_cfsm_top;

  localparam int M = 2, N = 3, O = 2;
  // input event to output event of a single-output step when idle: 11 clocks
  // through sequencer (7) and transition Cjoin tree (4), plus 2 cycles for
  // this bench to sample the change
  localparam int LAT_EXP = 13;
  localparam int QUIET   = 60;     // cycles that surely finish one step

  logic         clk = 1'b0;
  logic         rst_n;
  logic [M-1:0] in_req;
  logic [O-1:0] out_ev;

  cfsm_top dut (.clk, .rst_n, .in_req, .out_ev);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // independent model of the example machine: 0 = out, 1 = push, 2 = pop
  int act  [M][N] = '{'{0, 1, 2}, '{1, 2, 0}};
  int nxt  [M][N] = '{'{0, 2, 1}, '{1, 0, 2}};
  int outc [M][N] = '{'{0, 0, 0}, '{0, 0, 1}};
  int state = 0;
  int stack_n = 1;
  int exp_out [O];
  int got_out [O];
  int sent [M], granted [M];
  int n_single = 0, n_push = 0, n_pop = 0, n_conc = 0, n_stack_max = 0;
  int in_total = 0;
  int lat_max_seen = 0, lat_min_seen = 1000;

  function automatic int onehot_index(logic [4:0] v);
    for (int k = 0; k < 5; k++) if (v[k]) return k;
    return -1;
  endfunction

  // follow the machine: each grant of input i is one step of the model
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
          case (act[i][state])
            0: begin exp_out[outc[i][state]]++; n_single++; end
            1: begin stack_n++; n_push++; end
            default: begin exp_out[0]++; exp_out[1]++; stack_n--; n_pop++; end
          endcase
          if (stack_n > n_stack_max) n_stack_max = stack_n;
          state = nxt[i][state];
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
    int lat;
    int n_before;
    int i;
    bit single;
    rst_n  = 1'b0;
    in_req = '0;
    for (int o = 0; o < O; o++) begin exp_out[o] = 0; got_out[o] = 0; end
    for (int i = 0; i < M; i++) begin sent[i] = 0; granted[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        send(0);
        send(1);
        n_conc++;
        repeat (2 * QUIET) @(posedge clk);
      end else begin
        i = int'($urandom_range(M - 1));
        single = (act[i][state] == 0);
        n_before = got_out[0] + got_out[1];
        send(i);
        lat = 0;
        while (lat < QUIET) begin
          @(posedge clk);
          lat++;
          if (single && got_out[0] + got_out[1] != n_before) break;
        end
        if (single) begin
          checks++;
          if (lat != LAT_EXP) begin
            failures++;
            $display("FAIL latency %0d cycles, expected %0d", lat, LAT_EXP);
          end
          if (lat > lat_max_seen) lat_max_seen = lat;
          if (lat < lat_min_seen) lat_min_seen = lat;
        end
        repeat (QUIET) @(posedge clk);
      end
      check_quiet();
    end

    $display("single-output step latency: %0d to %0d cycles", lat_min_seen, lat_max_seen);
    $display("mechanisms: single-output %0d, push %0d, pop %0d, concurrent pairs %0d, max stack %0d",
             n_single, n_push, n_pop, n_conc, n_stack_max);
    checks += 4;
    if (n_single == 0) begin failures++; $display("FAIL no single-output step"); end
    if (n_push == 0)   begin failures++; $display("FAIL no push"); end
    if (n_pop == 0)    begin failures++; $display("FAIL no pop"); end
    if (n_conc == 0)   begin failures++; $display("FAIL no concurrent inputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
