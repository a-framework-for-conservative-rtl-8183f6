// Conservative state machine: a finite state machine built only from
// conservative delay-insensitive elements, so that no event is created or
// destroyed while it runs (one event in per input, the stack keeping any
// surplus for later outputs).
//
// Operation, one step per environment input:
//   1. The state register is a 1 x N Cjoin. Its column s holds the event that
//      marks the present state s; its row receives the clock event handed back
//      by the input sequencer. When both are there it emits a doubled pair:
//      one event re-enters column s of the transition Cjoin, the other is the
//      clock event c of the M-way CSequencer.
//   2. The M-way CSequencer picks one pending environment input i (inputs may
//      arrive concurrently; they are served one at a time) and emits its grant
//      into row i of the M x N transition Cjoin, returning the clock event.
//   3. The transition Cjoin joins row i with column s and emits a doubled pair
//      u[i][s][0], u[i][s][1]. Per the transition table:
//        ACT_OUT : u0 goes to the next state, u1 to output CHAN[i][s];
//        ACT_PUSH: no output; both events are pushed into the storage stack on
//                  push channel CHAN[i][s], whose acknowledgement carries the
//                  next state PUSH_NEXT[CHAN[i][s]] (NEXT[i][s] must equal it);
//        ACT_POP : two outputs; u0 goes to the next state, u1 pops the stack on
//                  pop channel CHAN[i][s] and the pair returned goes to outputs
//                  POP_X and POP_Y of that channel.
//   Every fan-in of several sources onto one wire is a Merge (exclusive-or);
//   only one step is in flight, so these Merges never see two events at once.
//
// Interface: in_req[i] carries environment input events, out_ev[o] output
// events, both by transition signalling (an event is a change of level). The
// environment sends a new event on an input only after the previous one on that
// input has been taken (here: after the response to it has appeared).
// Timing: with M = 2 and the machine idle, an output event follows its input
// event by 11 clocks (7 through the sequencer, 4 through the transition Cjoin);
// a pop adds 2 clocks (through the stack), and a push hands the next state
// over 2 clocks after the transition Cjoin fires.
//
// The default table is an example machine with two inputs a, b, three states
// and two outputs x, y (see the table parameters below); the stack has depth
// 4 with two push and two pop channels and starts holding one event.
module cfsm_top
  import di_pkg::*;
#(
  parameter int unsigned M           = 2,   // environment inputs
  parameter int unsigned N           = 3,   // states
  parameter int unsigned O           = 2,   // outputs
  parameter int unsigned INIT_STATE  = 0,
  parameter int unsigned STACK_DEPTH = 4,
  parameter int unsigned PUSH_CH     = 2,
  parameter int unsigned POP_CH      = 2,
  parameter int unsigned STACK_INIT  = 1,
  // transition table, indexed [input][state]
  parameter cfsm_act_e   ACTION [M][N] = '{'{ACT_OUT,  ACT_PUSH, ACT_POP},
                                           '{ACT_PUSH, ACT_POP,  ACT_OUT}},
  parameter int unsigned NEXT   [M][N] = '{'{0, 2, 1},
                                           '{1, 0, 2}},
  parameter int unsigned CHAN   [M][N] = '{'{0, 1, 1},
                                           '{0, 0, 1}},
  parameter int unsigned PUSH_NEXT [PUSH_CH] = '{1, 2},
  parameter int unsigned POP_X     [POP_CH]  = '{0, 0},
  parameter int unsigned POP_Y     [POP_CH]  = '{1, 1}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] in_req,
  output logic [O-1:0] out_ev
);

  logic [M-1:0]               grant;       // sequencer grants = transition rows
  logic                       seq_c;       // clock event into the sequencer
  logic                       seq_c_ret;   // clock event handed back
  logic [N-1:0]               next_col;    // next-state events
  logic [0:0][N-1:0][1:0]     state_v;
  logic [N-1:0]               state_col;
  logic [N-1:0]               clk_src;
  logic [M-1:0][N-1:0][1:0]   u;           // transition Cjoin outputs
  logic [PUSH_CH-1:0]         push_store, push_req, push_ack;
  logic [POP_CH-1:0]          pop_req, pop_x, pop_y;

  di_cseq #(.M(M)) u_seq (
    .clk, .rst_n, .r(in_req), .g(grant), .c(seq_c), .c_out(seq_c_ret)
  );

  // state register: 1 x N Cjoin, initial state and first clock event bubbled
  di_cjoin #(.M(1), .N(N), .INIT_ROW(0), .INIT_COL(int'(INIT_STATE))) u_state (
    .clk, .rst_n, .row(seq_c_ret), .col(next_col), .out(state_v)
  );
  for (genvar s = 0; s < int'(N); s++) begin : g_state
    assign state_col[s] = state_v[0][s][0];
    assign clk_src[s]   = state_v[0][s][1];
  end

  di_merge #(.N(N)) u_clk_merge (.clk, .rst_n, .in(clk_src), .out(seq_c));

  // transition relation: M x N Cjoin, rows = inputs, columns = states, built
  // as a tree of small Cjoins
  di_cjoin_tree #(.M(M), .N(N)) u_trans (
    .clk, .rst_n, .row(grant), .col(state_col), .out(u)
  );

  di_stack #(
    .DEPTH(STACK_DEPTH), .PUSH_CH(PUSH_CH), .POP_CH(POP_CH), .INIT_ITEMS(STACK_INIT)
  ) u_stack (
    .clk, .rst_n,
    .store(push_store), .push(push_req), .z(push_ack),
    .pop(pop_req), .x(pop_x), .y(pop_y)
  );

  // steering Merges given by the transition table
  always_comb begin
    next_col   = '0;
    out_ev     = '0;
    push_store = '0;
    push_req   = '0;
    pop_req    = '0;
    for (int i = 0; i < int'(M); i++) begin
      for (int s = 0; s < int'(N); s++) begin
        unique case (ACTION[i][s])
          ACT_OUT: begin
            next_col[NEXT[i][s]] ^= u[i][s][0];
            out_ev[CHAN[i][s]]   ^= u[i][s][1];
          end
          ACT_PUSH: begin
            push_store[CHAN[i][s]] ^= u[i][s][0];
            push_req[CHAN[i][s]]   ^= u[i][s][1];
          end
          ACT_POP: begin
            next_col[NEXT[i][s]] ^= u[i][s][0];
            pop_req[CHAN[i][s]]  ^= u[i][s][1];
          end
          default: ;
        endcase
      end
    end
    for (int p = 0; p < int'(PUSH_CH); p++) next_col[PUSH_NEXT[p]] ^= push_ack[p];
    for (int q = 0; q < int'(POP_CH); q++) begin
      out_ev[POP_X[q]] ^= pop_x[q];
      out_ev[POP_Y[q]] ^= pop_y[q];
    end
  end

endmodule
