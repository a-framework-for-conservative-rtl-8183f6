// Storage stack: keeps events that a conservative circuit would otherwise have
// to destroy, and gives them back when it must emit more events than it got.
//
// Push channel i: the two events store[i] and push[i] (sent together) are
// received, one event is kept in the stack and the other comes back as the
// acknowledgement z[i]. Pop channel j: one event on pop[j] is received, the
// top stored event is taken out, and both leave as the pair x[j], y[j]. So a
// push is two events in and one out, a pop one in and two out, and the stack
// never creates or destroys an event. Pushes and pops are strictly serial.
//
// Structure, all Cjoins and Merges:
//   * Stack pointer: a (1 + POP_CH) x (DEPTH+1) Cjoin. Its pending column
//     event is the pointer; column 0 means empty. Row 0 takes the push
//     requests (a Merge of all push[i]); row 1+j takes pop[j].
//   * Shadow register: a PUSH_CH x DEPTH Cjoin. A push at pointer k fires the
//     pointer Cjoin's pair (0, k): one event moves the pointer to k+1, the
//     other enters shadow column k, where it meets store[i]. The shadow's pair
//     (i, k) puts one event into storage cell k+1 and answers z[i] with the
//     other. The shadow thus follows the pointer during a push and keeps the
//     channel of the push.
//   * Storage cells 1..DEPTH: POP_CH x 1 Cjoins (1 x 1 for one pop channel).
//     A cell's column holds the stored event. A pop on channel j at pointer k
//     fires the pointer Cjoin's pair (1+j, k): one event moves the pointer to
//     k-1, the other is row j of cell k, which then releases x[j] and y[j].
//   Where several sources feed one input (pointer columns, cell columns, z, x,
//   y), a Merge joins them.
// After reset the pointer sits at INIT_ITEMS and cells 1..INIT_ITEMS hold
// events (bubbles). The stack pointer, shadow register and storage cells
// follow the standard construction. Giving each pop channel its own pointer
// row is this design's choice: a pop brings a single event, which has to both
// move the pointer and name its channel. A push to a full stack or a pop from
// an empty one is a protocol error (the stack is sized so that it never
// happens) and is flagged by an assertion.
//
// Timing: z follows the push request by 2 clocks, or the store event by 1 clock
// if that arrives later; x and y follow the pop request by 2 clocks.
module di_stack #(
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned PUSH_CH    = 2,
  parameter int unsigned POP_CH     = 2,
  parameter int unsigned INIT_ITEMS = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PUSH_CH-1:0] store,
  input  logic [PUSH_CH-1:0] push,
  output logic [PUSH_CH-1:0] z,
  input  logic [POP_CH-1:0]  pop,
  output logic [POP_CH-1:0]  x,
  output logic [POP_CH-1:0]  y
);

  localparam int unsigned R = 1 + POP_CH;   // pointer rows

  logic [R-1:0]                   sp_row;
  logic [DEPTH:0]                 sp_col;
  logic [R-1:0][DEPTH:0][1:0]     sp_out;
  logic [DEPTH-1:0]               sh_col;
  logic [PUSH_CH-1:0][DEPTH-1:0][1:0] sh_out;
  logic [DEPTH:1]                 cell_in;     // stored events, per cell
  logic [DEPTH:1][POP_CH-1:0]     cell_rel;    // pop releases, per cell
  logic [DEPTH:1][POP_CH-1:0][1:0] cell_out;

  assign sp_row = {pop, ^push};

  di_cjoin #(.M(R), .N(DEPTH + 1), .INIT_COL(INIT_ITEMS)) u_sp (
    .clk, .rst_n, .row(sp_row), .col(sp_col), .out(sp_out)
  );

  di_cjoin #(.M(PUSH_CH), .N(DEPTH)) u_shadow (
    .clk, .rst_n, .row(store), .col(sh_col), .out(sh_out)
  );

  for (genvar k = 1; k <= int'(DEPTH); k++) begin : g_cell
    di_cjoin #(.M(POP_CH), .N(1), .INIT_COL((k <= int'(INIT_ITEMS)) ? 0 : -1)) u_cell (
      .clk, .rst_n, .row(cell_rel[k]), .col(cell_in[k]), .out(cell_out[k])
    );
  end

  // Merges
  always_comb begin
    sp_col   = '0;
    sh_col   = '0;
    cell_in  = '0;
    cell_rel = '0;
    z        = '0;
    x        = '0;
    y        = '0;
    for (int k = 0; k <= int'(DEPTH); k++) begin
      // push at k: pointer to k+1, shadow column k
      if (k < int'(DEPTH)) begin
        sp_col[k+1] ^= sp_out[0][k][0];
        sh_col[k]   ^= sp_out[0][k][1];
      end
      // pop on channel j at k: pointer to k-1, release cell k
      if (k > 0)
        for (int j = 0; j < int'(POP_CH); j++) begin
          sp_col[k-1]    ^= sp_out[1+j][k][0];
          cell_rel[k][j] ^= sp_out[1+j][k][1];
        end
    end
    for (int i = 0; i < int'(PUSH_CH); i++)
      for (int k = 0; k < int'(DEPTH); k++) begin
        cell_in[k+1] ^= sh_out[i][k][0];
        z[i]         ^= sh_out[i][k][1];
      end
    for (int k = 1; k <= int'(DEPTH); k++)
      for (int j = 0; j < int'(POP_CH); j++) begin
        x[j] ^= cell_out[k][j][0];
        y[j] ^= cell_out[k][j][1];
      end
  end

  // a push at the top or a pop at the bottom would fire these pairs
  function automatic logic misused(logic [R-1:0][DEPTH:0][1:0] o);
    logic m = (o[0][DEPTH] != 2'b00);
    for (int j = 0; j < int'(POP_CH); j++) m |= (o[1+j][0] != 2'b00);
    return m;
  endfunction

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !misused(sp_out))
    else $error("di_stack: push to a full stack or pop from an empty one");

endmodule
