// Cjoin tree: an M x N conservative Join decomposed recursively into small
// Cjoins, Ctrias and Merges, following the quadrant ("Tjoin") scheme.
//
// External behaviour is that of di_cjoin: one row event and one column event
// in, both wires of out[row][col] out. Inside, every dimension with two or more
// wires is split into a lower and an upper half:
//   * Each input wire enters an initialized 1 x 1 Cjoin (a Ctria with a bubble
//     on its re-arm edge) that stands in for a Fork: copy a goes to the Merge
//     of its half, copy b waits in a steering Cjoin ("Tree-Mux").
//   * The central Cjoin joins the row half with the column half and so picks
//     the quadrant. Its doubled output goes to the row steering Cjoin of the
//     chosen row half (as column "which column half") and to the column
//     steering Cjoin of the chosen column half (as row "which row half").
//   * A steering Cjoin joins the waiting input copy with that choice. One wire
//     of its doubled output is the input of the quadrant's own Cjoin tree; the
//     other is a spare event that, through a Merge of the spares for that input
//     wire, re-arms the input's 1 x 1 Cjoin for its next event.
//   * The quadrant tree resolves the pair inside the quadrant and produces the
//     external output.
// Steering Cjoins and quadrants are themselves Cjoin trees; the recursion stops
// at Cjoins of at most 2 x 2, which are single di_cjoin elements. Every
// element takes two events and gives two (Merges one for one), so the tree
// creates and destroys no event: the two spare events are exactly the two
// re-arm events.
//
// Unlike a design with balanced binary decoders, which decode every level of
// the inputs at once, this tree resolves one level after another, so its
// response time grows faster than log max(M, N).
// The quadrant split, the end of the recursion at 2 x 2, and the re-arming of
// the input 1 x 1 Cjoins by spare outputs through Merges follow the standard
// construction; building the steering Cjoins as trees of the same kind and
// putting an odd extra wire in the lower half are choices of this design.
// Inputs must be 0 when reset is released; the environment must wait for the
// output before sending the next pair. Timing: one clock per element on the
// longest path; 2 x 2 and smaller take 1 clock, 2 x 3 and 4 x 4 take 4 clocks,
// 2 x 8 takes 10 clocks.
// When this module alone is linted as the top, the Verilator 5 linter also
// checks a copy in which the recursive instances are not expanded, and reports
// the steering and quadrant outputs (so, qo) as undriven. That copy is not
// part of any design; every elaborated instance drives them, as the tests show.
module di_cjoin_tree #(
  parameter int unsigned M = 2,
  parameter int unsigned N = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [M-1:0]              row,
  input  logic [N-1:0]              col,
  output logic [M-1:0][N-1:0][1:0]  out
);

  if (M <= 2 && N <= 2) begin : g_leaf
    di_cjoin #(.M(M), .N(N)) u_join (.clk, .rst_n, .row, .col, .out);
  end else begin : g_split
    localparam int unsigned HR = (M >= 2) ? 2 : 1;   // row halves
    localparam int unsigned HC = (N >= 2) ? 2 : 1;   // column halves
    localparam int unsigned ML = (HR == 2) ? M - M / 2 : M;  // rows in lower half
    localparam int unsigned NL = (HC == 2) ? N - N / 2 : N;  // columns in lower half

    logic [M-1:0] row_a, row_b, row_rearm;
    logic [N-1:0] col_a, col_b, col_rearm;
    logic [HR-1:0] half_row;              // Merge of each row half
    logic [HC-1:0] half_col;
    logic [HR-1:0][HC-1:0][1:0] cen;      // central Cjoin
    logic [HC-1:0][M-1:0] q_row;          // steered row events, per column half
    logic [HC-1:0][M-1:0] r_spare;
    logic [HR-1:0][N-1:0] q_col;          // steered column events, per row half
    logic [HR-1:0][N-1:0] c_spare;

    // initialized 1 x 1 Cjoins in place of the input Forks
    for (genvar r = 0; r < int'(M); r++) begin : g_rfork
      logic [2:0][1:0] v;
      di_ctria #(.INIT_EDGE(1)) u_fork (
        .clk, .rst_n, .e({1'b0, row_rearm[r], row[r]}), .v
      );
      assign row_a[r] = v[0][0];
      assign row_b[r] = v[0][1];
    end
    for (genvar c = 0; c < int'(N); c++) begin : g_cfork
      logic [2:0][1:0] v;
      di_ctria #(.INIT_EDGE(1)) u_fork (
        .clk, .rst_n, .e({1'b0, col_rearm[c], col[c]}), .v
      );
      assign col_a[c] = v[0][0];
      assign col_b[c] = v[0][1];
    end

    // Merges: half selection and re-arm events
    assign half_row[0] = ^row_a[ML-1:0];
    if (HR == 2) begin : g_hr1
      assign half_row[1] = ^row_a[M-1:ML];
    end
    assign half_col[0] = ^col_a[NL-1:0];
    if (HC == 2) begin : g_hc1
      assign half_col[1] = ^col_a[N-1:NL];
    end
    always_comb begin
      row_rearm = '0;
      col_rearm = '0;
      for (int h = 0; h < int'(HC); h++) row_rearm ^= r_spare[h];
      for (int h = 0; h < int'(HR); h++) col_rearm ^= c_spare[h];
    end

    di_cjoin #(.M(HR), .N(HC)) u_central (
      .clk, .rst_n, .row(half_row), .col(half_col), .out(cen)
    );

    // row steering: one Cjoin tree per row half, columns = column-half choice
    for (genvar hr = 0; hr < int'(HR); hr++) begin : g_rsteer
      localparam int unsigned RS = (hr == 0) ? ML : M - ML;
      localparam int unsigned RB = (hr == 0) ? 0 : ML;
      logic [HC-1:0] sel;
      logic [RS-1:0][HC-1:0][1:0] so;
      for (genvar hc = 0; hc < int'(HC); hc++) begin : g_sel
        assign sel[hc] = cen[hr][hc][0];
        for (genvar r = 0; r < int'(RS); r++) begin : g_o
          assign q_row[hc][RB+r]   = so[r][hc][0];
          assign r_spare[hc][RB+r] = so[r][hc][1];
        end
      end
      di_cjoin_tree #(.M(RS), .N(HC)) u_steer (
        .clk, .rst_n, .row(row_b[RB +: RS]), .col(sel), .out(so)
      );
    end
    // column steering: one Cjoin tree per column half, rows = row-half choice
    for (genvar hc = 0; hc < int'(HC); hc++) begin : g_csteer
      localparam int unsigned CS = (hc == 0) ? NL : N - NL;
      localparam int unsigned CB = (hc == 0) ? 0 : NL;
      logic [HR-1:0] sel;
      logic [HR-1:0][CS-1:0][1:0] so;
      for (genvar hr = 0; hr < int'(HR); hr++) begin : g_sel
        assign sel[hr] = cen[hr][hc][1];
        for (genvar c = 0; c < int'(CS); c++) begin : g_o
          assign q_col[hr][CB+c]   = so[hr][c][0];
          assign c_spare[hr][CB+c] = so[hr][c][1];
        end
      end
      di_cjoin_tree #(.M(HR), .N(CS)) u_steer (
        .clk, .rst_n, .row(sel), .col(col_b[CB +: CS]), .out(so)
      );
    end

    // quadrants
    for (genvar hr = 0; hr < int'(HR); hr++) begin : g_qr
      for (genvar hc = 0; hc < int'(HC); hc++) begin : g_qc
        localparam int unsigned RS = (hr == 0) ? ML : M - ML;
        localparam int unsigned RB = (hr == 0) ? 0 : ML;
        localparam int unsigned CS = (hc == 0) ? NL : N - NL;
        localparam int unsigned CB = (hc == 0) ? 0 : NL;
        logic [RS-1:0][CS-1:0][1:0] qo;
        di_cjoin_tree #(.M(RS), .N(CS)) u_quad (
          .clk, .rst_n, .row(q_row[hc][RB +: RS]), .col(q_col[hr][CB +: CS]), .out(qo)
        );
        for (genvar r = 0; r < int'(RS); r++) begin : g_r
          for (genvar c = 0; c < int'(CS); c++) begin : g_c
            assign out[RB+r][CB+c] = qo[r][c];
          end
        end
      end
    end
  end

endmodule
