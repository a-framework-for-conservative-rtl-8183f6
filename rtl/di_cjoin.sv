// Cjoin: the conservative M x N Join.
//
// It behaves as the M x N Join (wait for one row event and one column event,
// in either order) but every output terminal is "doubled": the selected pair
// out[row][col][0] and out[row][col][1] both make a transition, so two events
// leave for the two consumed. Example, 2 x 1 Cjoin with column a and rows b0,
// b1: pref(((a? || b0?)(c00! || c01!)) | ((a? || b1?)(c10! || c11!)))*.
// The doubled terminal acts as an internal Fork, which is how conservative
// circuits avoid explicit Forks. A 1 x 1 Cjoin with a bubble on one input is
// the "initialized 1 x 1 Cjoin" used in place of a Fork: it fires on the first
// event of its other input and must be re-armed by an event on the bubbled one.
//
// Bubbles: INIT_ROW / INIT_COL (-1 for none) mark the input whose event counts
// as received after reset. Inputs must be 0 when reset is released.
// Timing: both outputs flip one clock after the later of the two inputs.
module di_cjoin #(
  parameter int unsigned M        = 2,
  parameter int unsigned N        = 1,
  parameter int          INIT_ROW = -1,
  parameter int          INIT_COL = -1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [M-1:0]              row,
  input  logic [N-1:0]              col,
  output logic [M-1:0][N-1:0][1:0]  out
);

  logic [M-1:0] row_seen;
  logic [N-1:0] col_seen;
  logic [M-1:0] row_pend;
  logic [N-1:0] col_pend;
  logic         fire;

  assign row_pend = row ^ row_seen;
  assign col_pend = col ^ col_seen;
  assign fire     = (row_pend != '0) && (col_pend != '0);

  function automatic logic [M-1:0] row_reset();
    logic [M-1:0] v;
    for (int i = 0; i < int'(M); i++) v[i] = (i == INIT_ROW);
    return v;
  endfunction
  function automatic logic [N-1:0] col_reset();
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i++) v[i] = (i == INIT_COL);
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_seen <= row_reset();
      col_seen <= col_reset();
      out      <= '0;
    end else if (fire) begin
      row_seen <= row_seen ^ row_pend;
      col_seen <= col_seen ^ col_pend;
      for (int r = 0; r < int'(M); r++)
        for (int c = 0; c < int'(N); c++)
          if (row_pend[r] && col_pend[c]) out[r][c] <= ~out[r][c];
    end
  end

  a_one_row: assert property (@(posedge clk) disable iff (!rst_n) $countones(row_pend) <= 1)
    else $error("di_cjoin: events on two rows");
  a_one_col: assert property (@(posedge clk) disable iff (!rst_n) $countones(col_pend) <= 1)
    else $error("di_cjoin: events on two columns");

endmodule
