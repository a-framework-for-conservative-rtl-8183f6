// CSequencer, M-way: the multi-way conservative Sequencer.
//
// Same behaviour as di_cseq2 with M clients: each clock event on c grants
// exactly one pending request and is handed back on c_out. Construction: the
// clients are split into two halves, each half is merged into one request by a
// CResource arbiter, and the two half-requests are the clients of a 2-way
// CSequencer. The CSequencer's grant of a half is the done event of that half's
// arbiter, which then grants its own client. With M = 1 the sequencer is a
// single 1 x 1 Cjoin of the request and the clock.
//
// Timing: with a request already waiting, the grant follows c by 4 clocks plus
// 3 per arbiter level below the 2-way CSequencer; c_out follows c by 1 clock.
module di_cseq #(
  parameter int unsigned M = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] r,
  output logic [M-1:0] g,
  input  logic         c,
  output logic         c_out
);

  if (M == 1) begin : g_single
    logic [2:0][1:0] join_v;
    di_ctria u_clk_join (.clk, .rst_n, .e({1'b0, c, r[0]}), .v(join_v));
    assign g[0]  = join_v[0][0];
    assign c_out = join_v[0][1];
  end else begin : g_multi
    localparam int unsigned ML = M - M / 2;
    localparam int unsigned MH = M / 2;
    logic [1:0] half_req;
    logic [1:0] half_grant;

    di_cresarb #(.N(ML)) u_lo (
      .clk, .rst_n, .r(r[ML-1:0]), .g(g[ML-1:0]),
      .res_req(half_req[0]), .res_done(half_grant[0])
    );
    di_cresarb #(.N(MH)) u_hi (
      .clk, .rst_n, .r(r[M-1:ML]), .g(g[M-1:ML]),
      .res_req(half_req[1]), .res_done(half_grant[1])
    );
    di_cseq2 u_seq (
      .clk, .rst_n, .r(half_req), .g(half_grant), .c, .c_out
    );
  end

endmodule
