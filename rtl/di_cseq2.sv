// CSequencer, 2-way: a conservative Sequencer.
//
// A Sequencer serves two clients that may request at the same time. Each
// "clock" event on c (the previous grantee is done) lets it grant exactly one
// pending request, by an event on g[0] or g[1]. Unlike the plain Sequencer,
// which swallows the clock event, the CSequencer hands it back on c_out:
// pref((r0? g0!)* || (r1? g1!)* || (c? c'!)* || (c? (g0! | g1!))*).
//
// Construction: a 2-way CResource arbiter whose "resource" is a 1 x 1 Cjoin
// (a Ctria with one edge unused) joining the arbiter's resource request with
// the clock event. One wire of the doubled output is the resource's done
// event, the other leaves as c_out. Timing: with a request already waiting, the
// grant follows c by 4 clocks and c_out follows c by 1 clock.
module di_cseq2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] r,
  output logic [1:0] g,
  input  logic       c,
  output logic       c_out
);

  logic            res_req;
  logic            res_done;
  logic [2:0][1:0] join_v;

  di_cresarb2 u_arb (.clk, .rst_n, .r, .g, .res_req, .res_done);

  di_ctria u_clk_join (.clk, .rst_n, .e({1'b0, c, res_req}), .v(join_v));
  assign res_done = join_v[0][0];
  assign c_out    = join_v[0][1];

endmodule
