// CResource arbiter, N-way: a tree of 2-way conservative Resource arbiters.
//
// The tree is laid out as a heap: node k (1 .. N-1) is a 2-way CResource
// arbiter whose two clients are nodes 2k and 2k+1, and the N clients are the
// leaves N .. 2N-1. A node's resource request is the request of its parent's
// client, and the parent's grant is the node's done event; the root (node 1)
// owns the real resource. So a request climbs the tree, one arbitration per
// level, the resource runs once, and the done event descends again to the
// client served. The tree is balanced: leaf depths differ by at most one.
// With one client there is nothing to arbitrate and the request is passed to
// the resource directly. Every node is conservative, so the tree is too.
//
// Interface and protocol as di_cresarb2, with N clients. Timing: 3 clocks per
// level of the tree from request to res_req when all is idle, and 3 per level
// from res_done to the grant.
module di_cresarb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] r,
  output logic [N-1:0] g,
  output logic         res_req,
  input  logic         res_done
);

  if (N == 1) begin : g_single
    assign res_req = r[0];
    assign g[0]    = res_done;
  end else begin : g_tree
    // heap-indexed request and done wires; index 0 unused
    logic [2*N-1:1] req;
    logic [2*N-1:1] done;

    assign req[2*N-1:N] = r;
    assign g            = done[2*N-1:N];
    assign res_req      = req[1];
    assign done[1]      = res_done;

    for (genvar k = 1; k < int'(N); k++) begin : g_node
      di_cresarb2 u_node (
        .clk, .rst_n,
        .r({req[2*k+1], req[2*k]}), .g({done[2*k+1], done[2*k]}),
        .res_req(req[k]), .res_done(done[k])
      );
    end
  end

endmodule
