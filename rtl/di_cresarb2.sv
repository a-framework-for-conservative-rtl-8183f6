// CResource arbiter, 2-way: a conservative Resource arbiter.
//
// Two clients share one resource. The arbiter repeatedly picks one pending
// request (r[0] or r[1]), invokes the resource with an event on res_req, waits
// for the resource's done event on res_done, and then tells the client that
// was served with an event on its g[i]. A client sends its next request only
// after its grant. External specification:
// pref((r0? ... g0!)* || (r1? ... g1!)* || ((a | b) r! d?)* || (d? (p | q))*).
//
// Inside, only conservative elements are used (two events out for two in, or
// one for one), so no event is created or destroyed:
//   * Merge(r[i], p1[i]) feeds request wire i of a Mutex: the client request
//     enters the critical section, p1[i] later leaves it.
//   * A Toggle on grant wire i separates the Mutex grant (first event, ta) from
//     its release acknowledgement (second event), which is the client grant g[i].
//   * An initialized 1 x 1 Cjoin (a Ctria with a bubble) replaces the Fork of
//     the non-conservative arbiter: it turns ta plus a re-arm event p2 from the
//     previous round into a doubled pair a1, a2.
//   * Merge(a1[0], a1[1]) is the resource request; a2 waits as a row of a
//     2 x 1 Cjoin whose column is res_done. Its doubled output (p1, p2) releases
//     the Mutex and re-arms the 1 x 1 Cjoin.
// Timing: res_req follows a request by 3 clocks when the resource is free;
// g[i] follows res_done by 3 clocks.
module di_cresarb2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] r,
  output logic [1:0] g,
  output logic       res_req,
  input  logic       res_done
);

  logic [1:0] m_req;   // Mutex request wires
  logic [1:0] m_g;     // Mutex grant wires
  logic [1:0] ta;      // Mutex grants, separated by the Toggles
  logic [1:0] a1, a2;  // doubled grant
  logic [1:0] p1, p2;  // doubled, steered done event
  logic [1:0][0:0][1:0] steer;

  for (genvar i = 0; i < 2; i++) begin : g_client
    logic [2:0][1:0] arm_v;

    di_merge #(.N(2)) u_req_merge (
      .clk, .rst_n, .in({p1[i], r[i]}), .out(m_req[i])
    );

    di_toggle u_toggle (
      .clk, .rst_n, .a(m_g[i]), .c(ta[i]), .d(g[i])
    );

    // 1 x 1 Cjoin: edge a = grant, edge b = re-arm (bubbled), edge c unused
    di_ctria #(.INIT_EDGE(1)) u_arm (
      .clk, .rst_n, .e({1'b0, p2[i], ta[i]}), .v(arm_v)
    );
    assign a1[i] = arm_v[0][0];
    assign a2[i] = arm_v[0][1];

    assign p1[i] = steer[i][0][0];
    assign p2[i] = steer[i][0][1];
  end

  di_mutex u_mutex (.clk, .rst_n, .r(m_req), .g(m_g));

  di_merge #(.N(2)) u_res_merge (.clk, .rst_n, .in(a1), .out(res_req));

  di_cjoin #(.M(2), .N(1)) u_steer (
    .clk, .rst_n, .row(a2), .col(res_done), .out(steer)
  );

endmodule
