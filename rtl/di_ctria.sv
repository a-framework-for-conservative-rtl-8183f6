// Ctria: the conservative Tria. Inputs a, b, c; doubled outputs (p, p'),
// (q, q'), (r, r'). Specification:
// pref(((a? || b?)(p! || p'!)) | ((b? || c?)(q! || q'!)) | ((a? || c?)(r! || r'!)))*.
// Two events in, two events out, so it is conservative and invertible.
//
// A 1 x 1 Cjoin is a Ctria with edge c and vertices q, r left unused; this is
// how the arbiters of this library build their 1 x 1 Cjoins. For the
// "initialized" 1 x 1 Cjoin that replaces a Fork, INIT_EDGE (-1 for none) puts
// a bubble on one edge: an event on it counts as received after reset.
//
// Ports: e[0..2] = a, b, c; v[k][0] and v[k][1] are the two wires of vertex k
// (k = 0: p, 1: q, 2: r). Inputs must be 0 when reset is released.
// Timing: both wires of the vertex flip one clock after the later of its two
// edge events.
module di_ctria #(
  parameter int INIT_EDGE = -1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      e,
  output logic [2:0][1:0] v
);

  logic [2:0] seen;
  logic [2:0] pend;

  assign pend = e ^ seen;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen <= (INIT_EDGE >= 0) ? 3'(1 << INIT_EDGE) : 3'b000;
      v    <= '0;
    end else begin
      unique case (pend)
        3'b011:  begin v[0] <= ~v[0]; seen <= seen ^ 3'b011; end
        3'b110:  begin v[1] <= ~v[1]; seen <= seen ^ 3'b110; end
        3'b101:  begin v[2] <= ~v[2]; seen <= seen ^ 3'b101; end
        default: ;
      endcase
    end
  end

  a_not_three: assert property (@(posedge clk) disable iff (!rst_n) pend != 3'b111)
    else $error("di_ctria: events on all three edges");

endmodule
