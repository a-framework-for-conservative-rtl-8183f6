// Merge: an N-input delay-insensitive Merge, the "Or-causality" primitive.
//
// Specification (for two inputs): pref((a? | b?) c!)*. Every event on any input
// is copied to the single output. In transition signalling this is the
// exclusive-or of the input levels, which is also how the element is usually
// built in CMOS; it is combinational and adds no cycle of latency. An N-input
// Merge stands for a tree of two-input Merges (the "P" circle of the figures).
//
// The environment must offer at most one input event at a time; the assertion
// checks that no two inputs change in the same clock cycle, since two such
// changes would cancel in the exclusive-or. The clock is used by the assertion
// only.
module di_merge #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  assign out = ^in;

  // Assertion support: input levels of the previous cycle.
  logic [N-1:0] in_q;
  always_ff @(posedge clk) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= in;
  end

  a_one_event_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(in ^ in_q) <= 1)
    else $error("di_merge: two input events at once");

endmodule
