// Toggle: copies each input event to an output, alternating between the two
// outputs, starting with c. Specification: pref(a? c! a? d!)*.
//
// One register remembers the consumed input level, one which output is next.
// Timing: the output flips one clock after the input event. The element is
// conservative (one event out for each event in).
module di_toggle (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic c,
  output logic d
);

  logic a_seen;
  logic next_d;   // 0: next event goes to c, 1: to d

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_seen <= 1'b0;
      next_d <= 1'b0;
      c      <= 1'b0;
      d      <= 1'b0;
    end else if (a != a_seen) begin
      a_seen <= a;
      next_d <= ~next_d;
      if (next_d) d <= ~d;
      else        c <= ~c;
    end
  end

endmodule
