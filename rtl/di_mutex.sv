// Mutex: two-client mutual exclusion element in transition signalling.
//
// Each client i owns a request wire r[i] and a grant wire g[i]. The client's
// odd events on r[i] request the critical section, its even events release it;
// each request is answered by an event on g[i] (the grant) and each release by
// another event on g[i] (the release acknowledgement):
// pref((r0? g0! r0? g0!)* || (r1? g1! r1? g1!)*) with the intervals from a
// grant on g[i] to the following release on r[i] never overlapping. One event
// out for every event in, so the element is conservative, as required of it.
//
// Arbitration: when both clients request in the same cycle with the section
// free, the one that did not win last time is granted (any choice is allowed).
// Timing: a grant or acknowledgement follows its input by one clock.
module di_mutex (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] r,
  output logic [1:0] g
);

  logic [1:0] r_seen;
  logic [1:0] held;      // client i is inside the critical section
  logic       last;      // last client granted
  logic [1:0] pend;
  logic [1:0] rel;       // pending releases
  logic [1:0] req;       // pending requests
  logic [1:0] win;

  assign pend = r ^ r_seen;
  assign rel  = pend & held;
  assign req  = pend & ~held;

  always_comb begin
    win = 2'b00;
    if (held == 2'b00) begin
      if (req == 2'b11) win = last ? 2'b01 : 2'b10;
      else              win = req;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_seen <= '0;
      held   <= '0;
      last   <= 1'b1;
      g      <= '0;
    end else begin
      // releases and grants never happen to the same client in one cycle, and a
      // grant is only given with the section free, so no release is pending then
      r_seen <= r_seen ^ rel ^ win;
      held   <= (held & ~rel) | win;
      g      <= g ^ rel ^ win;
      if (win != 2'b00) last <= win[1];
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) held != 2'b11)
    else $error("di_mutex: both clients inside the critical section");

endmodule
