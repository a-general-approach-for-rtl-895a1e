// n-input GP Block: merges FANIN adjacent spans into one.
//
//   y = x[0] o x[1] o ... o x[FANIN-1]
//
// x[0] is the most significant span and x[FANIN-1] the least significant one;
// the spans must be adjacent for y to be meaningful. Functionally a k-input
// block is the same as a chain of k-1 two-input blocks, and that is how it is
// written: G = g0 | p0 & (g1 | p1 & (...)), P = p0 & p1 & ... . The fan-in is
// what the delay and size of the adder are measured in (a FANIN-input block
// counts FANIN on the critical path and 6*FANIN+2 transistors in CMOS).
// Purely combinational.
module gp_block
  import dtppa_pkg::*;
#(
  parameter int unsigned FANIN = 2
) (
  input  gp_t x [FANIN],
  output gp_t y
);

  always_comb begin
    y = x[FANIN-1];
    for (int i = FANIN - 2; i >= 0; i--) y = gp_combine(x[i], y);
  end

  initial assert (FANIN >= 1) else $error("gp_block: FANIN must be at least 1");

endmodule
