// Shared types and helpers of the defect tolerant parallel prefix adder.
//
// A prefix adder carries, for every span of bits i..j, a generate / propagate
// pair (G_{i:j}, P_{i:j}). Two adjacent spans merge with the prefix operator
//   (G_hi, P_hi) o (G_lo, P_lo) = (G_hi | P_hi & G_lo, P_hi & P_lo)
// which is associative, so any bracketing (any prefix network) gives the same
// result. gp_t holds one such pair; gp_combine is the operator. sub_adder_e
// names the prefix network used inside each group (the Sub-Adder type); the
// five types are the ones the adder is evaluated with.
package dtppa_pkg;

  typedef struct packed {
    logic g;   // generate of the span
    logic p;   // propagate of the span
  } gp_t;

  typedef enum logic [2:0] {
    SUB_KSA = 3'd0,   // Kogge-Stone
    SUB_HCA = 3'd1,   // Han-Carlson
    SUB_LFA = 3'd2,   // Ladner-Fischer (minimum-depth form)
    SUB_BKA = 3'd3,   // Brent-Kung
    SUB_RCA = 3'd4    // ripple carry
  } sub_adder_e;

  // The prefix operator: hi covers the more significant span.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Number of bits in group r of a WIDTH-bit adder with k groups:
  // the bits i < WIDTH with i mod k = r.
  function automatic int unsigned group_size(int unsigned width, int unsigned k, int unsigned r);
    return (width - r + k - 1) / k;
  endfunction

  // ceil(log2(n)) for n >= 1, the level count of a log-depth prefix network.
  function automatic int unsigned clog2_min1(int unsigned n);
    int unsigned l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

endpackage
