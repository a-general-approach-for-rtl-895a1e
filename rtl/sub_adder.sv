// Sub-Adder: the prefix network of one group.
//
// Group r of a K-group adder holds bits r, r+K, r+2K, ...; element j of this
// module is bit r + j*K. Its input is the Group-Split value of that bit,
// (G_{i:i-K+1}, P_{i:i-K+1}), which already spans K bits, and element 0 (bit
// r < K) already holds G_{r:0}. Merging element j with all elements below it
// therefore yields (G_{i:0}, P_{i:0}) for every bit of the group, with no
// signal from any other group. The network type is a parameter; all five give
// the same function and differ in depth, size and fan-out. Purely
// combinational.
module sub_adder
  import dtppa_pkg::*;
#(
  parameter int unsigned N   = 16,
  parameter sub_adder_e  SUB = SUB_BKA
) (
  input  gp_t x [N],
  output gp_t y [N]
);

  case (SUB)
    SUB_KSA: begin : g_ksa ksa_prefix #(.N(N)) u_net (.x(x), .y(y)); end
    SUB_HCA: begin : g_hca hca_prefix #(.N(N)) u_net (.x(x), .y(y)); end
    SUB_LFA: begin : g_lfa lfa_prefix #(.N(N)) u_net (.x(x), .y(y)); end
    SUB_RCA: begin : g_rca rca_prefix #(.N(N)) u_net (.x(x), .y(y)); end
    default: begin : g_bka bka_prefix #(.N(N)) u_net (.x(x), .y(y)); end
  endcase

endmodule
