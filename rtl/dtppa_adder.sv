// Defect tolerant parallel prefix adder (top level).
//
// A WIDTH-bit prefix adder whose carry network is split into K groups of
// disjoint hardware, so that it adds correctly as long as any one group is
// free of manufacturing defects. Bit i belongs to group i mod K.
//
//   gp_bitgen      g_i = a_i & b_i, p_i = a_i ^ b_i
//   group_split    first level of a radix-K Kogge-Stone adder: bit i merges
//                  bits i..i-K+1. From here on a bit needs only bits of its
//                  own group.
//   sub_adder x K  one prefix network per group (type SUB: Kogge-Stone,
//                  Han-Carlson, Ladner-Fischer, Brent-Kung or ripple) over
//                  that group's bits, giving G_{i:0} for each of them.
//   redundancy_gen K-1 extra GP Blocks per bit rebuild G_{i:0} from each of
//                  the other groups' results, so every bit has K copies, one
//                  per group.
//   copy_select    group_ok (which groups are defect free) picks for each bit
//                  the copy from the nearest good group.
//   sum_gen        S_i = p_i ^ G_{i-1:0}, cout = G_{WIDTH-1:0}.
//
// The structure (group split, interleaved groups, redundancy generation and
// output MUXes) follows the published scheme; the selection rule, the
// group_ok configuration port and the 'tolerated' flag are this design's own
// choices. WIDTH need not be a multiple of K. No carry in. Purely
// combinational: the result is valid one propagation delay after a, b change;
// group_ok is meant to be set once after test and held.
module dtppa_adder
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned K     = 4,
  parameter sub_adder_e  SUB   = SUB_BKA
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [K-1:0]     group_ok,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             tolerated
);

  gp_t              bit_gp   [WIDTH];     // (g_i, p_i)
  gp_t              split_gp [WIDTH];     // (G_{i:i-K+1}, P_{i:i-K+1})
  gp_t              pre_gp   [WIDTH];     // (G_{i:0}, P_{i:0}) from group i mod K
  gp_t              copy_gp  [WIDTH][K];  // copy c of bit i, from group (i-c) mod K
  logic [WIDTH-1:0] carry_g;              // selected G_{i:0}

  gp_bitgen #(.WIDTH(WIDTH)) u_bitgen (.a(a), .b(b), .gp(bit_gp));

  group_split #(.WIDTH(WIDTH), .K(K)) u_split (.bit_gp(bit_gp), .split_gp(split_gp));

  for (genvar r = 0; r < K; r++) begin : g_grp
    localparam int unsigned NE = group_size(WIDTH, K, r);
    gp_t gx [NE];
    gp_t gy [NE];
    for (genvar j = 0; j < NE; j++) begin : g_el
      assign gx[j]           = split_gp[r + j*K];
      assign pre_gp[r + j*K] = gy[j];
    end
    sub_adder #(.N(NE), .SUB(SUB)) u_sub (.x(gx), .y(gy));
  end

  redundancy_gen #(.WIDTH(WIDTH), .K(K)) u_red (.bit_gp(bit_gp), .pre_gp(pre_gp), .copy_gp(copy_gp));

  copy_select #(.WIDTH(WIDTH), .K(K)) u_sel (
    .copy_gp(copy_gp), .group_ok(group_ok), .carry_g(carry_g), .tolerated(tolerated));

  sum_gen #(.WIDTH(WIDTH)) u_sum (.bit_gp(bit_gp), .carry_g(carry_g), .sum(sum), .cout(cout));

  initial assert (K >= 1 && K <= WIDTH) else $error("dtppa_adder: need 1 <= K <= WIDTH");

endmodule
