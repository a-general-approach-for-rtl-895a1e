// Group-Split stage: the first level of a radix-K Kogge-Stone adder.
//
// Bit i merges the bit-level pairs of bits i, i-1, ..., i-K+1 in one K-input
// GP Block, giving (G_{i:i-K+1}, P_{i:i-K+1}). After this level bit i only
// ever needs the values of bits i-K, i-2K, ..., which belong to the same
// residue class i mod K, so the K groups (K interleaved sets of bits) can be
// computed by disjoint hardware from here on. Bits i < K-1 have fewer bits
// below them and use an (i+1)-input block, which already gives G_{i:0}; bit 0
// passes through. Purely combinational.
module group_split
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned K     = 4
) (
  input  gp_t bit_gp   [WIDTH],
  output gp_t split_gp [WIDTH]
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    localparam int unsigned FI = (i + 1 < K) ? i + 1 : K;
    if (FI == 1) begin : g_pass
      assign split_gp[i] = bit_gp[i];
    end else begin : g_blk
      gp_t x [FI];
      for (genvar j = 0; j < FI; j++) begin : g_in
        assign x[j] = bit_gp[i-j];
      end
      gp_block #(.FANIN(FI)) u_blk (.x(x), .y(split_gp[i]));
    end
  end

  initial assert (K >= 1 && K <= WIDTH) else $error("group_split: need 1 <= K <= WIDTH");

endmodule
