// Redundancy-Generation stage: K-1 extra GP Blocks per bit.
//
// Copy 0 of bit i is the prefix (G_{i:0}, P_{i:0}) from the bit's own group,
// i mod K. Copy c (c = 1 .. K-1) is rebuilt from the result of the group
// (i-c) mod K, which owns bit i-c:
//   copy c = (g_i,p_i) o (g_{i-1},p_{i-1}) o ... o (g_{i-c+1},p_{i-c+1}) o (G_{i-c:0},P_{i-c:0})
// a (c+1)-input GP Block fed with bit-level pairs and one prefix. Because the
// groups interleave, the K copies of a bit come from K different groups, so a
// defect confined to one group spoils at most one copy of every bit. When
// i < c there is no bit i-c; that copy is then formed from the bit-level pairs
// of bits i..0 alone. Each copy's block is counted as hardware of the group it
// extends. Purely combinational.
module redundancy_gen
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned K     = 4
) (
  input  gp_t bit_gp  [WIDTH],
  input  gp_t pre_gp  [WIDTH],
  output gp_t copy_gp [WIDTH][K]
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign copy_gp[i][0] = pre_gp[i];
    for (genvar c = 1; c < K; c++) begin : g_copy
      if (i >= c) begin : g_grp
        // c bit-level pairs and the prefix of bit i-c
        gp_t x [c+1];
        for (genvar j = 0; j < c; j++) begin : g_in
          assign x[j] = bit_gp[i-j];
        end
        assign x[c] = pre_gp[i-c];
        gp_block #(.FANIN(c+1)) u_blk (.x(x), .y(copy_gp[i][c]));
      end else if (i == 0) begin : g_bit0
        assign copy_gp[i][c] = bit_gp[0];
      end else begin : g_low
        // bits i..0 only
        gp_t x [i+1];
        for (genvar j = 0; j <= i; j++) begin : g_in
          assign x[j] = bit_gp[i-j];
        end
        gp_block #(.FANIN(i+1)) u_blk (.x(x), .y(copy_gp[i][c]));
      end
    end
  end

endmodule
