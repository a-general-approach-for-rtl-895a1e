// Carry and sum stage: C_i = G_{i-1:0}, S_i = p_i ^ C_i.
//
// carry_g[i] is the selected G_{i:0}; it is the carry into bit i+1, and
// carry_g[WIDTH-1] is the carry out. The adder has no carry input, so bit 0's
// sum is p_0. Purely combinational.
module sum_gen
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  gp_t              bit_gp [WIDTH],
  input  logic [WIDTH-1:0] carry_g,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum[0] = bit_gp[0].p;
    for (int unsigned i = 1; i < WIDTH; i++) sum[i] = bit_gp[i].p ^ carry_g[i-1];
  end

  assign cout = carry_g[WIDTH-1];

endmodule
