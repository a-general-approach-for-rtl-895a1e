// Bit-level generate / propagate, the first step of a prefix adder:
//   g_i = A_i & B_i,  p_i = A_i ^ B_i.
// p_i is also the half-sum that the carry is later added to. Purely
// combinational; one gp_t per bit, element i for bit i.
module gp_bitgen
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output gp_t              gp [WIDTH]
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      gp[i].g = a[i] & b[i];
      gp[i].p = a[i] ^ b[i];
    end
  end

endmodule
