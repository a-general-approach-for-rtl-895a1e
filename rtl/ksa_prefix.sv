// Radix-2 Kogge-Stone prefix network over N elements.
//
// y[j] = x[j] o x[j-1] o ... o x[0]. Level l (l = 0 .. ceil(log2 N)-1) merges
// every element j >= 2^l with element j - 2^l of the level before; elements
// below 2^l are already complete and pass through. Minimum depth, one 2-input
// GP Block per element and level (fan-out 2). Used as a Sub-Adder, element j
// of group r is bit r + j*K of the adder. Purely combinational.
module ksa_prefix
  import dtppa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  gp_t x [N],
  output gp_t y [N]
);

  localparam int L = clog2_min1(N);

  gp_t s [L+1][N];   // s[l] = values after level l

  always_comb begin
    s[0] = x;
    for (int l = 0; l < L; l++) begin
      for (int j = 0; j < N; j++) begin
        if (j >= (1 << l)) s[l+1][j] = gp_combine(s[l][j], s[l][j-(1<<l)]);
        else               s[l+1][j] = s[l][j];
      end
    end
  end

  assign y = s[L];

endmodule
