// Brent-Kung prefix network over N elements.
//
// y[j] = x[j] o ... o x[0]. An up-sweep of ceil(log2 N) levels builds, at
// level l, the span of 2^(l+1) elements ending at every j with
// (j+1) mod 2^(l+1) = 0 by merging j with j - 2^l. A down-sweep then runs the
// levels back from l = ceil(log2 N)-2 to 0 and completes each element j with
// (j+1) mod 2^(l+1) = 2^l, j > 2^l, by merging it with the already complete
// prefix of element j - 2^l. About 2N GP Blocks, depth 2 log2 N - 1, fan-out 2.
// Purely combinational.
module bka_prefix
  import dtppa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  gp_t x [N],
  output gp_t y [N]
);

  localparam int L  = clog2_min1(N);
  localparam int LD = (L > 1) ? L - 1 : 0;   // down-sweep levels
  localparam int LT = L + LD;

  gp_t s [LT+1][N];   // s[t] = values after level t

  always_comb begin
    s[0] = x;
    // up-sweep, level l uses distance 2^l
    for (int l = 0; l < L; l++) begin
      for (int j = 0; j < N; j++) begin
        if (((j + 1) % (2 << l)) == 0) s[l+1][j] = gp_combine(s[l][j], s[l][j-(1<<l)]);
        else                           s[l+1][j] = s[l][j];
      end
    end
    // down-sweep, stage m uses distance 2^(L-2-m)
    for (int m = 0; m < LD; m++) begin
      for (int j = 0; j < N; j++) begin
        if (((j + 1) % (2 << (L - 2 - m))) == (1 << (L - 2 - m)) && j > (1 << (L - 2 - m)))
          s[L+m+1][j] = gp_combine(s[L+m][j], s[L+m][j-(1<<(L-2-m))]);
        else
          s[L+m+1][j] = s[L+m][j];
      end
    end
  end

  assign y = s[LT];

endmodule
