// Han-Carlson prefix network over N elements.
//
// y[j] = x[j] o ... o x[0]. First level: every odd element merges with the
// even element below it. Then a Kogge-Stone network runs on the odd elements
// only, with distances 2, 4, 8, ... (less than N). A last level completes every
// even element j >= 2 from the finished odd element j-1. Depth is one level
// more than Kogge-Stone with about half its GP Blocks. Purely combinational.
module hca_prefix
  import dtppa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  gp_t x [N],
  output gp_t y [N]
);

  localparam int L  = clog2_min1(N);
  localparam int LK = (L > 1) ? L - 1 : 0;     // Kogge-Stone levels on odd elements
  localparam int LT = (N > 1) ? LK + 2 : 0;    // plus first and last level

  if (N > 1) begin : g_net
    gp_t s [LT+1][N];   // s[t] = values after level t

    always_comb begin
      s[0] = x;
      // first level: odd elements pair with their even neighbour
      for (int j = 0; j < N; j++) begin
        if (j % 2 == 1) s[1][j] = gp_combine(s[0][j], s[0][j-1]);
        else            s[1][j] = s[0][j];
      end
      // Kogge-Stone on the odd elements, distance 2^(m+1)
      for (int m = 0; m < LK; m++) begin
        for (int j = 0; j < N; j++) begin
          if (j % 2 == 1 && j > (2 << m)) s[m+2][j] = gp_combine(s[m+1][j], s[m+1][j-(2<<m)]);
          else                            s[m+2][j] = s[m+1][j];
        end
      end
      // last level: even elements from the odd element below
      for (int j = 0; j < N; j++) begin
        if (j % 2 == 0 && j >= 2) s[LT][j] = gp_combine(s[LT-1][j], s[LT-1][j-1]);
        else                      s[LT][j] = s[LT-1][j];
      end
    end

    assign y = s[LT];
  end else begin : g_one
    assign y = x;
  end

endmodule
