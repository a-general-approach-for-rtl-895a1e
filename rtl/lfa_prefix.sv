// Ladner-Fischer prefix network over N elements, in its minimum-depth form
// (the fan-out doubling construction also known as Sklansky's).
//
// y[j] = x[j] o ... o x[0]. At level l every element j whose index has bit l
// set merges with element ((j >> l) << l) - 1, the last element of the lower
// half of its 2^(l+1)-aligned block; that element is complete for the block
// after level l, so after ceil(log2 N) levels every element is a full prefix.
// Half the elements are merged per level; the fan-out of a level is 2^l.
// Purely combinational.
module lfa_prefix
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
        if (((j >> l) & 1) == 1) s[l+1][j] = gp_combine(s[l][j], s[l][((j >> l) << l) - 1]);
        else                     s[l+1][j] = s[l][j];
      end
    end
  end

  assign y = s[L];

endmodule
