// Ripple-carry prefix chain over N elements.
//
// y[0] = x[0]; y[j] = x[j] o y[j-1]. N-1 two-input GP Blocks in series: the
// smallest network and the deepest (depth N-1). Purely combinational.
module rca_prefix
  import dtppa_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  gp_t x [N],
  output gp_t y [N]
);

  always_comb begin
    y[0] = x[0];
    for (int unsigned j = 1; j < N; j++) y[j] = gp_combine(x[j], y[j-1]);
  end

endmodule
