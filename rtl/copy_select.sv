// Output reconfiguration block: picks one copy of every bit's prefix.
//
// group_ok marks the groups found defect free after manufacture. For bit i
// the block takes copy c, the smallest c with group (i-c) mod K marked good:
// a bit whose own group is good uses its own result (no extra delay), and
// otherwise the copy derived from the nearest good group below it, whose GP
// Block has c+1 inputs. With at least one good group every bit gets a copy
// computed entirely by defect-free hardware and 'tolerated' is 1; with none,
// copy 0 is passed on and 'tolerated' is 0. Only the generate part of the
// chosen copy is needed downstream (it is the carry into bit i+1). This
// block, like the MUXes of any such scheme, is assumed to be built defect
// free. Selecting copies with output MUXes is the published scheme; the
// nearest-good-group rule and the K-bit group_ok mask are this design's own
// choice, picked because they add no delay when a bit's own group is good.
// Purely combinational; group_ok is a static configuration.
module copy_select
  import dtppa_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned K     = 4
) (
  input  gp_t              copy_gp [WIDTH][K],
  input  logic [K-1:0]     group_ok,
  output logic [WIDTH-1:0] carry_g,
  output logic             tolerated
);

  assign tolerated = |group_ok;

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      carry_g[i] = copy_gp[i][0].g;
      // scan from the farthest group down to the own group so the nearest wins
      for (int c = K - 1; c >= 0; c--) begin
        if (group_ok[(i + K - c) % K]) carry_g[i] = copy_gp[i][c].g;
      end
    end
  end

endmodule
