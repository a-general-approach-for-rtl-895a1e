// End-to-end test of the defect tolerant adder at its default size
// (64 bits, 4 groups, Brent-Kung Sub-Adders). Stuck-at defects are forced into
// random groups; the adder must still add correctly whenever group_ok names
// only defect-free groups, and each tolerance mechanism must occur at least
// once (see tb_dtppa_body.svh).
module tb_dtppa_adder;
  import dtppa_pkg::*;

  localparam int unsigned W      = 64;
  localparam int unsigned K      = 4;
  localparam int unsigned TRIALS = 300;
  localparam int unsigned CFG    = 0;

  int   checks   = 0;
  int   failures = 0;
  logic done [1];

  `include "tb_dtppa_body.svh"

  dtppa_adder dut (
    .a(a_i), .b(b_i), .group_ok(ok_i), .sum(s_o), .cout(co_o), .tolerated(tol_o)
  );

  initial begin
    wait (done[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
