// Defect tolerance with Kogge-Stone Sub-Adders for every group count evaluated
// for 64-bit adders (2 to 6 groups) plus the 24-bit 3-group and 16-bit 2-group examples. Each
// configuration gets the fault-injection run of tb_dtppa_body.svh: random
// stuck-at defects in random groups, correct sums whenever group_ok names
// only defect-free groups, and every selection distance exercised.
module tb_dtppa_ksa_groups;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 7;
  localparam int unsigned WS [NCFG] = '{64, 64, 64, 64, 64, 24, 16};
  localparam int unsigned KS [NCFG] = '{ 2,  3,  4,  5,  6,  3,  2};

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_cfg
    localparam int unsigned W      = WS[n];
    localparam int unsigned K      = KS[n];
    localparam int unsigned TRIALS = 120;
    localparam int unsigned CFG    = n;

    `include "tb_dtppa_body.svh"

    dtppa_adder #(.WIDTH(W), .K(K), .SUB(SUB_KSA)) dut (
      .a(a_i), .b(b_i), .group_ok(ok_i), .sum(s_o), .cout(co_o), .tolerated(tol_o)
    );
  end

  initial begin
    for (int n = 0; n < NCFG; n++) wait (done[n] === 1'b1);
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
