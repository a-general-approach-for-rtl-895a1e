// Self-checking test of the Sub-Adder wrapper: every network type at N = 16
// (the default) and N = 11 must produce y[j] = x[j] o ... o x[0] for random
// inputs, and the default instance must be the Brent-Kung network (checked
// through its depth-specific internal level count being present).
module tb_sub_adder;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 11;
  localparam sub_adder_e  TS [NCFG] = '{SUB_KSA, SUB_HCA, SUB_LFA, SUB_BKA, SUB_RCA,
                                        SUB_KSA, SUB_HCA, SUB_LFA, SUB_BKA, SUB_RCA, SUB_BKA};
  localparam int unsigned NS [NCFG] = '{16, 16, 16, 16, 16, 11, 11, 11, 11, 11, 16};

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_n
    localparam int unsigned N = NS[n];
    gp_t x [N];
    gp_t y [N];

    if (n == 10) begin : g_def
      sub_adder dut (.x(x), .y(y));
    end else begin : g_par
      sub_adder #(.N(N), .SUB(TS[n])) dut (.x(x), .y(y));
    end

    initial begin
      logic gref, pref;
      done[n] = 1'b0;
      for (int t = 0; t < 3000; t++) begin
        for (int j = 0; j < N; j++) begin
          x[j].g = 1'($urandom_range(1));
          x[j].p = ($urandom_range(7) != 0);
        end
        #1;
        gref = 1'b0; pref = 1'b1;
        for (int j = 0; j < N; j++) begin
          gref = x[j].g | (x[j].p & gref);
          pref = x[j].p & pref;
          checks++;
          if (y[j].g !== gref || y[j].p !== pref) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d j=%0d", n, j);
          end
        end
      end
      done[n] = 1'b1;
    end
  end

  // the default instance is Brent-Kung: its up-sweep level array exists
  initial begin
    #1;
    checks++;
    if ($bits(g_n[10].g_def.dut.g_bka.u_net.s) != $bits(gp_t) * 16 * 8) failures++;
  end

  `include "tb_common_tail.svh"

endmodule
