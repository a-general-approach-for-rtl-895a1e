// Self-checking test of the n-input GP Block for fan-ins 1 to 6 (2 is the
// default). Reference: G = OR over m of (g_m AND p_0 .. p_{m-1}), with x[0]
// the most significant span, and P = AND of all p.
module tb_gp_block;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 6;

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_n
    localparam int unsigned FI = n + 1;
    gp_t x [FI];
    gp_t y;

    if (FI == 2) begin : g_def
      gp_block dut (.x(x), .y(y));
    end else begin : g_par
      gp_block #(.FANIN(FI)) dut (.x(x), .y(y));
    end

    initial begin
      logic gref, pref, pre;
      done[n] = 1'b0;
      for (int t = 0; t < (1 << (2 * FI)); t++) begin   // exhaustive
        for (int j = 0; j < FI; j++) begin
          x[j].g = t[2*j];
          x[j].p = t[2*j+1];
        end
        #1;
        gref = 1'b0; pref = 1'b1; pre = 1'b1;
        for (int m = 0; m < FI; m++) begin
          gref |= x[m].g & pre;
          pre  &= x[m].p;
        end
        pref = pre;
        checks++;
        if (y.g !== gref || y.p !== pref) begin
          failures++;
          if (failures < 10) $display("FAIL FANIN=%0d t=%0h: got %b%b exp %b%b", FI, t, y.g, y.p, gref, pref);
        end
      end
      done[n] = 1'b1;
    end
  end

  `include "tb_common_tail.svh"

endmodule
