// Self-checking test of the output reconfiguration block at (64, 4) (the
// default), (24, 3) and (64, 6). The copies carry random values; for every
// bit the output must be the generate of the copy from the nearest group
// marked good at or below the bit (distance c = 0, 1, ...), copy 0 when no
// group is good, and 'tolerated' must be 1 exactly when some group is good.
// Every configuration of group_ok is applied.
module tb_copy_select;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 3;
  localparam int unsigned WS [NCFG] = '{64, 24, 64};
  localparam int unsigned KS [NCFG] = '{ 4,  3,  6};

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_n
    localparam int unsigned W = WS[n];
    localparam int unsigned K = KS[n];
    gp_t              copy_gp [W][K];
    logic [K-1:0]     group_ok;
    logic [W-1:0]     carry_g;
    logic             tolerated;

    if (n == 0) begin : g_def
      copy_select dut (.copy_gp(copy_gp), .group_ok(group_ok), .carry_g(carry_g), .tolerated(tolerated));
    end else begin : g_par
      copy_select #(.WIDTH(W), .K(K)) dut (.copy_gp(copy_gp), .group_ok(group_ok), .carry_g(carry_g), .tolerated(tolerated));
    end

    initial begin
      int d;
      logic e;
      done[n] = 1'b0;
      for (int t = 0; t < 50; t++) begin
        for (int cfg = 0; cfg < (1 << K); cfg++) begin
          for (int i = 0; i < W; i++)
            for (int c = 0; c < K; c++) copy_gp[i][c] = 2'($urandom_range(3));
          group_ok = K'(cfg);
          #1;
          checks++;
          if (tolerated !== (cfg != 0)) failures++;
          for (int i = 0; i < W; i++) begin
            // nearest good group: bit i is in group i mod K, copy d comes from group (i-d) mod K
            d = -1;
            for (int q = 0; q < int'(K) && d < 0; q++) if (cfg[(i - q + 2 * K) % K]) d = q;
            e = (d < 0) ? copy_gp[i][0].g : copy_gp[i][d].g;
            checks++;
            if (carry_g[i] !== e) begin
              failures++;
              if (failures < 10) $display("FAIL W=%0d K=%0d ok=%b bit %0d", W, K, group_ok, i);
            end
          end
        end
      end
      done[n] = 1'b1;
    end
  end

  `include "tb_common_tail.svh"

endmodule
