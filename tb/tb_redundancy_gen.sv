// Self-checking test of the Redundancy-Generation stage at (64, 4) (the
// default), (24, 3) and (64, 6). Inputs are the bit-level pairs of random
// operands and the true prefixes G_{i:0}, P_{i:0} (from '+' on the operand
// slices). All K copies of every bit must equal the true prefix. Then the
// prefixes of one group r are corrupted: every copy that comes from another
// group must stay correct, and copies from group r must show the damage at
// least once (defect isolation between groups).
module tb_redundancy_gen;
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
    logic [W-1:0] a, b;
    gp_t bit_gp [W];
    gp_t pre_gp [W];
    gp_t copy_gp [W][K];

    if (n == 0) begin : g_def
      redundancy_gen dut (.bit_gp(bit_gp), .pre_gp(pre_gp), .copy_gp(copy_gp));
    end else begin : g_par
      redundancy_gen #(.WIDTH(W), .K(K)) dut (.bit_gp(bit_gp), .pre_gp(pre_gp), .copy_gp(copy_gp));
    end

    initial begin
      logic [W:0]   s;
      logic [W-1:0] msk;
      logic [W-1:0] tg, tp;       // true G_{i:0} and P_{i:0}
      logic [W-1:0] flip;
      int unsigned  r, seen;
      done[n] = 1'b0;
      seen = 0;
      for (int t = 0; t < 600; t++) begin
        a = W'({$urandom, $urandom});
        b = (t % 2 == 0) ? ~a ^ W'($urandom & $urandom) : W'({$urandom, $urandom});
        for (int i = 0; i < W; i++) begin
          msk = {W{1'b1}} >> (W - 1 - i);
        s = {1'b0, a & msk} + {1'b0, b & msk};
          tg[i] = s[i+1];
          tp[i] = &((a ^ b) | ~msk);
          bit_gp[i].g = a[i] & b[i];
          bit_gp[i].p = a[i] ^ b[i];
        end
        // first half: clean prefixes; second half: group r corrupted
        r = $urandom_range(K-1);
        flip = '0;
        if (t >= 300) for (int i = 0; i < W; i++) if (i % K == r) flip[i] = 1'($urandom_range(1));
        for (int i = 0; i < W; i++) begin
          pre_gp[i].g = tg[i] ^ flip[i];
          pre_gp[i].p = tp[i];
        end
        #1;
        for (int i = 0; i < W; i++) begin
          for (int c = 0; c < K; c++) begin
            if ((i + K - c) % K == r && flip != '0) begin
              if (copy_gp[i][c].g !== tg[i]) seen++;
            end else begin
              checks++;
              if (copy_gp[i][c].g !== tg[i] || copy_gp[i][c].p !== tp[i]) begin
                failures++;
                if (failures < 10) $display("FAIL W=%0d K=%0d bit %0d copy %0d (t=%0d)", W, K, i, c, t);
              end
            end
          end
        end
      end
      checks++;
      if (seen == 0) begin failures++; $display("FAIL: corruption of a group never reached its copies"); end
      done[n] = 1'b1;
    end
  end

  `include "tb_common_tail.svh"

endmodule
