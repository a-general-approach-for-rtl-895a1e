// Self-checking test of the bit-level generate / propagate cells: for random
// and corner operands every bit must give g = a AND b and p = a XOR b, and
// the p vector plus twice the g vector must equal a + b.
module tb_gp_bitgen;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 1;
  localparam int unsigned W    = 64;

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  logic [W-1:0] a, b;
  gp_t          gp [W];

  gp_bitgen dut (.a(a), .b(b), .gp(gp));

  initial begin
    logic [W-1:0] gv, pv;
    done[0] = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      a = {$urandom, $urandom};
      b = (t % 3 == 0) ? ~a : {$urandom, $urandom};
      if (t == 1) begin a = '1; b = '1; end
      #1;
      for (int i = 0; i < W; i++) begin
        gv[i] = gp[i].g;
        pv[i] = gp[i].p;
        checks++;
        if (gp[i].g !== (a[i] & b[i]) || gp[i].p !== (a[i] ^ b[i])) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d a=%b b=%b g=%b p=%b", i, a[i], b[i], gp[i].g, gp[i].p);
        end
      end
      checks++;
      if ({1'b0, pv} + {gv, 1'b0} !== {1'b0, a} + {1'b0, b}) failures++;
    end
    done[0] = 1'b1;
  end

  `include "tb_common_tail.svh"

endmodule
