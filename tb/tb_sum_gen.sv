// Self-checking test of the carry and sum stage at 64 bits: fed with the
// bit-level pairs and the true prefixes of random operands, it must return
// {cout, sum} = a + b.
module tb_sum_gen;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 1;
  localparam int unsigned W    = 64;

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  logic [W-1:0] a, b, carry_g, sum;
  logic         cout;
  gp_t          bit_gp [W];

  sum_gen dut (.bit_gp(bit_gp), .carry_g(carry_g), .sum(sum), .cout(cout));

  initial begin
    logic [W:0] s;
    logic [W-1:0] msk;
    done[0] = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom};
      b = (t % 2 == 0) ? ~a ^ W'($urandom & $urandom) : {$urandom, $urandom};
      for (int i = 0; i < W; i++) begin
        msk = {W{1'b1}} >> (W - 1 - i);
        s = {1'b0, a & msk} + {1'b0, b & msk};
        carry_g[i] = s[i+1];
        bit_gp[i].g = a[i] & b[i];
        bit_gp[i].p = a[i] ^ b[i];
      end
      #1;
      checks++;
      if ({cout, sum} !== {1'b0, a} + {1'b0, b}) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h got %h", a, b, {cout, sum});
      end
    end
    done[0] = 1'b1;
  end

  `include "tb_common_tail.svh"

endmodule
