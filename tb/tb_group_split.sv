// Self-checking test of the Group-Split stage at (WIDTH, K) = (64, 4) (the
// default), (24, 3), (16, 2), (64, 6) and (7, 7). For bit i the output must be
// the generate / propagate of the bit span i..max(0, i-K+1): G is the carry out
// of adding that slice of a and b (computed with '+'), P is AND of a XOR b
// over the slice.
module tb_group_split;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 5;
  localparam int unsigned WS [NCFG] = '{64, 24, 16, 64, 7};
  localparam int unsigned KS [NCFG] = '{ 4,  3,  2,  6, 7};

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_n
    localparam int unsigned W = WS[n];
    localparam int unsigned K = KS[n];
    logic [W-1:0] a, b;
    gp_t bit_gp [W];
    gp_t split_gp [W];

    for (genvar i = 0; i < W; i++) begin : g_b
      assign bit_gp[i].g = a[i] & b[i];
      assign bit_gp[i].p = a[i] ^ b[i];
    end

    if (n == 0) begin : g_def
      group_split dut (.bit_gp(bit_gp), .split_gp(split_gp));
    end else begin : g_par
      group_split #(.WIDTH(W), .K(K)) dut (.bit_gp(bit_gp), .split_gp(split_gp));
    end

    initial begin
      logic [W:0] sa, sb, ssum;
      int lo;
      done[n] = 1'b0;
      for (int t = 0; t < 1000; t++) begin
        a = W'({$urandom, $urandom});
        b = (t % 2 == 0) ? ~a ^ W'($urandom & $urandom) : W'({$urandom, $urandom});
        #1;
        for (int i = 0; i < W; i++) begin
          lo = (i - int'(K) + 1 < 0) ? 0 : i - int'(K) + 1;
          sa = '0; sb = '0;
          for (int q = lo; q <= i; q++) begin sa[q-lo] = a[q]; sb[q-lo] = b[q]; end
          ssum = sa + sb;
          checks++;
          if (split_gp[i].g !== ssum[i-lo+1] || split_gp[i].p !== &(sa[W-1:0] ^ sb[W-1:0] | ~((W'(1) << (i-lo+1)) - 1))) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d K=%0d bit %0d", W, K, i);
          end
        end
      end
      done[n] = 1'b1;
    end
  end

  `include "tb_common_tail.svh"

endmodule
