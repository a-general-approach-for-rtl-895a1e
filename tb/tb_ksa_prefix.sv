// Self-checking test of the Kogge-Stone prefix network (ksa_prefix).
// Instances at N = 1, 2, 3, 5, 8, 11, 16 (the default) and 23 get random
// (g,p) inputs; every output must equal the serial fold
// y[j] = x[j] o x[j-1] o ... o x[0], computed here bit by bit.
module tb_ksa_prefix;
  import dtppa_pkg::*;

  localparam int unsigned NCFG = 8;
  localparam int unsigned NS [NCFG] = '{1, 2, 3, 5, 8, 11, 16, 23};

  int   checks   = 0;
  int   failures = 0;
  logic done [NCFG];

  for (genvar n = 0; n < NCFG; n++) begin : g_n
    localparam int unsigned N = NS[n];
    gp_t x [N];
    gp_t y [N];

    if (N == 16) begin : g_def
      ksa_prefix dut (.x(x), .y(y));
    end else begin : g_par
      ksa_prefix #(.N(N)) dut (.x(x), .y(y));
    end

    initial begin
      logic gref, pref;
      done[n] = 1'b0;
      for (int t = 0; t < 3000; t++) begin
        for (int j = 0; j < N; j++) begin
          x[j].g = 1'($urandom_range(1));
          // mostly propagating inputs so long spans matter
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
            if (failures < 10) $display("FAIL N=%0d j=%0d: got %b%b exp %b%b", N, j, y[j].g, y[j].p, gref, pref);
          end
        end
      end
      done[n] = 1'b1;
    end
  end

  initial begin
    for (int n = 0; n < NCFG; n++) wait (done[n] === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
