// Shared end-to-end stimulus and checking for one dtppa_adder instance.
//
// Included inside the scope that instantiates the adder as 'dut' with
// .a(a_i), .b(b_i), .group_ok(ok_i), .sum(s_o), .cout(co_o), .tolerated(tol_o).
// The including scope defines W, K (the adder's WIDTH and K), TRIALS, the
// index CFG of this instance and the module variables checks, failures and
// done[CFG].
//
// Defects are modelled as stuck-at faults forced onto internal nodes: a
// Group-Split output, a Sub-Adder output, or one redundant copy built in the
// Redundancy-Generation stage. Every trial places one fault in each group of a
// random set of 'bad' groups and then checks, against A+B computed by the
// simulator's own addition:
//   - with group_ok = the good groups, the sum is always right (isolation);
//   - with group_ok = a single good group, the sum is always right;
//   - with group_ok = all ones, the fault shows up on some vector
//     (the injection bites; counted, not a failure per trial);
//   - with group_ok = 0, 'tolerated' is 0.
// It counts how often each mechanism happened (own copy, copy distance
// 1..K-1, isolation, visible defect, untolerable configuration) and fails the
// instance if one never did.

logic [W-1:0] a_i, b_i, s_o;
logic         co_o, tol_o;
logic [K-1:0] ok_i;

logic [K-1:0] bad;          // groups holding an injected defect
int unsigned  site_t [K];   // 0: Group-Split output, 1: Sub-Adder output, 2: redundant copy
int unsigned  site_i [K];   // bit index of the faulty node
logic         stuck  [K];   // stuck-at value
event         ev_fault;

// fault sites of the group-owned nodes
for (genvar r = 0; r < K; r++) begin : g_fr
  localparam int unsigned NE = (W - r + K - 1) / K;
  for (genvar j = 0; j < NE; j++) begin : g_el
    initial forever begin
      @(ev_fault);
      if (bad[r] && site_t[r] == 0 && site_i[r] == r + j*K) force dut.g_grp[r].gx[j].g = stuck[r];
      else release dut.g_grp[r].gx[j].g;
      if (bad[r] && site_t[r] == 1 && site_i[r] == r + j*K) force dut.g_grp[r].gy[j].g = stuck[r];
      else release dut.g_grp[r].gy[j].g;
    end
  end
end
// redundant copy c of bit i belongs to group (i-c) mod K
for (genvar i = 0; i < W; i++) begin : g_cp
  for (genvar c = 1; c < K; c++) begin : g_c
    localparam int unsigned R = (i + K - c) % K;
    initial forever begin
      @(ev_fault);
      if (bad[R] && site_t[R] == 2 && site_i[R] == i) force dut.copy_gp[i][c].g = stuck[R];
      else release dut.copy_gp[i][c].g;
    end
  end
end

function automatic logic [W-1:0] rnd_word();
  logic [W-1:0] v;
  for (int q = 0; q < W; q += 32) v = (v << 32) ^ W'($urandom);
  return v;
endfunction

// nearest good group below bit i: the copy a correct selector must use
function automatic int unsigned nearest(int unsigned i, logic [K-1:0] ok);
  for (int unsigned c = 0; c < K; c++) if (ok[(i + K - c) % K]) return c;
  return 0;
endfunction

initial begin : run
  int unsigned mech_copy [K];
  int unsigned mech_iso, mech_vis, mech_untol, mech_single;
  int unsigned nvis;
  logic [W:0]  expect_sum;
  logic [K-1:0] good;
  int unsigned  g1;
  done[CFG] = 1'b0;
  for (int c = 0; c < K; c++) mech_copy[c] = 0;
  mech_iso = 0; mech_vis = 0; mech_untol = 0; mech_single = 0;
  bad = '0;
  for (int r = 0; r < K; r++) begin site_t[r] = 0; site_i[r] = 0; stuck[r] = 1'b0; end
  a_i = '0; b_i = '0; ok_i = '1;
  #1;
  for (int t = 0; t < TRIALS; t++) begin
    // choose the defective groups: none in trial 0, all of them now and then
    bad = '0;
    if (t > 0) begin
      if (t % 17 == 5) bad = '1;
      else begin
        automatic int unsigned nb = 1 + $urandom_range(K > 1 ? K - 2 : 0);
        for (int q = 0; q < nb; q++) bad[$urandom_range(K-1)] = 1'b1;
      end
    end
    for (int r = 0; r < K; r++) begin
      automatic int unsigned ne = (W - r + K - 1) / K;
      site_t[r] = (K > 1) ? $urandom_range(2) : $urandom_range(1);
      if (site_t[r] == 2) begin
        automatic int unsigned i;
        do i = $urandom_range(W-1); while (i % K == r);
        site_i[r] = i;
      end else site_i[r] = r + K * $urandom_range(ne - 1);
      stuck[r] = 1'($urandom_range(1));
    end
    -> ev_fault;
    #1;
    good = ~bad;
    // pick one good group for the single-group configuration
    g1 = 0;
    if (good != '0) begin
      do g1 = $urandom_range(K-1); while (!good[g1]);
    end
    nvis = 0;
    for (int v = 0; v < 24; v++) begin
      a_i = rnd_word();
      case (v % 4)
        0: b_i = rnd_word();
        1: b_i = ~a_i ^ (W'(1) << $urandom_range(W-1));   // one long carry chain
        2: b_i = ~a_i;                                     // all propagate
        default: b_i = rnd_word() & rnd_word();
      endcase
      expect_sum = {1'b0, a_i} + {1'b0, b_i};
      // configuration: all good groups
      ok_i = good; #1;
      checks++;
      if (tol_o !== (good != '0)) begin
        failures++; $display("FAIL cfg %0d: tolerated=%b with group_ok=%b", CFG, tol_o, good);
      end
      if (good != '0) begin
        checks++;
        if ({co_o, s_o} !== expect_sum) begin
          failures++;
          $display("FAIL cfg %0d trial %0d: bad=%b ok=%b a=%h b=%h got %h exp %h",
                   CFG, t, bad, good, a_i, b_i, {co_o, s_o}, expect_sum);
        end
        for (int unsigned i = 0; i < W; i++) mech_copy[nearest(i, good)]++;
        if (bad != '0) mech_iso++;
        // configuration: one good group only
        ok_i = '0; ok_i[g1] = 1'b1; #1;
        checks++;
        if ({co_o, s_o} !== expect_sum) begin
          failures++;
          $display("FAIL cfg %0d trial %0d: single group %0d bad=%b a=%h b=%h got %h exp %h",
                   CFG, t, g1, bad, a_i, b_i, {co_o, s_o}, expect_sum);
        end
        for (int unsigned i = 0; i < W; i++) mech_copy[nearest(i, ok_i)]++;
        if (bad != '0) mech_single++;
      end
      // configuration: defects ignored
      if (bad != '0) begin
        ok_i = '1; #1;
        if ({co_o, s_o} !== expect_sum) nvis++;
      end
      // configuration: nothing known good
      if (v == 0) begin
        ok_i = '0; #1;
        checks++;
        if (tol_o !== 1'b0) begin failures++; $display("FAIL cfg %0d: tolerated with group_ok=0", CFG); end
        mech_untol++;
      end
    end
    if (nvis > 0) mech_vis++;
  end
  bad = '0;
  -> ev_fault;
  #1;
  // every mechanism must have happened
  for (int c = 0; c < K; c++) begin
    checks++;
    if (mech_copy[c] == 0) begin failures++; $display("FAIL cfg %0d: copy distance %0d never used", CFG, c); end
  end
  checks += 4;
  if (mech_iso == 0)    begin failures++; $display("FAIL cfg %0d: no defect was isolated", CFG); end
  if (mech_single == 0) begin failures++; $display("FAIL cfg %0d: no single-group run", CFG); end
  if (mech_vis == 0)    begin failures++; $display("FAIL cfg %0d: no injected defect was visible", CFG); end
  if (mech_untol == 0)  begin failures++; $display("FAIL cfg %0d: no untolerable configuration", CFG); end
  $write("cfg %0d (W=%0d K=%0d): isolated %0d, single-group %0d, visible %0d, untolerated %0d, copy use",
         CFG, W, K, mech_iso, mech_single, mech_vis, mech_untol);
  for (int c = 0; c < K; c++) $write(" d%0d=%0d", c, mech_copy[c]);
  $write("\n");
  done[CFG] = 1'b1;
end
