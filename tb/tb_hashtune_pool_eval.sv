// tb_hashtune_pool_eval: HashTune overflow evaluation on a full-size IPv4/24
// table, run through the RTL hash functions.
//
// The table has 2^18 bin groups of 6 bins with c = 3 elements each
// (1,572,864 bins). The testbench fills it with 2,685,348 random /24 prefixes
// on average (each of the 2^24 /24 prefixes is present with probability
// 2,685,348 / 2^24), which is the evaluation load of the original design
// (lambda = 1.707 prefixes per bin). Siblings that differ only in their last
// bit share one element, as in the real tables. The prefixes are uniformly
// random, not a real routing table, so the counts are comparable in size but
// not equal to published ones.
//
// Sixty-four hash_pool instances (POOL = 64, IPv4/24 geometry) hash every
// element with every function of the pool at once. For each group the
// testbench then counts the overflows (elements beyond c in a bin) of each
// function and keeps the best of the first P functions, for P = 1, 2, 4,
// 8, 16, 32, 64; "one function" is the best single function for the whole
// table. Checks:
//   - the RTL bin equals an independent bit-by-bit H3 computation;
//   - overflows never grow as the pool grows, and HashTune with 16
//     functions removes at least 90% of the best single function's
//     overflows;
//   - with the default pool of 16, the overflowed bins fit the 8192-row
//     IPv4/24 BSM and no bin holds more than c - 1 + 8 = 10 elements, so the
//     whole table can be stored.
// One element is hashed per time unit; the run takes a few seconds.
module tb_hashtune_pool_eval;
  import flashlook_pkg::*;
  import fl_tb_pkg::*;

  localparam int NF     = 64;
  localparam int VW     = 5;
  localparam int BPG    = 6;
  localparam int C      = 3;
  localparam int GROUPS = 1 << 18;
  localparam int NPOOL  = 7;            // pool sizes 1, 2, 4, ..., 64
  localparam int BSM_ROWS = 8192;
  localparam int unsigned P_NUM = 2685348;   // prefixes per 2^24

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  logic [VW-1:0] x = '0;
  logic [2:0]    bin_f [NF];

  for (genvar f = 0; f < NF; f++) begin : g_pool
    hash_pool #(.POOL(NF), .VW(VW), .BPG(BPG)) u_hash (
      .id (6'(f)),
      .x  (x),
      .bin(bin_f[f])
    );
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint n_pref = 0, n_elem = 0;
  longint ovf_pool [NPOOL];       // HashTune overflows per pool size
  longint ovf_single [NF];        // overflows of each function used alone
  longint occ_hist [11];          // bin occupancy histogram, pool of 16
  int     ovf_bins16 = 0, max_occ16 = 0, hist_top = 0;

  initial begin : run
    logic [VW-1:0] elems [32];
    logic [2:0]    eb [32][NF];
    int ne, occ [BPG], ovf, best, sel, p;
    int ovf_f [NF];
    longint best_single;
    int unsigned thr;
    thr = int'((64'(P_NUM) << 32) / (64'd1 << 24));   // presence threshold

    foreach (ovf_pool[i]) ovf_pool[i] = 0;
    foreach (ovf_single[i]) ovf_single[i] = 0;
    foreach (occ_hist[i]) occ_hist[i] = 0;

    for (int g = 0; g < GROUPS; g++) begin
      // the 64 /24 prefixes of a group are {verify[4:0], aggregation bit}
      ne = 0;
      for (int v = 0; v < 32; v++) begin
        bit c0, c1;
        c0 = ($urandom < thr);
        c1 = ($urandom < thr);
        n_pref += longint'(c0) + longint'(c1);
        if (c0 || c1) begin
          elems[ne] = VW'(v);
          ne++;
        end
      end
      n_elem += ne;
      // hash every element with all functions (RTL)
      for (int e = 0; e < ne; e++) begin
        x = elems[e];
        #1;
        for (int f = 0; f < NF; f++) eb[e][f] = bin_f[f];
        if ((g & 1023) == 0 && e == 0)
          for (int f = 0; f < NF; f++)
            check(int'(bin_f[f]) == ref_bin(0, f, longint'(elems[e])),
                  $sformatf("group %0d fn %0d: RTL bin %0d, reference %0d", g, f, bin_f[f],
                            ref_bin(0, f, longint'(elems[e]))));
      end
      // overflows of each function in this group
      for (int f = 0; f < NF; f++) begin
        foreach (occ[b]) occ[b] = 0;
        for (int e = 0; e < ne; e++) occ[eb[e][f]]++;
        ovf = 0;
        foreach (occ[b]) if (occ[b] > C) ovf += occ[b] - C;
        ovf_f[f] = ovf;
        ovf_single[f] += ovf;
      end
      // HashTune: best of the first P functions
      best = ovf_f[0];
      sel = 0;
      p = 1;
      for (int k = 0; k < NPOOL; k++) begin
        for (int f = p / 2; f < p; f++)
          if (f > 0 && ovf_f[f] < best) begin
            best = ovf_f[f];
            sel = f;
          end
        ovf_pool[k] += best;
        if (p == 16) begin
          foreach (occ[b]) occ[b] = 0;
          for (int e = 0; e < ne; e++) occ[eb[e][sel]]++;
          foreach (occ[b]) begin
            occ_hist[occ[b] > 10 ? 10 : occ[b]]++;
            if (occ[b] > C) ovf_bins16++;
            if (occ[b] > max_occ16) max_occ16 = occ[b];
          end
        end
        p = p * 2;
      end
    end

    best_single = ovf_single[0];
    foreach (ovf_single[f]) if (ovf_single[f] < best_single) best_single = ovf_single[f];

    $display("prefixes %0d, elements after aggregation %0d, bins %0d", n_pref, n_elem, GROUPS * BPG);
    $display("overflowing elements: one function %0d", best_single);
    p = 1;
    for (int k = 0; k < NPOOL; k++) begin
      $display("  HashTune pool of %2d: %0d", p, ovf_pool[k]);
      p = p * 2;
    end
    $display("pool of 16: %0d overflowed bins, fullest bin %0d elements", ovf_bins16, max_occ16);
    for (int k = 0; k <= 10; k++) $display("  bins holding %0d%s: %0d", k, k == 10 ? "+" : "", occ_hist[k]);

    check(n_pref > 2_675_000 && n_pref < 2_695_000, $sformatf("prefix count %0d near 2,685,348", n_pref));
    check(ovf_pool[0] >= best_single, "pool of 1 is no better than the best single function");
    for (int k = 1; k < NPOOL; k++)
      check(ovf_pool[k] <= ovf_pool[k-1], $sformatf("overflows grow from pool step %0d to %0d", k - 1, k));
    check(ovf_pool[4] * 10 <= best_single,
          $sformatf("pool of 16 removes at least 90%% of overflows (%0d vs %0d)", ovf_pool[4], best_single));
    check(ovf_bins16 <= BSM_ROWS, $sformatf("%0d overflowed bins fit %0d BSM rows", ovf_bins16, BSM_ROWS));
    check(max_occ16 <= C - 1 + BSM_SLOTS, $sformatf("fullest bin %0d fits bin + BSM row", max_occ16));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
