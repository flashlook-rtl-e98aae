// tb_flashlook_top: end-to-end test of the FlashLook lookup datapath at its
// default size (9 DRAM chips, 16 hash functions, full-size tables).
//
// A routing table with IPv4 and IPv6 prefixes of all lengths is built in
// software (fl_tb_pkg), including bin groups crowded enough to overflow into
// the BSM; the on-chip tables are filled through the update port and the
// DRAM model gets the bins. Lookups then run in five phases:
//   A  IPv4 only, back to back: 1 lookup per cycle, no stall, latency
//      DRAM_LAT + 3 (= 19) cycles
//   B  IPv6 only: at least 1 lookup per 1.5 cycles
//   C  IPv4 and IPv6 together: the DRAM scheduler stalls one or the other
//   D  route updates (next hop change, withdrawal, new prefix): hash IDs,
//      BSM rows and the changed DRAM bins go through the update port,
//      then lookups check the new routes
//   E  bin writes in the spare bank time while IPv4 runs at full rate
// Every result (next hop, matching level, BSM flag, order) is compared with
// a plain longest-prefix-match reference, and each mechanism is counted.
module tb_flashlook_top;
  import flashlook_pkg::*;
  import fl_tb_pkg::*;

  localparam int NCHIP = 9, NB = 36, LAT = 16, TRC = 15, POOL = 16;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic v4_in_valid = 0, v4_in_ready, v6_in_valid = 0, v6_in_ready;
  logic [31:0] v4_in_addr = 0;
  logic [63:0] v6_in_addr = 0;
  logic [7:0]  v4_in_tag = 0, v6_in_tag = 0;
  logic v4_out_valid, v6_out_valid, v4_out_bsm, v6_out_bsm;
  logic [7:0] v4_out_nh, v6_out_nh, v4_out_tag, v6_out_tag;
  src_e v4_out_src, v6_out_src;
  logic v6_oc_req;
  logic [63:0] v6_oc_addr;
  logic [7:0] v6_oc_short_nh = 0, v6_oc_long_nh = 0;
  logic [NB-1:0] dram_req_valid, dram_req_bl8;
  logic [BANK_AW-1:0] dram_req_addr [NB];
  logic [127:0] dram_rd_data [NB];
  logic upd_valid = 0;
  upd_e upd_kind = UPD_DIRECT;
  tbl_e upd_tbl = T4_24;
  logic [BANK_AW-1:0] upd_addr = 0;
  logic upd_ready;
  logic [NB-1:0] dram_req_we;
  logic [127:0] dram_wr_data;
  logic [7:0] upd_mask = 0;
  logic [MAX_BSM_W-1:0] upd_data = 0;

  flashlook_top dut (.*);

  dram_model #(.NCHIP(NCHIP), .LAT(LAT), .TRC(TRC)) u_dram (
    .clk(clk), .req_valid(dram_req_valid), .req_addr(dram_req_addr),
    .req_bl8(dram_req_bl8), .req_we(dram_req_we), .wr_data(dram_wr_data), .rd_data(dram_rd_data));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- routing table ----------------
  prefix_t p4 [$];
  prefix_t p6 [$];
  tbl_builder tb4 [2];
  tbl_builder tb6 [3];
  bit [7:0] dt [262144];

  function automatic prefix_t mk(longint val, int len, int nh, int aw);
    prefix_t p;
    p.len = len; p.nh = nh;
    p.val = (len == 0) ? 0 : (val & ~lmask(aw - len));
    return p;
  endfunction

  function automatic int pick_len4();
    int r = $urandom_range(0, 99);
    if (r < 10) return $urandom_range(8, 18);
    if (r < 70) return (r < 50) ? 24 : $urandom_range(19, 23);
    return (r < 85) ? 32 : $urandom_range(25, 31);
  endfunction

  function automatic int pick_len6();
    int r = $urandom_range(0, 99);
    if (r < 8)  return $urandom_range(12, 24);
    if (r < 30) return $urandom_range(25, 32);
    if (r < 50) return $urandom_range(33, 40);
    if (r < 92) return (r < 75) ? 48 : $urandom_range(41, 47);
    return $urandom_range(49, 64);
  endfunction

  function automatic longint rnd6();
    return {3'b001, 29'($urandom), 32'($urandom)};
  endfunction

  task automatic make_routes();
    longint base;
    // IPv4
    p4.push_back(mk(32'h0A000000, 8, 1, 32));
    for (int i = 0; i < 400; i++) p4.push_back(mk(longint'($urandom), pick_len4(), $urandom_range(1, 255), 32));
    // crowded IPv4/24 bin group: same bits 6-23, 20 different bits 1-5
    base = longint'($urandom) & 64'h07FFFE00;
    for (int i = 0; i < 20; i++) p4.push_back(mk(base | (longint'(i) << 27) | (longint'(i & 1) << 8), 24, 10 + i, 32));
    // crowded IPv4/32 bin group: same bits 16-31, 20 different bits 1-15
    base = longint'($urandom) & 64'h0001FFFE;
    for (int i = 0; i < 20; i++) p4.push_back(mk(base | (longint'(i * 1237 + 1) << 17) | longint'(i & 1), 32, 40 + i, 32));
    // IPv6
    for (int i = 0; i < 300; i++) p6.push_back(mk(rnd6(), pick_len6(), $urandom_range(1, 255), 64));
    // crowded IPv6/48 bin group: same bits 30-47, 12 different bits 4-29
    base = rnd6() & 64'h00000007FFFE0000;
    for (int i = 0; i < 12; i++)
      p6.push_back(mk(64'h2000000000000000 | base | (longint'(i * 977 + 3) << 35) | (longint'(i & 1) << 16), 48, 80 + i, 64));
  endtask

  // ---------------- table programming ----------------
  task automatic upd(upd_e k, tbl_e t, int a, bit [7:0] m, bit [MAX_BSM_W-1:0] d);
    @(negedge clk);
    upd_valid = 1; upd_kind = k; upd_tbl = t; upd_addr = BANK_AW'(a); upd_mask = m; upd_data = d;
    while (!upd_ready) @(negedge clk);
    @(negedge clk);
    upd_valid = 0;
  endtask

  // bin at word address ba of a table image, as written on the update port
  function automatic bit [127:0] bin_of(tbl_builder b, longint ba);
    bit [63:0] w0, w1;
    w0 = b.words.exists(ba) ? b.words[ba] : 64'd0;
    w1 = b.words.exists(ba + 1) ? b.words[ba + 1] : 64'd0;
    return (tbl_bl8(b.t) != 0) ? {w0, w1} : {64'd0, w0};
  endfunction

  int n_binwr = 0;
  task automatic write_bin(tbl_builder b, longint ba);
    upd(UPD_BIN, tbl_e'(b.t), int'(ba), 0, MAX_BSM_W'(bin_of(b, ba)));
    n_binwr++;
  endtask

  task automatic program_direct(bit all_rows);
    bit [7:0] nd [262144];
    for (int i = 0; i < 262144; i++) nd[i] = 0;
    // shorter prefixes first, so that longer ones overwrite them
    for (int len = 0; len <= 18; len++)
      foreach (p4[i]) if (p4[i].len == len) begin
        longint b = (p4[i].val >>> 14) & ~lmask(18 - len);
        for (longint s = 0; s < (64'sd1 <<< (18 - len)); s++) nd[b | s] = 8'(p4[i].nh);
      end
    for (int r = 0; r < 32768; r++) begin
      bit [7:0] done = 0;
      bit differ = 0;
      for (int b = 0; b < 8; b++) if (nd[r*8+b] != dt[r*8+b]) differ = 1;
      if (!all_rows && !differ) continue;
      for (int b = 0; b < 8; b++) if (!done[b]) begin
        bit [7:0] m = 0;
        for (int b2 = b; b2 < 8; b2++) if (nd[r*8+b2] == nd[r*8+b]) m[b2] = 1;
        done |= m;
        upd(UPD_DIRECT, T4_24, r, m, MAX_BSM_W'(nd[r*8+b]));
      end
      for (int b = 0; b < 8; b++) dt[r*8+b] = nd[r*8+b];
    end
  endtask

  task automatic program_table(tbl_builder b, tbl_builder old);
    foreach (b.hid[g]) if (old == null || !old.hid.exists(g) || old.hid[g] != b.hid[g])
      upd(UPD_HID, tbl_e'(b.t), g, 0, MAX_BSM_W'(b.hid[g]));
    foreach (b.bsm_rows[r]) if (old == null || !old.bsm_rows.exists(r) || old.bsm_rows[r] != b.bsm_rows[r])
      upd(UPD_BSM, tbl_e'(b.t), r, 0, b.bsm_rows[r]);
    if (old == null) begin
      // initial load straight into the DRAM model
      foreach (b.words[a]) u_dram.put(b.t, a, b.words[a]);
    end else begin
      // route update: every changed bin goes through the update port
      bit done [longint];
      longint ba;
      foreach (old.words[a]) begin
        ba = (tbl_bl8(b.t) != 0) ? (a & ~64'sd1) : a;
        if (!done.exists(ba) && bin_of(b, ba) != bin_of(old, ba)) begin
          done[ba] = 1; write_bin(b, ba);
        end
      end
      foreach (b.words[a]) begin
        ba = (tbl_bl8(b.t) != 0) ? (a & ~64'sd1) : a;
        if (!done.exists(ba) && bin_of(b, ba) != bin_of(old, ba)) begin
          done[ba] = 1; write_bin(b, ba);
        end
      end
    end
  endtask

  function automatic tbl_builder build(int t);
    tbl_builder b = new(t, POOL);
    if (t < 2) foreach (p4[i]) b.add_prefix(p4[i]);
    else       foreach (p6[i]) b.add_prefix(p6[i]);
    b.build();
    return b;
  endfunction

  task automatic program_all(bit first);
    tbl_builder nb;
    program_direct(first);
    for (int t = 0; t < 5; t++) begin
      nb = build(t);
      if (t < 2) begin program_table(nb, first ? null : tb4[t]); tb4[t] = nb; end
      else       begin program_table(nb, first ? null : tb6[t-2]); tb6[t-2] = nb; end
    end
  endtask

  // ---------------- reference ----------------
  typedef struct { bit [7:0] tag; bit [7:0] nh; src_e src; bit bsm; bit agg1; } exp_t;
  exp_t q4 [$];
  exp_t q6 [$];

  function automatic exp_t ref4(longint a, bit [7:0] tag);
    exp_t e; e.tag = tag; e.bsm = 0; e.agg1 = 0;
    e.nh = 8'(lpm(p4, a, 32, 25, 32));
    if (e.nh != 0) begin e.src = SRC_TBL1; e.bsm = tb4[1].in_bsm.exists(elem_key(1, a)); return e; end
    e.nh = 8'(lpm(p4, a, 32, 19, 24));
    if (e.nh != 0) begin e.src = SRC_TBL0; e.bsm = tb4[0].in_bsm.exists(elem_key(0, a)); e.agg1 = a[8]; return e; end
    e.nh = 8'(lpm(p4, a, 32, 0, 18));
    e.src = (e.nh != 0) ? SRC_SHORT : SRC_NONE;
    return e;
  endfunction

  function automatic exp_t ref6(longint a, bit [7:0] tag);
    exp_t e; e.tag = tag; e.bsm = 0; e.agg1 = 0;
    e.nh = 8'(lpm(p6, a, 64, 49, 64));
    if (e.nh != 0) begin e.src = SRC_LONG; return e; end
    for (int t = 4; t >= 2; t--) begin
      e.nh = 8'(lpm(p6, a, 64, tbl_lo(t), tbl_key_w(t)));
      if (e.nh != 0) begin
        e.src = src_e'(int'(SRC_TBL0) + t - 2);
        e.bsm = tb6[t-2].in_bsm.exists(elem_key(t, a));
        return e;
      end
    end
    e.nh = 8'(lpm(p6, a, 64, 0, 24));
    e.src = (e.nh != 0) ? SRC_SHORT : SRC_NONE;
    return e;
  endfunction

  // IPv6 on-chip tables (not part of the RTL): answer one cycle after a request
  always @(posedge clk) if (v6_oc_req) begin
    v6_oc_short_nh <= 8'(lpm(p6, v6_oc_addr, 64, 0, 24));
    v6_oc_long_nh  <= 8'(lpm(p6, v6_oc_addr, 64, 49, 64));
  end

  // ---------------- traffic ----------------
  int n_src4 [6], n_src6 [6];
  int n_bsm4 = 0, n_bsm6 = 0, n_agg1 = 0, n_stall4 = 0, n_stall6 = 0, n_upd_checked = 0;
  bit run4 = 0, run6 = 0;
  int sent4 = 0, sent6 = 0, got4 = 0, got6 = 0, first_acc4 = -1, first_out4 = -1;
  int last_out4 = 0, last_out6 = 0, first_out6 = -1;

  function automatic longint gen4();
    int r = $urandom_range(0, 99);
    if (r < 15) return longint'($urandom);
    begin
      prefix_t p = p4[$urandom_range(0, p4.size() - 1)];
      return p.val | (longint'($urandom) & lmask(32 - p.len));
    end
  endfunction

  function automatic longint gen6();
    int r = $urandom_range(0, 99);
    if (r < 15) return rnd6();
    begin
      prefix_t p = p6[$urandom_range(0, p6.size() - 1)];
      longint a = p.val | (rnd6() & lmask(64 - p.len));
      return a;
    end
  endfunction

  exp_t e;
  always @(posedge clk) begin
    if (v4_in_valid && !v4_in_ready) n_stall4++;
    if (v6_in_valid && !v6_in_ready) n_stall6++;
    if (v4_in_valid && v4_in_ready) begin
      q4.push_back(ref4(longint'(v4_in_addr), v4_in_tag));
      if (first_acc4 < 0) first_acc4 = cyc;
      sent4++;
    end
    if (v6_in_valid && v6_in_ready) begin
      q6.push_back(ref6(longint'(v6_in_addr), v6_in_tag));
      sent6++;
    end
    if (!v4_in_valid || v4_in_ready) begin
      v4_in_valid <= run4;
      v4_in_addr  <= 32'(gen4());
      v4_in_tag   <= v4_in_tag + 8'(v4_in_valid);
    end
    if (!v6_in_valid || v6_in_ready) begin
      v6_in_valid <= run6;
      v6_in_addr  <= gen6();
      v6_in_tag   <= v6_in_tag + 8'(v6_in_valid);
    end
    if (rst_n && v4_out_valid) begin
      if (q4.size() == 0) check(0, "IPv4 result without request");
      else begin
        e = q4.pop_front();
        check(v4_out_nh == e.nh && v4_out_tag == e.tag && v4_out_src == e.src && v4_out_bsm == e.bsm,
              $sformatf("v4 tag %0d: nh %0d src %0d bsm %0d, expected %0d %0d %0d",
                        v4_out_tag, v4_out_nh, v4_out_src, v4_out_bsm, e.nh, e.src, e.bsm));
        n_src4[int'(v4_out_src)]++;
        if (v4_out_bsm) n_bsm4++;
        if (e.agg1 && v4_out_src == SRC_TBL0) n_agg1++;
        if (first_out4 < 0) first_out4 = cyc;
        last_out4 = cyc;
        got4++;
      end
    end
    if (rst_n && v6_out_valid) begin
      if (q6.size() == 0) check(0, "IPv6 result without request");
      else begin
        e = q6.pop_front();
        check(v6_out_nh == e.nh && v6_out_tag == e.tag && v6_out_src == e.src && v6_out_bsm == e.bsm,
              $sformatf("v6 tag %0d: nh %0d src %0d bsm %0d, expected %0d %0d %0d",
                        v6_out_tag, v6_out_nh, v6_out_src, v6_out_bsm, e.nh, e.src, e.bsm));
        n_src6[int'(v6_out_src)]++;
        if (v6_out_bsm) n_bsm6++;
        if (first_out6 < 0) first_out6 = cyc;
        last_out6 = cyc;
        got6++;
      end
    end
  end


  task automatic drain();
    run4 = 0; run6 = 0;
    repeat (LAT + 10) @(posedge clk);
  endtask

  task automatic run_phase(bit a4, bit a6, int n);
    int s4 = sent4, s6 = sent6;
    run4 = a4; run6 = a6;
    while ((a4 && sent4 - s4 < n) || (a6 && sent6 - s6 < n)) begin
      @(posedge clk);
      if (a4 && sent4 - s4 >= n) run4 = 0;
      if (a6 && sent6 - s6 >= n) run6 = 0;
    end
    drain();
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ids4, c1, st4, st6, w0, e0, e1;
  initial begin
    make_routes();
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_all(1);
    ids4 = tb4[0].used_ids.size();
    $display("IPv4/24: %0d elements in %0d groups, %0d overflowed bins, %0d BSM elements, %0d hash IDs used",
             tb4[0].n_elems, tb4[0].n_groups, tb4[0].n_ovf_bins, tb4[0].n_bsm_elems, ids4);
    $display("IPv4/32: %0d elements, %0d overflowed bins; IPv6/48: %0d elements, %0d overflowed bins",
             tb4[1].n_elems, tb4[1].n_ovf_bins, tb6[2].n_elems, tb6[2].n_ovf_bins);
    check(ids4 > 1, "HashTune uses more than one hash function");

    // Phase A: IPv4 only, full rate
    c1 = got4; st4 = n_stall4; first_acc4 = -1; first_out4 = -1;
    run_phase(1, 0, 2000);
    c1 = got4 - c1;
    check(n_stall4 == st4, $sformatf("IPv4 alone must never stall (%0d stalls)", n_stall4 - st4));
    check(first_out4 - first_acc4 == LAT + 3, $sformatf("IPv4 latency %0d, expected %0d", first_out4 - first_acc4, LAT + 3));
    check(c1 >= 2000 && last_out4 - first_out4 + 1 == c1,
          $sformatf("%0d IPv4 results in %0d cycles", c1, last_out4 - first_out4 + 1));

    // Phase B: IPv6 only
    c1 = got6; first_out6 = -1;
    run_phase(0, 1, 1000);
    c1 = got6 - c1;
    check(c1 >= 1000, "all IPv6 lookups answered");
    $display("IPv6 alone: %0d lookups in %0d cycles", c1, last_out6 - first_out6 + 1);
    check((last_out6 - first_out6 + 1) * 2 <= c1 * 3, "IPv6 rate at least 1 per 1.5 cycles");

    // Phase C: both families at once
    st4 = n_stall4; st6 = n_stall6;
    run_phase(1, 1, 2000);
    check(n_stall4 + n_stall6 > st4 + st6, "DRAM bank contention stalls a lookup");

    // Phase D: updates: change next hops and withdraw prefixes, then look up again
    for (int i = 0; i < 30; i++) p4[$urandom_range(0, p4.size()-1)].nh = $urandom_range(1, 255);
    for (int i = 0; i < 10; i++) p4.delete($urandom_range(0, p4.size()-1));
    for (int i = 0; i < 20; i++) p6[$urandom_range(0, p6.size()-1)].nh = $urandom_range(1, 255);
    for (int i = 0; i < 5; i++) p6.delete($urandom_range(0, p6.size()-1));
    for (int i = 0; i < 20; i++) p4.push_back(mk(longint'($urandom), pick_len4(), $urandom_range(1, 255), 32));
    for (int i = 0; i < 10; i++) p6.push_back(mk(rnd6(), pick_len6(), $urandom_range(1, 255), 64));
    program_all(0);
    check(n_binwr > 0 && u_dram.writes > 0, "changed bins written to DRAM through the update port");
    $display("route update: %0d bins rewritten, %0d DRAM copy writes", n_binwr, u_dram.writes);
    c1 = got4;
    run_phase(1, 1, 1500);
    n_upd_checked = got4 - c1;

    // Phase E: bin writes (same contents) in the spare bank time while IPv4
    // runs at full rate
    st4 = n_stall4; w0 = u_dram.writes; c1 = n_binwr; e0 = cyc;
    fork
      run_phase(1, 0, 3000);
      begin
        int k;
        k = 0; foreach (tb4[0].words[a]) if (k < 15) begin write_bin(tb4[0], a); k++; end
        k = 0; foreach (tb4[1].words[a]) if (k < 15) begin write_bin(tb4[1], a & ~64'sd1); k++; end
        k = 0; foreach (tb6[2].words[a]) if (k < 15) begin write_bin(tb6[2], a & ~64'sd1); k++; end
        e1 = cyc;
      end
    join
    $display("bin writes next to full-rate IPv4: %0d bins (%0d copies) in %0d cycles, %0d IPv4 stalls",
             n_binwr - c1, u_dram.writes - w0, e1 - e0, n_stall4 - st4);
    check(n_binwr - c1 == 45, "all bin writes accepted next to IPv4 traffic");
    check(n_stall4 == st4, $sformatf("bin writes never stall IPv4 (%0d stalls)", n_stall4 - st4));

    $display("IPv4 results: none %0d, /18 %0d, /24 %0d, /32 %0d, from BSM %0d, stalls %0d",
             n_src4[0], n_src4[1], n_src4[2], n_src4[3], n_bsm4, n_stall4);
    $display("IPv6 results: none %0d, short %0d, /32 %0d, /40 %0d, /48 %0d, long %0d, from BSM %0d, stalls %0d",
             n_src6[0], n_src6[1], n_src6[2], n_src6[3], n_src6[4], n_src6[5], n_bsm6, n_stall6);
    $display("IPv4/24 hits on the second child of an aggregated element: %0d", n_agg1);
    $display("DRAM reads %0d, bank timing violations %0d", u_dram.reads, u_dram.violations);
    check(u_dram.violations == 0, "no DRAM bank read twice within 60 ns");
    check(q4.size() == 0 && q6.size() == 0, "every lookup answered");
    check(n_src4[0] > 0 && n_src4[1] > 0 && n_src4[2] > 0 && n_src4[3] > 0, "every IPv4 level matched at least once");
    check(n_src6[1] > 0 && n_src6[2] > 0 && n_src6[3] > 0 && n_src6[4] > 0 && n_src6[5] > 0, "every IPv6 level matched at least once");
    check(n_agg1 > 0, "aggregated element answered for its second child");
    check(n_bsm4 > 0, "IPv4 black sheep found in the BSM");
    check(n_bsm6 > 0, "IPv6 black sheep found in the BSM");
    check(n_upd_checked > 0, "lookups after updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
