// tb_lookup_engine: tests one IPv4 and one IPv6 lookup engine on their own.
//
// Each engine gets its own DRAM model and a scheduler stand-in that grants
// at random (so lookups wait in S1 and in_ready drops) and picks a random
// bank holding each table. The on-chip tables are modelled here and answer
// one cycle after oc_req. Routes come from the software table builder;
// results are compared in order with a longest-prefix-match reference, and
// the latency of a lookup granted at once must be DRAM_LAT + 3 cycles.
module tb_lookup_engine;
  import flashlook_pkg::*;
  import fl_tb_pkg::*;

  localparam int LAT = 8, NB = 36;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d %s", cyc, s); end
  endtask

  prefix_t p4 [$];
  prefix_t p6 [$];
  tbl_builder bld [5];

  // ---------------- shared update bus ----------------
  logic [2:0]  hid_we6 = 0, bsm_we6 = 0;
  logic [1:0]  hid_we4 = 0, bsm_we4 = 0;
  logic [17:0] hid_waddr = 0;
  logic [3:0]  hid_wdata = 0;
  logic [12:0] bsm_waddr = 0;
  logic [MAX_BSM_W-1:0] bsm_wdata = 0;

  // ---------------- IPv4 engine ----------------
  logic v4_valid = 0, v4_ready, v4_oc_req, v4_sreq, v4_sgnt;
  logic [31:0] v4_key = 0, v4_oc_key;
  logic [7:0] v4_tag = 0, v4_short = 0;
  logic [BANK_AW-1:0] v4_rel [2];
  logic [5:0] v4_bank [2];
  logic [NB-1:0] v4_rv, v4_bl8;
  logic [BANK_AW-1:0] v4_ra [NB];
  logic [127:0] v4_rd [NB];
  logic v4_ov, v4_obsm;
  logic [7:0] v4_onh, v4_otag;
  src_e v4_osrc;

  lookup_engine #(.IS_V6(1'b0), .DRAM_LAT(LAT)) u_v4 (
    .clk(clk), .rst_n(rst_n), .in_valid(v4_valid), .in_ready(v4_ready), .in_key(v4_key), .in_tag(v4_tag),
    .oc_req(v4_oc_req), .oc_key(v4_oc_key), .oc_short_nh(v4_short), .oc_long_nh(8'd0),
    .sched_req(v4_sreq), .sched_rel_addr(v4_rel), .sched_gnt(v4_sgnt), .sched_bank(v4_bank),
    .dram_rd_data(v4_rd), .hid_we(hid_we4), .hid_waddr(hid_waddr), .hid_wdata(hid_wdata),
    .bsm_we(bsm_we4), .bsm_waddr(bsm_waddr), .bsm_wdata(bsm_wdata),
    .out_valid(v4_ov), .out_nh(v4_onh), .out_tag(v4_otag), .out_src(v4_osrc), .out_bsm(v4_obsm));

  dram_model #(.NCHIP(9), .LAT(LAT), .TRC(1)) u_dram4 (.clk(clk), .req_valid(v4_rv), .req_addr(v4_ra),
    .req_bl8(v4_bl8), .req_we('0), .wr_data('0), .rd_data(v4_rd));

  // ---------------- IPv6 engine ----------------
  logic v6_valid = 0, v6_ready, v6_oc_req, v6_sreq, v6_sgnt;
  logic [63:0] v6_key = 0, v6_oc_key;
  logic [7:0] v6_tag = 0, v6_short = 0, v6_long = 0;
  logic [BANK_AW-1:0] v6_rel [3];
  logic [5:0] v6_bank [3];
  logic [NB-1:0] v6_rv, v6_bl8;
  logic [BANK_AW-1:0] v6_ra [NB];
  logic [127:0] v6_rd [NB];
  logic v6_ov, v6_obsm;
  logic [7:0] v6_onh, v6_otag;
  src_e v6_osrc;

  lookup_engine #(.IS_V6(1'b1), .DRAM_LAT(LAT)) u_v6 (
    .clk(clk), .rst_n(rst_n), .in_valid(v6_valid), .in_ready(v6_ready), .in_key(v6_key), .in_tag(v6_tag),
    .oc_req(v6_oc_req), .oc_key(v6_oc_key), .oc_short_nh(v6_short), .oc_long_nh(v6_long),
    .sched_req(v6_sreq), .sched_rel_addr(v6_rel), .sched_gnt(v6_sgnt), .sched_bank(v6_bank),
    .dram_rd_data(v6_rd), .hid_we(hid_we6), .hid_waddr(hid_waddr), .hid_wdata(hid_wdata),
    .bsm_we(bsm_we6), .bsm_waddr(bsm_waddr), .bsm_wdata(bsm_wdata),
    .out_valid(v6_ov), .out_nh(v6_onh), .out_tag(v6_otag), .out_src(v6_osrc), .out_bsm(v6_obsm));

  dram_model #(.NCHIP(9), .LAT(LAT), .TRC(1)) u_dram6 (.clk(clk), .req_valid(v6_rv), .req_addr(v6_ra),
    .req_bl8(v6_bl8), .req_we('0), .wr_data('0), .rd_data(v6_rd));

  // ---------------- scheduler stand-ins ----------------
  int grant_pct = 100;
  logic [5:0] pick4 [2];
  logic [5:0] pick6 [3];

  function automatic int rand_bank(int t);
    int b;
    do b = $urandom_range(0, NB - 1); while (!bank_has(b, t));
    return b;
  endfunction

  always @(posedge clk) begin
    v4_sgnt <= ($urandom_range(1, 100) <= grant_pct);
    v6_sgnt <= ($urandom_range(1, 100) <= grant_pct);
    pick4[0] <= 6'(rand_bank(0));
    pick4[1] <= 6'(rand_bank(1));
    for (int t = 0; t < 3; t++) pick6[t] <= 6'(rand_bank(t + 2));
  end
  assign v4_bank = pick4;
  assign v6_bank = pick6;

  always_comb begin
    v4_rv = '0; v4_bl8 = '0; v6_rv = '0; v6_bl8 = '0;
    for (int b = 0; b < NB; b++) begin v4_ra[b] = '0; v6_ra[b] = '0; end
    if (v4_sreq && v4_sgnt)
      for (int t = 0; t < 2; t++) begin
        v4_rv[pick4[t]] = 1'b1; v4_bl8[pick4[t]] = (t == 1);
        v4_ra[pick4[t]] = bank_base(t) + v4_rel[t];
      end
    if (v6_sreq && v6_sgnt)
      for (int t = 0; t < 3; t++) begin
        v6_rv[pick6[t]] = 1'b1; v6_bl8[pick6[t]] = (t == 2);
        v6_ra[pick6[t]] = bank_base(t + 2) + v6_rel[t];
      end
  end

  // ---------------- on-chip tables ----------------
  always @(posedge clk) begin
    if (v4_oc_req) v4_short <= 8'(lpm(p4, longint'(v4_oc_key), 32, 0, 18));
    if (v6_oc_req) begin
      v6_short <= 8'(lpm(p6, v6_oc_key, 64, 0, 24));
      v6_long  <= 8'(lpm(p6, v6_oc_key, 64, 49, 64));
    end
  end

  // ---------------- routes ----------------
  function automatic prefix_t mk(longint val, int len, int nh, int aw);
    prefix_t p;
    p.len = len; p.nh = nh;
    p.val = val & ~lmask(aw - len);
    return p;
  endfunction

  task automatic program_tables();
    for (int t = 0; t < 5; t++) begin
      bld[t] = new(t, 16);
      if (t < 2) foreach (p4[i]) bld[t].add_prefix(p4[i]);
      else       foreach (p6[i]) bld[t].add_prefix(p6[i]);
      bld[t].build();
      foreach (bld[t].hid[g]) begin
        @(negedge clk);
        if (t < 2) hid_we4[t] = 1; else hid_we6[t-2] = 1;
        hid_waddr = 18'(g); hid_wdata = 4'(bld[t].hid[g]);
        @(negedge clk); hid_we4 = 0; hid_we6 = 0;
      end
      foreach (bld[t].bsm_rows[r]) begin
        @(negedge clk);
        if (t < 2) bsm_we4[t] = 1; else bsm_we6[t-2] = 1;
        bsm_waddr = 13'(r); bsm_wdata = bld[t].bsm_rows[r];
        @(negedge clk); bsm_we4 = 0; bsm_we6 = 0;
      end
      foreach (bld[t].words[a]) begin
        if (t < 2) u_dram4.put(t, a, bld[t].words[a]);
        else       u_dram6.put(t, a, bld[t].words[a]);
      end
    end
  endtask

  // ---------------- traffic and checking ----------------
  typedef struct { bit [7:0] tag; bit [7:0] nh; src_e src; bit bsm; int t_acc; } exp_t;
  exp_t q4 [$];
  exp_t q6 [$];
  exp_t e;
  bit run = 0;
  int n4 = 0, n6 = 0, stall4 = 0, stall6 = 0, bsm_hits = 0, lat_checked = 0;
  int srcs4 [6], srcs6 [6];

  function automatic exp_t ref4(longint a);
    exp_t r; r.bsm = 0;
    r.nh = 8'(lpm(p4, a, 32, 25, 32)); r.src = SRC_TBL1;
    if (r.nh != 0) begin r.bsm = bld[1].in_bsm.exists(elem_key(1, a)); return r; end
    r.nh = 8'(lpm(p4, a, 32, 19, 24)); r.src = SRC_TBL0;
    if (r.nh != 0) begin r.bsm = bld[0].in_bsm.exists(elem_key(0, a)); return r; end
    r.nh = 8'(lpm(p4, a, 32, 0, 18)); r.src = (r.nh != 0) ? SRC_SHORT : SRC_NONE;
    return r;
  endfunction

  function automatic exp_t ref6(longint a);
    exp_t r; r.bsm = 0;
    r.nh = 8'(lpm(p6, a, 64, 49, 64)); r.src = SRC_LONG;
    if (r.nh != 0) return r;
    for (int t = 4; t >= 2; t--) begin
      r.nh = 8'(lpm(p6, a, 64, tbl_lo(t), tbl_key_w(t)));
      r.src = src_e'(int'(SRC_TBL0) + t - 2);
      if (r.nh != 0) begin r.bsm = bld[t].in_bsm.exists(elem_key(t, a)); return r; end
    end
    r.nh = 8'(lpm(p6, a, 64, 0, 24)); r.src = (r.nh != 0) ? SRC_SHORT : SRC_NONE;
    return r;
  endfunction

  function automatic longint gen(bit v6);
    prefix_t p;
    if (!v6) begin
      p = p4[$urandom_range(0, p4.size() - 1)];
      return p.val | (longint'($urandom) & lmask(32 - p.len));
    end
    p = p6[$urandom_range(0, p6.size() - 1)];
    return p.val | ({3'b001, 29'($urandom), 32'($urandom)} & lmask(64 - p.len));
  endfunction

  always @(posedge clk) begin
    if (v4_valid && !v4_ready) stall4++;
    if (v6_valid && !v6_ready) stall6++;
    if (v4_valid && v4_ready) begin e = ref4(v4_key); e.tag = v4_tag; e.t_acc = cyc; q4.push_back(e); end
    if (v6_valid && v6_ready) begin e = ref6(v6_key); e.tag = v6_tag; e.t_acc = cyc; q6.push_back(e); end
    if (!v4_valid || v4_ready) begin v4_valid <= run; v4_key <= 32'(gen(0)); v4_tag <= v4_tag + 1; end
    if (!v6_valid || v6_ready) begin v6_valid <= run; v6_key <= gen(1); v6_tag <= v6_tag + 1; end
    if (rst_n && v4_ov) begin
      e = q4.pop_front();
      chk(v4_onh == e.nh && v4_otag == e.tag && v4_osrc == e.src && v4_obsm == e.bsm,
          $sformatf("v4 nh %0d src %0d bsm %0d tag %0d; expected %0d %0d %0d %0d", v4_onh, v4_osrc, v4_obsm, v4_otag, e.nh, e.src, e.bsm, e.tag));
      if (grant_pct == 100) begin chk(cyc - e.t_acc == LAT + 3, $sformatf("v4 latency %0d", cyc - e.t_acc)); lat_checked++; end
      n4++; srcs4[int'(v4_osrc)]++; if (v4_obsm) bsm_hits++;
    end
    if (rst_n && v6_ov) begin
      e = q6.pop_front();
      chk(v6_onh == e.nh && v6_otag == e.tag && v6_osrc == e.src && v6_obsm == e.bsm,
          $sformatf("v6 nh %0d src %0d bsm %0d; expected %0d %0d %0d", v6_onh, v6_osrc, v6_obsm, e.nh, e.src, e.bsm));
      if (grant_pct == 100) chk(cyc - e.t_acc == LAT + 3, "v6 latency");
      n6++; srcs6[int'(v6_osrc)]++; if (v6_obsm) bsm_hits++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint base;
    p4.push_back(mk(32'hC0000000, 4, 7, 32));
    for (int i = 0; i < 200; i++) p4.push_back(mk(longint'($urandom), $urandom_range(10, 32), $urandom_range(1, 255), 32));
    base = longint'($urandom) & 64'h07FFFE00;
    for (int i = 0; i < 16; i++) p4.push_back(mk(base | (longint'(i) << 27) | (longint'(i & 1) << 8), 24, 100 + i, 32));
    for (int i = 0; i < 200; i++) p6.push_back(mk({3'b001, 29'($urandom), 32'($urandom)}, $urandom_range(16, 64), $urandom_range(1, 255), 64));
    base = {3'b001, 29'($urandom), 32'($urandom)} & 64'hE0000007FFFE0000;
    for (int i = 0; i < 10; i++) p6.push_back(mk(base | (longint'(i * 311 + 5) << 35), 48, 60 + i, 64));
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_tables();
    // full grant rate: fixed latency
    run = 1; repeat (500) @(posedge clk); run = 0; repeat (LAT + 10) @(posedge clk);
    chk(stall4 == 0 && stall6 == 0 && lat_checked > 400, "no stall when always granted");
    // random grants: lookups wait for the scheduler
    grant_pct = 60;
    run = 1; repeat (3000) @(posedge clk); run = 0; repeat (LAT + 10) @(posedge clk);
    chk(stall4 > 0 && stall6 > 0, "scheduler refusals stall the input");
    chk(q4.size() == 0 && q6.size() == 0, "every lookup answered");
    chk(srcs4[1] > 0 && srcs4[2] > 0 && srcs4[3] > 0, "all IPv4 levels hit");
    chk(srcs6[1] > 0 && srcs6[2] > 0 && srcs6[3] > 0 && srcs6[4] > 0 && srcs6[5] > 0, "all IPv6 levels hit");
    chk(bsm_hits > 0, "BSM hits");
    $display("IPv4 %0d lookups, IPv6 %0d, stalls %0d/%0d, BSM hits %0d", n4, n6, stall4, stall6, bsm_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
