// lookup_engine: pipelined longest prefix match for one address family.
//
// IPv4 (IS_V6 = 0) searches the DRAM tables IPv4/24 and IPv4/32 plus the
// on-chip IPv4/18 direct table; IPv6 (IS_V6 = 1) searches IPv6/32, /40 and
// /48 plus on-chip tables of short (up to /24) and long (/49-/64) prefixes.
// The on-chip tables sit outside this module and answer on the oc_* ports.
//
// Pipeline, one lookup per cycle:
//   S0  accept key; HashTune reads the hash ID of each table's bin group and
//       the on-chip table is read.
//   S1  HashTune forms each table's bin address; the DRAM scheduler grants a
//       free copy of every table (the lookup waits here, and in_ready drops,
//       until it does) and the bank reads are issued.
//   S1+DRAM_LAT  the bins arrive from the granted banks and are matched
//       (bin_match); a bin in overflow organisation starts a BSM read.
//   S2  BSM rows are matched; the next hop of the longest matching level
//       wins: long on-chip, then the DRAM tables from longest to shortest,
//       then short on-chip. Next hop ID 0 means "no route".
//   out registered; latency DRAM_LAT + 3 cycles from acceptance when the
//       scheduler grants at once. There is no output back-pressure.
//
// The data flow (HashTune, DRAM bins, BSM after an overflowed bin, on-chip
// table for short prefixes) follows the document. The stage split, the fixed
// DRAM read latency, the in-order results with a user tag and the src/bsm
// status outputs are this design's choices.
module lookup_engine
  import flashlook_pkg::*;
#(
  parameter bit IS_V6    = 1'b0,
  parameter int POOL     = 16,
  parameter int NCHIP    = 9,
  parameter int DRAM_LAT = 16,
  parameter int TAG_W    = 8,
  localparam int KEY_W   = IS_V6 ? 64 : 32,
  localparam int NT      = IS_V6 ? 3 : 2,
  localparam int TB      = IS_V6 ? 2 : 0,
  localparam int NB      = NCHIP * BANKS_PER_CHIP,
  localparam int BI      = $clog2(NB),
  localparam int IDW     = $clog2(POOL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup requests
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [KEY_W-1:0]     in_key,
  input  logic [TAG_W-1:0]     in_tag,
  // on-chip tables: read in the accept cycle, answer one cycle later
  output logic                 oc_req,
  output logic [KEY_W-1:0]     oc_key,
  input  logic [NH_W-1:0]      oc_short_nh,
  input  logic [NH_W-1:0]      oc_long_nh,
  // DRAM scheduler
  output logic                 sched_req,
  output logic [BANK_AW-1:0]   sched_rel_addr [NT],
  input  logic                 sched_gnt,
  input  logic [BI-1:0]        sched_bank [NT],
  input  logic [127:0]         dram_rd_data [NB],
  // table updates
  input  logic [NT-1:0]        hid_we,
  input  logic [17:0]          hid_waddr,
  input  logic [IDW-1:0]       hid_wdata,
  input  logic [NT-1:0]        bsm_we,
  input  logic [12:0]          bsm_waddr,
  input  logic [MAX_BSM_W-1:0] bsm_wdata,
  // results, in order of acceptance
  output logic                 out_valid,
  output logic [NH_W-1:0]      out_nh,
  output logic [TAG_W-1:0]     out_tag,
  output src_e                 out_src,
  output logic                 out_bsm
);

  typedef struct packed {
    logic [TAG_W-1:0]               tag;
    logic [2:0][MAX_VER_W-1:0]      ver;
    logic [2:0]                     agg;
    logic [2:0][BI-1:0]             bank;
    logic [NH_W-1:0]                short_nh;
    logic [NH_W-1:0]                long_nh;
  } ctx_t;

  logic in_fire, s1_valid, go;
  logic [TAG_W-1:0] s1_tag;

  assign in_fire   = in_valid && in_ready;
  assign go        = s1_valid && sched_gnt;
  assign in_ready  = !s1_valid || sched_gnt;
  assign sched_req = s1_valid;
  assign oc_req    = in_fire;
  assign oc_key    = in_key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       s1_valid <= 1'b0;
    else if (in_fire) s1_valid <= 1'b1;
    else if (go)      s1_valid <= 1'b0;
  end

  always_ff @(posedge clk)
    if (in_fire) s1_tag <= in_tag;

  // ---------------- S0/S1: HashTune per table ----------------
  logic [MAX_VER_W-1:0] s1_ver [3];
  logic [2:0]           s1_agg;

  // ---------------- delay line covering the DRAM read ----------------
  ctx_t ctx_in;
  logic [DRAM_LAT-1:0] d_valid;
  ctx_t                d_ctx [DRAM_LAT];
  ctx_t                ctx_l;
  logic                valid_l;

  always_comb begin
    ctx_in          = '0;
    ctx_in.tag      = s1_tag;
    ctx_in.short_nh = oc_short_nh;
    ctx_in.long_nh  = IS_V6 ? oc_long_nh : '0;
    for (int t = 0; t < NT; t++) begin
      ctx_in.ver[t]  = s1_ver[t];
      ctx_in.agg[t]  = s1_agg[t];
      ctx_in.bank[t] = sched_bank[t];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_valid <= '0;
    else        d_valid <= {d_valid[DRAM_LAT-2:0], go};
  end

  always_ff @(posedge clk) begin
    d_ctx[0] <= ctx_in;
    for (int i = 1; i < DRAM_LAT; i++) d_ctx[i] <= d_ctx[i-1];
  end

  assign ctx_l   = d_ctx[DRAM_LAT-1];
  assign valid_l = d_valid[DRAM_LAT-1];

  // ---------------- per table: HashTune, bin match, BSM ----------------
  logic [NT-1:0]   l_hit, l_ovf;
  logic [NH_W-1:0] l_nh [NT];
  logic [NT-1:0]   s2_hit, s2_ovf, b_hit;
  logic [NH_W-1:0] s2_nh [NT];
  logic [NH_W-1:0] b_nh [NT];

  for (genvar t = 0; t < NT; t++) begin : g_tbl
    localparam int TBL = TB + t;
    localparam int KW  = tbl_key_w(TBL);
    localparam int VW  = tbl_ver_w(TBL);
    localparam int IW  = tbl_idx_w(TBL);
    localparam int BW  = tbl_bin_w(TBL);
    localparam int PW  = $clog2(tbl_bsm_depth(TBL));
    localparam int RW  = BSM_SLOTS * tbl_ew(TBL);

    logic [VW-1:0] ver;
    logic          agg;
    logic [PW-1:0] ptr;
    logic [BW-1:0] bin;

    hashtune #(.TBL(TBL), .POOL(POOL)) u_ht (
      .clk       (clk),
      .key_en    (in_fire),
      .key       (in_key[KEY_W-1 -: KW]),
      .addr      (sched_rel_addr[t]),
      .ver       (ver),
      .agg_bit   (agg),
      .hid_we    (hid_we[t]),
      .hid_waddr (hid_waddr[IW-1:0]),
      .hid_wdata (hid_wdata)
    );

    assign s1_ver[t] = MAX_VER_W'(ver);
    assign s1_agg[t] = agg;

    assign bin = dram_rd_data[ctx_l.bank[t]][BW-1:0];

    bin_match #(.TBL(TBL)) u_match (
      .bin     (bin),
      .ver     (ctx_l.ver[t][VW-1:0]),
      .agg_bit (ctx_l.agg[t]),
      .hit     (l_hit[t]),
      .nh      (l_nh[t]),
      .ovf     (l_ovf[t]),
      .ptr     (ptr)
    );

    bsm #(.TBL(TBL)) u_bsm (
      .clk     (clk),
      .rd_en   (valid_l && l_ovf[t]),
      .rd_addr (ptr),
      .ver     (ctx_l.ver[t][VW-1:0]),
      .agg_bit (ctx_l.agg[t]),
      .hit     (b_hit[t]),
      .nh      (b_nh[t]),
      .wr_en   (bsm_we[t]),
      .wr_addr (bsm_waddr[PW-1:0]),
      .wr_data (bsm_wdata[RW-1:0])
    );
  end

  for (genvar t = NT; t < 3; t++) begin : g_unused
    assign s1_ver[t] = '0;
    assign s1_agg[t] = 1'b0;
  end

  // ---------------- S2: priority select ----------------
  logic             s2_valid;
  logic [TAG_W-1:0] s2_tag;
  logic [NH_W-1:0]  s2_short, s2_long;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= valid_l;
  end

  always_ff @(posedge clk) begin
    s2_tag   <= ctx_l.tag;
    s2_short <= ctx_l.short_nh;
    s2_long  <= ctx_l.long_nh;
    s2_hit   <= l_hit;
    s2_ovf   <= l_ovf;
    for (int t = 0; t < NT; t++) s2_nh[t] <= l_nh[t];
  end

  logic [NH_W-1:0] sel_nh;
  src_e            sel_src;
  logic            sel_bsm;

  always_comb begin
    sel_nh  = '0;
    sel_src = SRC_NONE;
    sel_bsm = 1'b0;
    if (s2_short != '0) begin
      sel_nh  = s2_short;
      sel_src = SRC_SHORT;
    end
    for (int t = 0; t < NT; t++) begin
      if (s2_hit[t]) begin
        sel_nh  = s2_nh[t];
        sel_src = src_e'(int'(SRC_TBL0) + t);
        sel_bsm = 1'b0;
      end else if (s2_ovf[t] && b_hit[t]) begin
        sel_nh  = b_nh[t];
        sel_src = src_e'(int'(SRC_TBL0) + t);
        sel_bsm = 1'b1;
      end
    end
    if (s2_long != '0) begin
      sel_nh  = s2_long;
      sel_src = SRC_LONG;
      sel_bsm = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
  end

  always_ff @(posedge clk) begin
    out_nh  <= sel_nh;
    out_tag <= s2_tag;
    out_src <= sel_src;
    out_bsm <= sel_bsm;
  end

endmodule
