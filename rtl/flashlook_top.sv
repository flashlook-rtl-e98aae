// flashlook_top: FlashLook route lookup, FPGA side.
//
// Two lookup engines share the DRAM: an IPv4 engine (IPv4/18 on-chip direct
// table, IPv4/24 and IPv4/32 hash tables in DRAM) and an IPv6 engine
// (IPv6/32, /40 and /48 hash tables in DRAM, on-chip tables for short and
// long prefixes reached through the v6_oc_* ports). Each engine takes one
// lookup per cycle; at the 250 MHz design clock that is 250 M IPv4 lookups
// per second, the worst case of a 100-Gbps link with 40-byte packets. Every
// DRAM table is replicated over the banks of NCHIP chips; dram_sched sends
// each lookup to free copies so that no bank is read more often than once
// per TRC cycles (60 ns).
//
// DRAM side: one request port per bank (valid, write enable, 64-bit word
// address, 8-burst flag). Read data returns on dram_rd_data exactly DRAM_LAT
// cycles after a read, a 64-bit bin in bits [63:0]; write data is
// dram_wr_data in the cycle of the write.
//
// Update port (upd_valid/upd_ready handshake, one update per cycle while
// upd_ready is high):
//   UPD_DIRECT  IPv4/18 table: upd_addr[14:0] = row, upd_mask = blocks,
//               upd_data[7:0] = next hop ID
//   UPD_HID     hash ID of bin group upd_addr of table upd_tbl
//   UPD_BSM     BSM row upd_addr of table upd_tbl, upd_data = 8 elements
//   UPD_BIN     DRAM bin at word upd_addr of table upd_tbl, upd_data[127:0];
//               written to every copy in bank time the lookups leave over,
//               upd_ready is low until the last copy is written
// Which entries change, and in what order, is decided by the control plane
// that drives this port.
//
// The engines, tables, copy counts, bank layout and bank timing follow the
// document; the port shapes, the update encoding and the fixed DRAM latency
// are this design's choices.
module flashlook_top
  import flashlook_pkg::*;
#(
  parameter int NCHIP    = 9,
  parameter int TRC      = 15,
  parameter int POOL     = 16,
  parameter int DRAM_LAT = 16,
  parameter int TAG_W    = 8,
  localparam int NB      = NCHIP * BANKS_PER_CHIP,
  localparam int BI      = $clog2(NB),
  localparam int IDW     = $clog2(POOL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // IPv4 lookups
  input  logic                 v4_in_valid,
  output logic                 v4_in_ready,
  input  logic [31:0]          v4_in_addr,
  input  logic [TAG_W-1:0]     v4_in_tag,
  output logic                 v4_out_valid,
  output logic [NH_W-1:0]      v4_out_nh,
  output logic [TAG_W-1:0]     v4_out_tag,
  output src_e                 v4_out_src,
  output logic                 v4_out_bsm,
  // IPv6 lookups (the 64-bit network part of the address)
  input  logic                 v6_in_valid,
  output logic                 v6_in_ready,
  input  logic [63:0]          v6_in_addr,
  input  logic [TAG_W-1:0]     v6_in_tag,
  output logic                 v6_out_valid,
  output logic [NH_W-1:0]      v6_out_nh,
  output logic [TAG_W-1:0]     v6_out_tag,
  output src_e                 v6_out_src,
  output logic                 v6_out_bsm,
  // IPv6 on-chip tables for /4-/24 and /49-/64 (answer one cycle after req)
  output logic                 v6_oc_req,
  output logic [63:0]          v6_oc_addr,
  input  logic [NH_W-1:0]      v6_oc_short_nh,
  input  logic [NH_W-1:0]      v6_oc_long_nh,
  // DRAM banks
  output logic [NB-1:0]        dram_req_valid,
  output logic [NB-1:0]        dram_req_we,
  output logic [BANK_AW-1:0]   dram_req_addr [NB],
  output logic [NB-1:0]        dram_req_bl8,
  output logic [127:0]         dram_wr_data,
  input  logic [127:0]         dram_rd_data [NB],
  // table updates
  input  logic                 upd_valid,
  output logic                 upd_ready,
  input  upd_e                 upd_kind,
  input  tbl_e                 upd_tbl,
  input  logic [BANK_AW-1:0]   upd_addr,
  input  logic [7:0]           upd_mask,
  input  logic [MAX_BSM_W-1:0] upd_data
);

  // ---------------- update decode ----------------
  logic [1:0] hid_we4, bsm_we4;
  logic [2:0] hid_we6, bsm_we6;
  logic [7:0] dt_mask;

  logic       bin_we;

  always_comb begin
    hid_we4 = '0; bsm_we4 = '0; hid_we6 = '0; bsm_we6 = '0; dt_mask = '0;
    bin_we = 1'b0;
    if (upd_valid && upd_ready) begin
      case (upd_kind)
        UPD_DIRECT: dt_mask = upd_mask;
        UPD_HID: begin
          if (upd_tbl <= T4_32) hid_we4[upd_tbl[0]] = 1'b1;
          else                  hid_we6[2'(upd_tbl - T6_32)] = 1'b1;
        end
        UPD_BIN: bin_we = 1'b1;
        default: begin
          if (upd_tbl <= T4_32) bsm_we4[upd_tbl[0]] = 1'b1;
          else                  bsm_we6[2'(upd_tbl - T6_32)] = 1'b1;
        end
      endcase
    end
  end

  // ---------------- IPv4/18 direct table ----------------
  logic            v4_oc_req;
  logic [31:0]     v4_oc_addr;
  logic [NH_W-1:0] v4_short_nh;

  direct_table u_direct (
    .clk     (clk),
    .rd_en   (v4_oc_req),
    .rd_addr (v4_oc_addr[31:14]),
    .nh      (v4_short_nh),
    .wr_mask (dt_mask),
    .wr_row  (upd_addr[14:0]),
    .wr_nh   (upd_data[NH_W-1:0])
  );

  // ---------------- DRAM scheduler ----------------
  logic [1:0]         sreq, sgnt;
  logic [BANK_AW-1:0] rel_addr [NTBL];
  logic [BI-1:0]      bank_sel [NTBL];
  logic [BANK_AW-1:0] rel4 [2];
  logic [BANK_AW-1:0] rel6 [3];
  logic [BI-1:0]      bank4 [2];
  logic [BI-1:0]      bank6 [3];

  assign rel_addr[0] = rel4[0];
  assign rel_addr[1] = rel4[1];
  assign rel_addr[2] = rel6[0];
  assign rel_addr[3] = rel6[1];
  assign rel_addr[4] = rel6[2];
  assign bank4[0] = bank_sel[0];
  assign bank4[1] = bank_sel[1];
  assign bank6[0] = bank_sel[2];
  assign bank6[1] = bank_sel[3];
  assign bank6[2] = bank_sel[4];

  dram_sched #(.NCHIP(NCHIP), .TRC(TRC)) u_sched (
    .clk            (clk),
    .rst_n          (rst_n),
    .req            (sreq),
    .rel_addr       (rel_addr),
    .gnt            (sgnt),
    .bank_sel       (bank_sel),
    .wr_valid       (bin_we),
    .wr_ready       (upd_ready),
    .wr_tbl         (upd_tbl),
    .wr_addr        (upd_addr),
    .wr_data        (upd_data[127:0]),
    .dram_req_valid (dram_req_valid),
    .dram_req_we    (dram_req_we),
    .dram_req_addr  (dram_req_addr),
    .dram_req_bl8   (dram_req_bl8),
    .dram_wr_data   (dram_wr_data)
  );

  // ---------------- engines ----------------
  lookup_engine #(.IS_V6(1'b0), .POOL(POOL), .NCHIP(NCHIP), .DRAM_LAT(DRAM_LAT),
                  .TAG_W(TAG_W)) u_v4 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (v4_in_valid),
    .in_ready       (v4_in_ready),
    .in_key         (v4_in_addr),
    .in_tag         (v4_in_tag),
    .oc_req         (v4_oc_req),
    .oc_key         (v4_oc_addr),
    .oc_short_nh    (v4_short_nh),
    .oc_long_nh     ('0),
    .sched_req      (sreq[0]),
    .sched_rel_addr (rel4),
    .sched_gnt      (sgnt[0]),
    .sched_bank     (bank4),
    .dram_rd_data   (dram_rd_data),
    .hid_we         (hid_we4),
    .hid_waddr      (upd_addr[17:0]),
    .hid_wdata      (upd_data[IDW-1:0]),
    .bsm_we         (bsm_we4),
    .bsm_waddr      (upd_addr[12:0]),
    .bsm_wdata      (upd_data),
    .out_valid      (v4_out_valid),
    .out_nh         (v4_out_nh),
    .out_tag        (v4_out_tag),
    .out_src        (v4_out_src),
    .out_bsm        (v4_out_bsm)
  );

  lookup_engine #(.IS_V6(1'b1), .POOL(POOL), .NCHIP(NCHIP), .DRAM_LAT(DRAM_LAT),
                  .TAG_W(TAG_W)) u_v6 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (v6_in_valid),
    .in_ready       (v6_in_ready),
    .in_key         (v6_in_addr),
    .in_tag         (v6_in_tag),
    .oc_req         (v6_oc_req),
    .oc_key         (v6_oc_addr),
    .oc_short_nh    (v6_oc_short_nh),
    .oc_long_nh     (v6_oc_long_nh),
    .sched_req      (sreq[1]),
    .sched_rel_addr (rel6),
    .sched_gnt      (sgnt[1]),
    .sched_bank     (bank6),
    .dram_rd_data   (dram_rd_data),
    .hid_we         (hid_we6),
    .hid_waddr      (upd_addr[17:0]),
    .hid_wdata      (upd_data[IDW-1:0]),
    .bsm_we         (bsm_we6),
    .bsm_waddr      (upd_addr[12:0]),
    .bsm_wdata      (upd_data),
    .out_valid      (v6_out_valid),
    .out_nh         (v6_out_nh),
    .out_tag        (v6_out_tag),
    .out_src        (v6_out_src),
    .out_bsm        (v6_out_bsm)
  );

endmodule
