// bsm: RAM-based black sheep memory of one hash table.
//
// When a bin overflows, the bin in DRAM keeps c-1 elements plus a pointer,
// and the pointed-to BSM row holds the remaining (up to v+1 = 8) elements of
// that bin. All eight elements of a row are compared with the key at once, so
// the BSM needs a plain RAM instead of a CAM.
//
// Row layout: element 0 in the most significant bits; elements use the bin
// element format ({verify, NH0, NH1} or {verify, NH}); an all-zero element
// is empty. Interface: rd_en with rd_addr, ver and agg_bit in cycle n; hit and
// nh valid in cycle n+1 and held until the next rd_en. One write port for
// route updates. The row contents are not reset.
//
// The pointer scheme and the 8 elements per row follow the document; the
// depths and the timing are this design's choices. Rows are fixed at eight
// element slots, one row per overflowed bin, so a table needs as many rows as
// it has overflowed bins: 8192 rows for IPv4/24 cover the roughly 6000
// overflows expected for a 2M-prefix table with 16 hash functions, at 1.4
// Mbit; the other tables get 1024, 512, 512 and 256 rows.
module bsm
  import flashlook_pkg::*;
#(
  parameter int TBL    = 0,
  parameter int DEPTH  = tbl_bsm_depth(TBL),
  localparam int VW    = tbl_ver_w(TBL),
  localparam int EW    = tbl_ew(TBL),
  localparam int AG    = tbl_agg(TBL),
  localparam int RW    = BSM_SLOTS * EW,
  localparam int PW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rd_en,
  input  logic [PW-1:0]   rd_addr,
  input  logic [VW-1:0]   ver,
  input  logic            agg_bit,
  output logic            hit,
  output logic [NH_W-1:0] nh,
  input  logic            wr_en,
  input  logic [PW-1:0]   wr_addr,
  input  logic [RW-1:0]   wr_data
);

  logic [RW-1:0] mem [DEPTH];
  logic [RW-1:0] row;
  logic [VW-1:0] ver_q;
  logic          agg_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) begin
      row   <= mem[rd_addr];
      ver_q <= ver;
      agg_q <= agg_bit;
    end
  end

  logic [EW-1:0]   elem;
  logic [NH_W-1:0] cand;

  always_comb begin
    hit = 1'b0;
    nh  = '0;
    for (int k = 0; k < BSM_SLOTS; k++) begin
      elem = row[RW-1-k*EW -: EW];
      if (AG != 0)
        cand = agg_q ? elem[0 +: NH_W] : elem[NH_W +: NH_W];
      else
        cand = elem[0 +: NH_W];
      if (elem[EW-1 -: VW] == ver_q && cand != '0 && !hit) begin
        hit = 1'b1;
        nh  = cand;
      end
    end
  end

endmodule
