// hashtune: HashTune bin addressing for one DRAM hash table.
//
// A key (the table's prefix length of leading address bits, most significant
// bit first) is split into [implicit | verify | index | aggregation] bits.
// The index bits address the hash ID table; one cycle later the selected
// function of the hash pool maps the verify bits to a bin within the group,
// and the bin's DRAM address relative to the table's base is
//   addr = (group * BPG + bin) * words-per-bin.
// The verify bits and the aggregation bit come out with the address so the
// bin can be checked when it returns from DRAM.
//
// Interface: key_en/key in cycle n, addr/ver/agg_bit valid in cycle n+1 and
// held until the next key_en. A write port updates the hash ID table.
// The key split and bin groups follow the document; the latency is this
// design's choice.
module hashtune
  import flashlook_pkg::*;
#(
  parameter int TBL  = 0,
  parameter int POOL = 16,
  localparam int KW  = tbl_key_w(TBL),
  localparam int VW  = tbl_ver_w(TBL),
  localparam int IW  = tbl_idx_w(TBL),
  localparam int AG  = tbl_agg(TBL),
  localparam int BPG = tbl_bpg(TBL),
  localparam int IDW = $clog2(POOL),
  localparam int BW  = (BPG > 1) ? $clog2(BPG) : 1
) (
  input  logic               clk,
  input  logic               key_en,
  input  logic [KW-1:0]      key,
  output logic [BANK_AW-1:0] addr,
  output logic [VW-1:0]      ver,
  output logic               agg_bit,
  input  logic               hid_we,
  input  logic [IW-1:0]      hid_waddr,
  input  logic [IDW-1:0]     hid_wdata
);

  logic [IW-1:0]  idx_q;
  logic [IDW-1:0] hid;
  logic [BW-1:0]  bin;

  hash_id_table #(.GROUPS(1 << IW), .IDW(IDW)) u_hid (
    .clk     (clk),
    .rd_en   (key_en),
    .rd_addr (key[AG +: IW]),
    .rd_id   (hid),
    .wr_en   (hid_we),
    .wr_addr (hid_waddr),
    .wr_id   (hid_wdata)
  );

  always_ff @(posedge clk) begin
    if (key_en) begin
      idx_q   <= key[AG +: IW];
      ver     <= key[AG + IW +: VW];
      agg_bit <= (AG != 0) ? key[0] : 1'b0;
    end
  end

  hash_pool #(.POOL(POOL), .VW(VW), .BPG(BPG)) u_pool (
    .id  (hid),
    .x   (ver),
    .bin (bin)
  );

  logic [BANK_AW-1:0] bin_num;
  always_comb begin
    bin_num = BANK_AW'(idx_q) * BANK_AW'(BPG) + BANK_AW'(bin);
    addr    = bin_num << tbl_bl8(TBL);
  end

endmodule
