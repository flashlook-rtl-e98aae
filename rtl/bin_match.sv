// bin_match: decodes one FlashLook hash bin read from DRAM and matches a key.
//
// Bin layout (most significant bit first): element 0, element 1, ...,
// element c-1, unused bits, overflow flag in bit 0. An element is
//   {verify bits, NH0, NH1}  for tables with verify bit aggregation, or
//   {verify bits, NH}        for IPv6/40, which does not aggregate.
// With aggregation one element covers two sibling prefixes: NH0 belongs to the
// child whose last key bit is 0, NH1 to the child whose last bit is 1. An
// all-zero element is empty, since next hop ID 0 means "no route".
// If the overflow flag is set only elements 0..c-2 hold prefixes and the low
// bits of element c-1 hold the pointer to the bin's row in the BSM.
//
// Outputs: hit/nh when a stored element's verify bits equal the key's and the
// selected next hop is non-zero; ovf/ptr to fetch the remaining elements from
// the BSM. Purely combinational.
//
// The two bin organisations, c, the aggregated element (Fig. 3 style) and the
// field widths follow the document; the field order, the flag position and
// "next hop 0 = empty" are this design's choices.
module bin_match
  import flashlook_pkg::*;
#(
  parameter int TBL   = 0,
  localparam int VW   = tbl_ver_w(TBL),
  localparam int EW   = tbl_ew(TBL),
  localparam int AG   = tbl_agg(TBL),
  localparam int C    = tbl_slots(TBL),
  localparam int BINW = tbl_bin_w(TBL),
  localparam int PW   = $clog2(tbl_bsm_depth(TBL))
) (
  input  logic [BINW-1:0] bin,
  input  logic [VW-1:0]   ver,
  input  logic            agg_bit,
  output logic            hit,
  output logic [NH_W-1:0] nh,
  output logic            ovf,
  output logic [PW-1:0]   ptr
);

  logic [EW-1:0]   elem [C];
  logic [NH_W-1:0] cand;

  always_comb begin
    ovf = bin[0];
    hit = 1'b0;
    nh  = '0;
    for (int k = 0; k < C; k++) begin
      elem[k] = bin[BINW-1-k*EW -: EW];
      if (AG != 0)
        cand = agg_bit ? elem[k][0 +: NH_W] : elem[k][NH_W +: NH_W];
      else
        cand = elem[k][0 +: NH_W];
      if (!(ovf && k == C-1) && elem[k][EW-1 -: VW] == ver && cand != '0 && !hit) begin
        hit = 1'b1;
        nh  = cand;
      end
    end
    ptr = elem[C-1][PW-1:0];
  end

endmodule
