// hash_pool: the HashTune pool of universal hash functions.
//
// POOL hash functions of the H3 class are held as constant tables. Function
// `id` maps the verify bits `x` of a key to a HASH_W-bit value by XORing the
// rows of the function's table selected by the set bits of `x`; the value is
// then scaled to a bin number within the group, bin = (h * BPG) >> HASH_W,
// so a group may have any number of bins (six for IPv4/24, for instance).
// Purely combinational.
//
// The document asks for a pool of universal hash functions, one chosen per bin
// group, with 2 to 64 functions evaluated and 8 or 16 recommended; the H3
// class, the row constants and the multiply-shift range reduction are this
// design's choices.
module hash_pool
  import flashlook_pkg::*;
#(
  parameter int POOL = 16,
  parameter int VW   = 5,
  parameter int BPG  = 6,
  localparam int IDW = $clog2(POOL),
  localparam int BW  = (BPG > 1) ? $clog2(BPG) : 1
) (
  input  logic [IDW-1:0] id,
  input  logic [VW-1:0]  x,
  output logic [BW-1:0]  bin
);

  logic [HASH_W-1:0] rows [POOL][VW];

  for (genvar f = 0; f < POOL; f++) begin : g_f
    for (genvar i = 0; i < VW; i++) begin : g_i
      assign rows[f][i] = h3_row(f, i);
    end
  end

  logic [HASH_W-1:0] h;

  always_comb begin
    h = '0;
    for (int i = 0; i < VW; i++)
      if (x[i]) h = h ^ rows[id][i];
    bin = BW'(((HASH_W+BW)'(h) * (HASH_W+BW)'(BPG)) >> HASH_W);
  end

endmodule
