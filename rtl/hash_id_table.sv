// hash_id_table: on-chip RAM holding, for every bin group of one hash table,
// the ID of the hash function HashTune assigned to that group.
//
// One synchronous read port (data one cycle after rd_en, held while rd_en is
// low) and one write port used by route updates and rehashing. The document
// names the Hash ID table and its total size; the port set and the read
// timing are this design's choice. The contents are not reset: the update
// logic writes every group it uses.
module hash_id_table #(
  parameter int GROUPS = 262144,
  parameter int IDW    = 4,
  localparam int AW    = $clog2(GROUPS)
) (
  input  logic           clk,
  input  logic           rd_en,
  input  logic [AW-1:0]  rd_addr,
  output logic [IDW-1:0] rd_id,
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  logic [IDW-1:0] wr_id
);

  logic [IDW-1:0] mem [GROUPS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_id;
    if (rd_en) rd_id <= mem[rd_addr];
  end

endmodule
