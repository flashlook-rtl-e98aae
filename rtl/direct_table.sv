// direct_table: on-chip IPv4/18 direct index table.
//
// Every IPv4 prefix of 18 bits or less is expanded to 18 bits and its next
// hop ID stored at the entry addressed by the first 18 address bits; ID 0
// means "no route". The 2^18 entries are spread over BLOCKS RAM blocks by
// the low address bits, so one update can write up to BLOCKS consecutive
// entries of an expanded prefix in a single cycle (wr_mask selects the
// blocks, wr_addr the row).
//
// Interface: rd_en/ip in cycle n, nh in cycle n+1, held while rd_en is low.
// The table, its size and the split into parallel blocks for fast updates
// follow the document; BLOCKS = 8 and the write port are this design's
// choices. The contents are not reset.
module direct_table
  import flashlook_pkg::*;
#(
  parameter int AW     = 18,
  parameter int BLOCKS = 8,
  localparam int BB    = $clog2(BLOCKS),
  localparam int RWID  = AW - BB
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [NH_W-1:0]   nh,
  input  logic [BLOCKS-1:0] wr_mask,
  input  logic [RWID-1:0]   wr_row,
  input  logic [NH_W-1:0]   wr_nh
);

  logic [NH_W-1:0] rd_data [BLOCKS];
  logic [BB-1:0]   sel_q;

  for (genvar b = 0; b < BLOCKS; b++) begin : g_blk
    logic [NH_W-1:0] mem [1 << RWID];
    always_ff @(posedge clk) begin
      if (wr_mask[b]) mem[wr_row] <= wr_nh;
      if (rd_en) rd_data[b] <= mem[rd_addr[AW-1:BB]];
    end
  end

  always_ff @(posedge clk)
    if (rd_en) sel_q <= rd_addr[BB-1:0];

  assign nh = rd_data[sel_q];

endmodule
