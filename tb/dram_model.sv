// dram_model: behavioural model of the DRAM banks behind FlashLook (not
// synthesizable). Every bank answers a read request with the bin at the
// requested word address exactly LAT cycles later: a 64-bit bin in bits
// [63:0], a 128-bit bin (8-burst) as {word a, word a+1}. A write request
// stores wr_data the same way into that bank only. Contents loaded with put()
// are shared by all copies of a table (stored once); words written through
// the port are kept per bank and take precedence, so copies may differ while
// an update is in progress. Unwritten words read as zero. The model counts
// any bank accessed again within TRC cycles as a violation.
module dram_model
  import flashlook_pkg::*;
#(
  parameter int NCHIP = 9,
  parameter int LAT   = 16,
  parameter int TRC   = 15,
  localparam int NB   = NCHIP * BANKS_PER_CHIP
) (
  input  logic               clk,
  input  logic [NB-1:0]      req_valid,
  input  logic [BANK_AW-1:0] req_addr [NB],
  input  logic [NB-1:0]      req_bl8,
  input  logic [NB-1:0]      req_we,
  input  logic [127:0]       wr_data,
  output logic [127:0]       rd_data [NB]
);

  bit [63:0]  img [longint];
  logic [127:0] pipe [NB][LAT];
  int last_rd [NB];
  int cyc = 0;
  int violations = 0;
  int reads = 0;
  int writes = 0;
  bit [63:0]  wimg [longint];     // words written through the port, per bank

  function automatic longint tbl_words(int t);
    return (t == 0 || t == 4) ? 64'd1572864 : 64'd524288;
  endfunction

  task automatic put(int t, longint addr, bit [63:0] d);
    img[(longint'(t) <<< 32) | addr] = d;
  endtask

  function automatic bit [63:0] get(int b, longint a);
    for (int t = 0; t < NTBL; t++) begin
      if (bank_has(b, t) && a >= longint'(bank_base(t)) &&
          a < longint'(bank_base(t)) + tbl_words(t)) begin
        longint k = (longint'(t) <<< 32) | (a - longint'(bank_base(t)));
        longint kw = (longint'(b) <<< 32) | a;
        if (wimg.exists(kw)) return wimg[kw];
        return img.exists(k) ? img[k] : 64'd0;
      end
    end
    return 64'd0;
  endfunction

  initial for (int b = 0; b < NB; b++) last_rd[b] = -1000;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = LAT-1; i > 0; i--) pipe[b][i] <= pipe[b][i-1];
      if (req_valid[b] && req_we[b]) begin
        writes++;
        if (cyc - last_rd[b] < TRC) violations++;
        last_rd[b] = cyc;
        if (req_bl8[b]) begin
          wimg[(longint'(b) <<< 32) | longint'(req_addr[b])]       = wr_data[127:64];
          wimg[(longint'(b) <<< 32) | (longint'(req_addr[b]) + 1)] = wr_data[63:0];
        end else begin
          wimg[(longint'(b) <<< 32) | longint'(req_addr[b])]       = wr_data[63:0];
        end
        pipe[b][0] <= '0;
      end else if (req_valid[b]) begin
        reads++;
        if (cyc - last_rd[b] < TRC) violations++;
        last_rd[b] = cyc;
        if (req_bl8[b]) pipe[b][0] <= {get(b, longint'(req_addr[b])), get(b, longint'(req_addr[b]) + 1)};
        else            pipe[b][0] <= {64'd0, get(b, longint'(req_addr[b]))};
      end else begin
        pipe[b][0] <= '0;
      end
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_out
    assign rd_data[b] = pipe[b][LAT-1];
  end

endmodule
