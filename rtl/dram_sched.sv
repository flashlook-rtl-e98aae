// dram_sched: DRAM copy selection, bank access timing and bin writes.
//
// Every next hop table is copied into several DRAM banks (layout repeated
// every three chips): IPv4/24 in banks 0 and 2 of each chip, IPv4/32 in banks
// 1 and 3, IPv6/32, /40 and /48 in four banks of every three-chip group each.
// A bank may be accessed only once per TRC cycles (60 ns at the 4 ns lookup
// period). The scheduler keeps a busy timer per bank and, for each lookup,
// picks a free bank holding every table the lookup needs: IPv4 lookups
// (engine 0) need IPv4/24 and IPv4/32, IPv6 lookups (engine 1) need IPv6/32,
// /40 and /48. A lookup is granted only when all its tables find a free copy;
// otherwise it waits. When both engines ask, the one granted less recently is
// served first, and the other may still be granted in the same cycle on banks
// left over.
//
// Bin writes (route updates) use the bank time that lookups leave over: the
// IPv4 tables have 18 copies where one lookup per cycle needs 15, so about
// one bank access in six is spare. A write (table, bin address, data) is
// taken when wr_ready is high and held in a register; every cycle the writer
// takes one free bank holding a copy of that table that no lookup was given
// in that cycle, until every copy is written, and then raises wr_ready
// again. Lookups always go first, but among the free copies of a table they
// prefer one the write does not still need, so that the write is not starved
// when lookups keep cycling through the same banks. The write takes a bank
// only if, for every table stored there, the copies that are free or come
// free within the next k cycles still cover k lookups at line rate (one per
// cycle for IPv4, one per 1.5 cycles for IPv6), for every k below TRC. So
// writes never stall IPv4 lookups at one per cycle nor IPv6 lookups at their
// line rate; with 18 copies of an IPv4 table, 3 of every 18 accesses are
// left for writes. While a write is in progress some copies
// are new and some old; either is a consistent bin.
//
// Interface: req[e] with rel_addr[t] (bin address relative to the table's
// base) in a cycle; gnt[e] and bank_sel[t] answer combinationally in the same
// cycle, and the per-bank requests (valid, write enable, word address, burst
// length 8) leave in that cycle too. dram_wr_data is the bin being written:
// a 128-bit bin as {word a, word a+1}, a 64-bit bin in bits [63:0].
//
// From the document: the copies and their placement, 9 chips of 4 banks, the
// 60 ns bank restriction, the 4/8 burst lengths and the spare access time
// kept for updates. This design's own: the single clock domain (timing
// counted in lookup cycles), first-free copy choice, the engine priority
// rule, the write sequencing (one copy per cycle, a write holds its bank
// like a read) and the port shapes. Command and data bus timing inside a
// chip is left to the DRAM controller.
module dram_sched
  import flashlook_pkg::*;
#(
  parameter int NCHIP  = 9,
  parameter int TRC    = 15,
  localparam int NB    = NCHIP * BANKS_PER_CHIP,
  localparam int BI    = $clog2(NB),
  localparam int TW    = $clog2(TRC + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [1:0]         req,
  input  logic [BANK_AW-1:0] rel_addr [NTBL],
  output logic [1:0]         gnt,
  output logic [BI-1:0]      bank_sel [NTBL],
  // bin write (update)
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [2:0]         wr_tbl,
  input  logic [BANK_AW-1:0] wr_addr,
  input  logic [127:0]       wr_data,
  // DRAM banks
  output logic [NB-1:0]      dram_req_valid,
  output logic [NB-1:0]      dram_req_we,
  output logic [BANK_AW-1:0] dram_req_addr [NB],
  output logic [NB-1:0]      dram_req_bl8,
  output logic [127:0]       dram_wr_data
);

  logic [TW-1:0] timer [NB];
  logic          prio6;           // 1: IPv6 engine picks first
  logic [BI-1:0] pick [NTBL];

  // pending bin write
  logic               wr_busy;
  logic [2:0]         wr_t;
  logic [BANK_AW-1:0] wr_a;
  logic [127:0]       wr_d;
  logic [NB-1:0]      wr_left;      // copies still to write
  logic [NB-1:0]      wr_copies;    // copies of the table offered on wr_tbl
  logic               w_go;         // a copy is written this cycle
  logic [BI-1:0]      w_bank;
  logic [BI:0]        nfree;        // copies of a table free within k cycles
  logic [NTBL-1:0]    t_ok;         // a copy of table t may be written now
  logic [NB-1:0]      w_ok;         // bank may take the write this cycle

  // Lookups of table t due within k cycles at line rate: one per cycle for
  // IPv4, one per 1.5 cycles for IPv6 (10 per 15 cycles), rounded up.
  function automatic int need(int t, int k);
    return (t < 2) ? k : (2 * k + 2) / 3;
  endfunction

  always_comb begin
    automatic logic [NB-1:0] avail = '0;
    automatic logic [NB-1:0] trial = '0;
    automatic logic          ok    = 1'b0;
    automatic logic          found = 1'b0;
    automatic int            e = 0, t0 = 0, t1 = 0;
    for (int b = 0; b < NB; b++) avail[b] = (timer[b] == '0);
    gnt = '0;
    for (int t = 0; t < NTBL; t++) pick[t] = '0;
    for (int p = 0; p < 2; p++) begin
      e  = (p == 0) ? int'(prio6) : int'(!prio6);
      t0 = (e == 0) ? 0 : 2;
      t1 = (e == 0) ? 1 : 4;
      ok = req[e];
      trial = avail;
      for (int t = 0; t < NTBL; t++) begin
        if (t >= t0 && t <= t1) begin
          // prefer a copy the pending write does not still need
          found = 1'b0;
          for (int b = 0; b < NB; b++) begin
            if (!found && trial[b] && bank_has(b, t) && !(wr_busy && wr_left[b])) begin
              found   = 1'b1;
              pick[t] = BI'(b);
            end
          end
          for (int b = 0; b < NB; b++) begin
            if (!found && trial[b] && bank_has(b, t)) begin
              found   = 1'b1;
              pick[t] = BI'(b);
            end
          end
          if (found) trial[pick[t]] = 1'b0;
          ok = ok && found;
        end
      end
      if (ok) begin
        gnt[e] = 1'b1;
        avail  = trial;
      end
    end
    bank_sel = pick;

    dram_req_valid = '0;
    dram_req_bl8   = '0;
    for (int b = 0; b < NB; b++) dram_req_addr[b] = '0;
    for (int t = 0; t < NTBL; t++) begin
      if (gnt[(t < 2) ? 0 : 1]) begin
        dram_req_valid[pick[t]] = 1'b1;
        dram_req_bl8[pick[t]]   = (tbl_bl8(t) != 0);
        dram_req_addr[pick[t]]  = bank_base(t) + rel_addr[t];
      end
    end

    // The pending write takes a free bank that no lookup was given, and only
    // if the lookups of the next TRC-1 cycles still find copies: for every
    // table stored in that bank and every k, the copies free by cycle k
    // (free now and not taken, or with timer <= k), less the one written,
    // must cover the lookups due by then, need(t, k).
    for (int t = 0; t < NTBL; t++) begin
      t_ok[t] = 1'b1;
      for (int k = 1; k < TRC; k++) begin
        nfree = '0;
        for (int b = 0; b < NB; b++)
          if (bank_has(b, t) && (avail[b] || (timer[b] != '0 && int'(timer[b]) <= k)))
            nfree = nfree + 1'b1;
        if (int'(nfree) < need(t, k) + 1) t_ok[t] = 1'b0;
      end
    end
    for (int b = 0; b < NB; b++) begin
      w_ok[b] = 1'b1;
      for (int t = 0; t < NTBL; t++)
        if (bank_has(b, t) && !t_ok[t]) w_ok[b] = 1'b0;
    end
    dram_req_we = '0;
    w_go   = 1'b0;
    w_bank = '0;
    for (int b = 0; b < NB; b++) begin
      if (!w_go && wr_busy && wr_left[b] && avail[b] && w_ok[b]) begin
        w_go   = 1'b1;
        w_bank = BI'(b);
      end
    end
    if (w_go) begin
      dram_req_valid[w_bank] = 1'b1;
      dram_req_we[w_bank]    = 1'b1;
      dram_req_bl8[w_bank]   = (tbl_bl8(int'(wr_t)) != 0);
      dram_req_addr[w_bank]  = bank_base(int'(wr_t)) + wr_a;
    end
    for (int b = 0; b < NB; b++) wr_copies[b] = bank_has(b, int'(wr_tbl));
  end

  assign wr_ready     = !wr_busy;
  assign dram_wr_data = wr_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) timer[b] <= '0;
      prio6 <= 1'b0;
      wr_busy <= 1'b0;
      wr_left <= '0;
      wr_t    <= '0;
      wr_a    <= '0;
      wr_d    <= '0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        if (dram_req_valid[b])   timer[b] <= TW'(TRC - 1);
        else if (timer[b] != '0) timer[b] <= timer[b] - 1'b1;
      end
      if (gnt[0] && !gnt[1])      prio6 <= 1'b1;
      else if (gnt[1] && !gnt[0]) prio6 <= 1'b0;
      if (!wr_busy) begin
        if (wr_valid) begin
          wr_busy <= 1'b1;
          wr_t    <= wr_tbl;
          wr_a    <= wr_addr;
          wr_d    <= wr_data;
          wr_left <= wr_copies;
        end
      end else if (w_go) begin
        wr_left[w_bank] <= 1'b0;
        if (wr_left == (NB'(1) << w_bank)) wr_busy <= 1'b0;
      end
    end
  end

  // A bank is never accessed again before its TRC cycles are over.
  for (genvar b = 0; b < NB; b++) begin : g_chk
    a_trc: assert property (@(posedge clk) disable iff (!rst_n)
      dram_req_valid[b] |-> timer[b] == '0);
  end

endmodule
