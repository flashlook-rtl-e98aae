// tb_dram_sched: drives the DRAM scheduler of 9 chips with IPv4 and IPv6
// lookup requests and checks every grant against its own bank timers: the
// banks chosen hold the tables asked for, are free (not read in the last 15
// cycles), differ from each other, and receive exactly one read with the
// table's base plus the relative address and the right burst length.
// IPv4 alone must be granted every cycle (18 copies, 15-cycle bank cycle);
// IPv6 alone at least 12 times in 15 cycles; both together must stall.
// Bin writes of random tables, addresses and data are offered as well: each
// must reach every copy of its table exactly once, only on free banks that
// no lookup got, with the right address, burst length and data. With no
// lookups a write takes one cycle per copy; alongside IPv4 lookups at full
// rate, or IPv6 lookups at their line rate (one per 1.5 cycles), writes must
// keep going (at least 5 in 1500 cycles) and the lookups must never stall.
module tb_dram_sched;
  import flashlook_pkg::*;

  localparam int NB = 36;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic [1:0] req = 0, gnt;
  logic [BANK_AW-1:0] rel_addr [NTBL];
  logic [5:0] bank_sel [NTBL];
  logic [NB-1:0] dram_req_valid, dram_req_bl8, dram_req_we;
  logic wr_valid = 0, wr_ready;
  logic [2:0] wr_tbl = 0;
  logic [BANK_AW-1:0] wr_addr = 0;
  logic [127:0] wr_data = 0, dram_wr_data;
  bit wr_on = 0;
  bit [NB-1:0] exp_left = '0;
  int exp_t, exp_nc = 0;
  logic [BANK_AW-1:0] exp_a;
  logic [127:0] exp_d;
  int wr_acc = 0, wr_done = 0, wr_copies = 0, wr_start = 0, wr_cycles = 0, cyc = 0;
  logic [BANK_AW-1:0] dram_req_addr [NB];
  int busy [NB];
  int checks = 0, failures = 0, g4 = 0, g6 = 0, stalls = 0;

  dram_sched dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check on the falling edge, when the combinational answer has settled
  always @(negedge clk) if (rst_n) begin
    automatic bit [NB-1:0] used = '0;
    for (int e = 0; e < 2; e++) if (req[e] && !gnt[e]) stalls++;
    for (int t = 0; t < NTBL; t++) begin
      automatic int e = (t < 2) ? 0 : 1;
      if (gnt[e]) begin
        automatic int b = int'(bank_sel[t]);
        chk(bank_has(b, t), $sformatf("table %0d given bank %0d that has no copy", t, b));
        chk(busy[b] == 0, $sformatf("bank %0d granted while busy", b));
        chk(!used[b], "two tables on one bank");
        chk(dram_req_valid[b] && dram_req_addr[b] == bank_base(t) + rel_addr[t] &&
            dram_req_bl8[b] == (t == 1 || t == 4), "bank read request");
        used[b] = 1;
      end
    end
    chk(!gnt[0] || req[0], "grant without request");
    chk(!gnt[1] || req[1], "grant without request");
    for (int b = 0; b < NB; b++) if (dram_req_we[b]) begin
      chk(!used[b], $sformatf("bank %0d written while a lookup reads it", b));
      chk(busy[b] == 0, $sformatf("bank %0d written while busy", b));
      chk(exp_left[b], $sformatf("bank %0d written: no copy left to write there", b));
      chk(dram_req_addr[b] == bank_base(exp_t) + exp_a && dram_req_bl8[b] == (exp_t == 1 || exp_t == 4) &&
          dram_wr_data == exp_d, "bank write request");
      exp_left[b] = 0;
      wr_copies++;
      used[b] = 1;
    end
    chk($countones(dram_req_we) <= 1, "at most one copy written per cycle");
    chk(dram_req_valid == used, "requests only on granted banks and for the write");
    if (wr_ready && exp_nc > 0) begin
      chk(exp_left == 0, "write finished with copies left");
      wr_done++;
      wr_cycles += cyc - wr_start;
      exp_nc = 0;
    end
    if (wr_valid && wr_ready) begin
      exp_t = int'(wr_tbl); exp_a = wr_addr; exp_d = wr_data;
      for (int b = 0; b < NB; b++) exp_left[b] = bank_has(b, exp_t);
      exp_nc = $countones(exp_left);
      wr_start = cyc;
      wr_acc++;
    end
    cyc++;
    if (gnt[0]) g4++;
    if (gnt[1]) g6++;
    for (int b = 0; b < NB; b++) busy[b] = used[b] ? 14 : (busy[b] > 0 ? busy[b] - 1 : 0);
  end

  // write source: a new random bin write whenever the last one was taken
  always @(posedge clk) begin
    if (wr_valid && wr_ready) wr_valid <= 0;
    else if (wr_on && !wr_valid) begin
      wr_valid <= 1;
      wr_tbl   <= 3'($urandom_range(0, 4));
      wr_addr  <= BANK_AW'($urandom_range(0, 262143));
      wr_data  <= {$urandom, $urandom, $urandom, $urandom};
    end
  end

  task automatic phase(bit [1:0] r, int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      req = r & 2'($urandom_range(0, 3) | (r == 2'b11 ? 0 : 3));
      if (r != 2'b11) req = r;
      for (int t = 0; t < NTBL; t++) rel_addr[t] = BANK_AW'($urandom_range(0, 262143));
    end
    @(posedge clk); #1; req = 0;
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int a, b, w0;
    for (int t = 0; t < NTBL; t++) rel_addr[t] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    a = g4; b = stalls;
    phase(2'b01, 300);
    chk(g4 - a == 300 && stalls == b, $sformatf("IPv4 alone: %0d grants in 300 cycles", g4 - a));
    a = g6;
    phase(2'b10, 300);
    chk((g6 - a) * 15 >= 300 * 12 - 15, $sformatf("IPv6 alone: %0d grants in 300 cycles", g6 - a));
    a = g4; b = g6;
    phase(2'b11, 600);
    chk(g4 - a > 100 && g6 - b > 100, $sformatf("both: %0d IPv4 and %0d IPv6 grants", g4 - a, g6 - b));
    chk(stalls > 0, "contention stalls");
    // bin writes with no lookups: one copy per cycle
    a = wr_done; wr_cycles = 0;
    wr_on = 1;
    repeat (400) @(posedge clk);
    wr_on = 0;
    repeat (40) @(posedge clk);
    chk(wr_done - a > 10 && wr_done == wr_acc, $sformatf("idle writes: %0d done", wr_done - a));
    $display("idle bin writes: %0d in %0d cycles of writing", wr_done - a, wr_cycles);
    chk(wr_cycles <= (wr_done - a) * 20, "idle writes take about one cycle per copy");
    // bin writes alongside IPv4 lookups at full rate
    a = g4; b = stalls; w0 = wr_done;
    wr_on = 1;
    phase(2'b01, 1500);
    wr_on = 0;
    repeat (200) @(posedge clk);
    chk(g4 - a == 1500 && stalls == b,
        $sformatf("IPv4 with writes: %0d grants in 1500 cycles, %0d stalls", g4 - a, stalls - b));
    $display("IPv4 stalls while writing: %0d", stalls - b);
    $display("bin writes alongside IPv4: %0d in 1500 cycles", wr_done - w0);
    chk(wr_done == wr_acc && wr_done - w0 >= 5, $sformatf("writes alongside IPv4: %0d finished", wr_done - w0));
    // bin writes alongside IPv6 lookups at line rate (2 in every 3 cycles)
    b = stalls; w0 = wr_done; a = g6;
    wr_on = 1;
    for (int i = 0; i < 1500; i++) begin
      @(posedge clk); #1;
      req = (i % 3 != 2) ? 2'b10 : 2'b00;
      for (int t = 0; t < NTBL; t++) rel_addr[t] = BANK_AW'($urandom_range(0, 262143));
    end
    @(posedge clk); #1; req = 0;
    wr_on = 0;
    repeat (300) @(posedge clk);
    chk(g6 - a == 1000 && stalls == b,
        $sformatf("IPv6 at line rate with writes: %0d grants of 1000, %0d stalls", g6 - a, stalls - b));
    chk(wr_done == wr_acc && wr_done - w0 >= 5, $sformatf("writes alongside IPv6: %0d finished", wr_done - w0));
    $display("bin writes alongside IPv6 at line rate: %0d in 1500 cycles", wr_done - w0);
    // and alongside both engines
    a = wr_done;
    wr_on = 1;
    phase(2'b11, 1500);
    wr_on = 0;
    repeat (300) @(posedge clk);
    chk(wr_done > a && wr_done == wr_acc, $sformatf("writes alongside both engines: %0d", wr_done - a));
    $display("bin writes: %0d accepted, %0d done, %0d copies written", wr_acc, wr_done, wr_copies);
    $display("grants: IPv4 %0d, IPv6 %0d, stalled requests %0d", g4, g6, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
