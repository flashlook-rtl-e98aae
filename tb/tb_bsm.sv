// tb_bsm: fills black sheep memory rows of IPv4/32 (eight 31-bit aggregated
// elements per row) and checks the one-cycle parallel match on every slot,
// on both children and on absent keys.
module tb_bsm;
  import flashlook_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0, agg = 0, hit;
  logic [9:0] rd_addr = 0, wr_addr = 0;
  logic [14:0] ver = 0;
  logic [7:0] nh;
  logic [247:0] wr_data = 0;
  int vers [64][8];
  int n0 [64][8], n1 [64][8];
  int checks = 0, failures = 0, slot_hits [8];

  bsm #(.TBL(1)) dut (.clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .ver(ver), .agg_bit(agg),
    .hit(hit), .nh(nh), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      wr_data = '0;
      for (int s = 0; s < 8; s++) begin
        automatic int used = $urandom_range(0, 7) != 0;
        vers[r][s] = (r * 8 + s) * 37 % 32768;
        n0[r][s] = used ? $urandom_range(0, 255) : 0;
        n1[r][s] = used ? $urandom_range(1, 255) : 0;
        wr_data |= 248'({15'(vers[r][s]), 8'(n0[r][s]), 8'(n1[r][s])}) << (248 - 31*(s+1));
      end
      @(negedge clk); wr_en = 1; wr_addr = 10'(r * 13);
      @(negedge clk); wr_en = 0;
    end
    for (int k = 0; k < 3000; k++) begin
      automatic int r = $urandom_range(0, 63);
      automatic int s = $urandom_range(0, 8);
      automatic int e;
      @(negedge clk);
      rd_en = 1; rd_addr = 10'(r * 13); agg = 1'($urandom);
      ver = (s < 8) ? 15'(vers[r][s]) : 15'(vers[r][0] + 1);
      @(negedge clk);
      rd_en = 0; ver = '0;
      e = (s < 8) ? (agg ? n1[r][s] : n0[r][s]) : 0;
      checks++;
      if (hit != (e != 0) || (e != 0 && nh != 8'(e))) begin
        failures++;
        $display("FAIL row %0d slot %0d agg %0d: hit %0d nh %0d exp %0d", r, s, agg, hit, nh, e);
      end
      if (hit && s < 8) slot_hits[s]++;
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (slot_hits[s] == 0) begin failures++; $display("FAIL slot %0d never hit", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
