// tb_direct_table: writes expanded prefixes of lengths 8 to 18 into the
// 2^18-entry direct table with block masks (up to eight entries per write)
// and reads random entries back one cycle later.
module tb_direct_table;
  logic clk = 0;
  always #2 clk = ~clk;
  logic rd_en = 0;
  logic [17:0] rd_addr = 0;
  logic [7:0] nh, wr_nh = 0, wr_mask = 0;
  logic [14:0] wr_row = 0;
  bit [7:0] ref_t [262144];
  int checks = 0, failures = 0;

  direct_table dut (.*);

  task automatic wr(int row, bit [7:0] m, bit [7:0] v);
    @(negedge clk); wr_row = 15'(row); wr_mask = m; wr_nh = v;
    for (int b = 0; b < 8; b++) if (m[b]) ref_t[row*8+b] = v;
    @(negedge clk); wr_mask = 0;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32768; r++) wr(r, 8'hFF, 0);
    // prefixes, shortest first: each /L covers 2^(18-L) entries
    for (int len = 8; len <= 18; len++)
      repeat (3) begin
        automatic int base = ($urandom_range(0, 262143) >> (18 - len)) << (18 - len);
        automatic int n = 1 << (18 - len);
        automatic bit [7:0] v = 8'($urandom_range(1, 255));
        if (n >= 8) for (int r = base / 8; r < (base + n) / 8; r++) wr(r, 8'hFF, v);
        else begin
          automatic bit [7:0] m = 0;
          for (int i = 0; i < n; i++) m[(base % 8) + i] = 1;
          wr(base / 8, m, v);
        end
      end
    for (int k = 0; k < 5000; k++) begin
      automatic int a = (k % 2) ? $urandom_range(0, 262143) : 0;
      if (k % 2 == 0) begin
        // addresses next to a written entry
        do a = $urandom_range(0, 262143); while (ref_t[a] == 0 && $urandom_range(0, 9) != 0);
      end
      @(negedge clk); rd_en = 1; rd_addr = 18'(a);
      @(negedge clk); rd_en = 0; rd_addr = 18'($urandom);
      checks++;
      if (nh != ref_t[a]) begin failures++; $display("FAIL entry %0d: %0d vs %0d", a, nh, ref_t[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
