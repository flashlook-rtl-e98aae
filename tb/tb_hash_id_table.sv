// tb_hash_id_table: writes random hash IDs, reads them back one cycle
// later, and checks that the read data holds while rd_en is low.
module tb_hash_id_table;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [9:0] rd_addr = 0, wr_addr = 0;
  logic [3:0] rd_id, wr_id = 0;
  bit [3:0] ref_mem [1024];
  int checks = 0, failures = 0;

  hash_id_table #(.GROUPS(1024), .IDW(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 10'(i); wr_id = 4'($urandom); ref_mem[i] = wr_id;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      automatic int a = $urandom_range(0, 1023);
      @(negedge clk); rd_en = 1; rd_addr = 10'(a);
      // a write elsewhere in the same cycle
      wr_en = $urandom_range(0, 1); wr_addr = 10'($urandom); wr_id = 4'($urandom);
      if (wr_addr == rd_addr) wr_en = 0;
      @(negedge clk); rd_en = 0;
      if (wr_en) ref_mem[wr_addr] = wr_id;
      wr_en = 0;
      checks++;
      if (rd_id != ref_mem[a]) begin failures++; $display("FAIL addr %0d: %0d vs %0d", a, rd_id, ref_mem[a]); end
      rd_addr = 10'($urandom);
      @(negedge clk);
      checks++;
      if (rd_id != ref_mem[a]) begin failures++; $display("FAIL hold addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
