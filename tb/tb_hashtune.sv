// tb_hashtune: programs hash IDs of bin groups and checks the bin address,
// verify bits and aggregation bit HashTune returns one cycle after the key,
// for IPv4/24 (64-bit bins, 6 per group) and IPv6/48 (128-bit bins, 3 per
// group, three implicit bits).
module tb_hashtune;
  import flashlook_pkg::*;
  import fl_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we0 = 0, we4 = 0;
  logic [23:0] key0 = 0;
  logic [47:0] key4 = 0;
  logic [BANK_AW-1:0] addr0, addr4;
  logic [4:0]  ver0;
  logic [25:0] ver4;
  logic agg0, agg4;
  logic [17:0] wa = 0;
  logic [3:0]  wd = 0;
  int hid0 [int];
  int hid4 [int];
  int checks = 0, failures = 0;

  hashtune #(.TBL(0)) u0 (.clk(clk), .key_en(en), .key(key0), .addr(addr0), .ver(ver0),
    .agg_bit(agg0), .hid_we(we0), .hid_waddr(wa), .hid_wdata(wd));
  hashtune #(.TBL(4)) u4 (.clk(clk), .key_en(en), .key(key4), .addr(addr4), .ver(ver4),
    .agg_bit(agg4), .hid_we(we4), .hid_waddr(wa), .hid_wdata(wd));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint k0, k4;
    int g0, g4, e0, e4;
    for (int k = 0; k < 3000; k++) begin
      k0 = longint'($urandom) & 64'hFFFFFF;
      k4 = {3'b001, 45'({$urandom, $urandom})};
      g0 = int'((k0 >> 1) & 64'h3FFFF);
      g4 = int'((k4 >> 1) & 64'h3FFFF);
      if (!hid0.exists(g0)) begin
        @(negedge clk); we0 = 1; wa = 18'(g0); wd = 4'($urandom); hid0[g0] = wd;
        @(negedge clk); we0 = 0;
      end
      if (!hid4.exists(g4)) begin
        @(negedge clk); we4 = 1; wa = 18'(g4); wd = 4'($urandom); hid4[g4] = wd;
        @(negedge clk); we4 = 0;
      end
      @(negedge clk); en = 1; key0 = 24'(k0); key4 = 48'(k4);
      @(negedge clk); en = 0; key0 = '0; key4 = '0;
      e0 = (g0 * 6 + ref_bin(0, hid0[g0], (k0 >> 19) & 31));
      e4 = (g4 * 3 + ref_bin(4, hid4[g4], (k4 >> 19) & 64'h3FFFFFF)) * 2;
      chk(int'(addr0) == e0, $sformatf("IPv4/24 key %h addr %0d exp %0d", k0, addr0, e0));
      chk(ver0 == 5'(k0 >> 19) && agg0 == k0[0], "IPv4/24 verify and aggregation bits");
      chk(int'(addr4) == e4, $sformatf("IPv6/48 key %h addr %0d exp %0d", k4, addr4, e4));
      chk(ver4 == 26'(k4 >> 19) && agg4 == k4[0], "IPv6/48 verify and aggregation bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
