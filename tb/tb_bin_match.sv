// tb_bin_match: packs random bins in both organisations and checks the
// match: IPv4/24 (aggregated elements, c = 3) and IPv6/40 (plain elements,
// c = 2), keys present, absent and in the overflow slot.
module tb_bin_match;
  import flashlook_pkg::*;

  logic [63:0] bin_a, bin_b;
  logic [4:0]  ver_a;
  logic [20:0] ver_b;
  logic agg_a;
  logic hit_a, hit_b, ovf_a, ovf_b;
  logic [7:0] nh_a, nh_b;
  logic [10:0] ptr_a;
  logic [8:0]  ptr_b;
  int checks = 0, failures = 0;
  int n_hit = 0, n_ovf = 0, n_child1 = 0;

  bin_match #(.TBL(0)) u_a (.bin(bin_a), .ver(ver_a), .agg_bit(agg_a), .hit(hit_a), .nh(nh_a), .ovf(ovf_a), .ptr(ptr_a));
  bin_match #(.TBL(3)) u_b (.bin(bin_b), .ver(ver_b), .agg_bit(1'b0), .hit(hit_b), .nh(nh_b), .ovf(ovf_b), .ptr(ptr_b));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      // IPv4/24: three 21-bit elements {ver5, nh0, nh1} + flag
      automatic int vs [3];
      automatic int n0 [3], n1 [3];
      automatic bit ovf = $urandom_range(0, 3) == 0;
      automatic int ptr = $urandom_range(0, 2047);
      automatic int pick, exp_nh;
      vs[0] = $urandom_range(0, 31);
      vs[1] = (vs[0] + $urandom_range(1, 15)) % 32;
      vs[2] = (vs[1] + $urandom_range(1, 15)) % 32;
      if (vs[2] == vs[0]) vs[2] = (vs[2] + 1) % 32;
      bin_a = '0;
      for (int e = 0; e < 3; e++) begin
        n0[e] = $urandom_range(0, 255); n1[e] = $urandom_range(1, 255);
        if (ovf && e == 2) bin_a |= 64'(ptr) << 1;
        else bin_a |= 64'({5'(vs[e]), 8'(n0[e]), 8'(n1[e])}) << (64 - 21*(e+1));
      end
      bin_a[0] = ovf;
      pick = $urandom_range(0, 3);
      ver_a = (pick < 3) ? 5'(vs[pick]) : 5'((vs[0] + 16) % 32);
      if (pick == 3 && (ver_a == 5'(vs[1]) || ver_a == 5'(vs[2]))) ver_a = 5'(vs[pick == 3 ? 0 : pick]) ^ 5'h1f;
      agg_a = 1'($urandom);
      #1;
      exp_nh = 0;
      for (int e = 0; e < 3; e++)
        if (!(ovf && e == 2) && 5'(vs[e]) == ver_a) exp_nh = agg_a ? n1[e] : n0[e];
      chk(hit_a == (exp_nh != 0) && (exp_nh == 0 || nh_a == 8'(exp_nh)),
          $sformatf("v4/24 ver %0d agg %0d hit %0d nh %0d exp %0d", ver_a, agg_a, hit_a, nh_a, exp_nh));
      chk(ovf_a == ovf && (!ovf || ptr_a == 11'(ptr)), "v4/24 overflow flag and pointer");
      if (hit_a) n_hit++;
      if (hit_a && agg_a) n_child1++;
      if (ovf_a) n_ovf++;

      // IPv6/40: two 29-bit elements {ver21, nh}
      begin
        automatic int w0 = $urandom_range(0, 2097151);
        automatic int w1 = $urandom_range(0, 2097151);
        automatic int m0 = $urandom_range(1, 255);
        automatic int m1 = $urandom_range(1, 255);
        automatic bit o = $urandom_range(0, 3) == 0;
        automatic int e2;
        if (w1 == w0) w1 = w0 ^ 1;
        bin_b = (64'({21'(w0), 8'(m0)}) << 35) | (o ? 64'(ptr & 511) << 6 : 64'({21'(w1), 8'(m1)}) << 6) | 64'(o);
        pick = $urandom_range(0, 2);
        ver_b = (pick == 0) ? 21'(w0) : (pick == 1) ? 21'(w1) : 21'(w0 ^ w1 ^ 21'h15555);
        #1;
        e2 = (ver_b == 21'(w0)) ? m0 : (!o && ver_b == 21'(w1)) ? m1 : 0;
        chk(hit_b == (e2 != 0) && (e2 == 0 || nh_b == 8'(e2)), $sformatf("v6/40 hit %0d nh %0d exp %0d", hit_b, nh_b, e2));
        chk(ovf_b == o && (!o || ptr_b == 9'(ptr & 511)), "v6/40 overflow flag and pointer");
      end
    end
    chk(n_hit > 100 && n_ovf > 100 && n_child1 > 50, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
