// tb_hash_pool: checks the HashTune hash pool against a bit-serial H3
// reference for the IPv4/24 shape (5 verify bits, 6 bins) and the IPv6/48
// shape (26 verify bits, 3 bins), every function of the pool, random inputs.
module tb_hash_pool;
  import flashlook_pkg::*;

  logic [3:0]  id_a, id_b;
  logic [4:0]  x_a;
  logic [25:0] x_b;
  logic [2:0]  bin_a;
  logic [1:0]  bin_b;
  int checks = 0, failures = 0;
  int hist [6];

  hash_pool #(.POOL(16), .VW(5),  .BPG(6)) u_a (.id(id_a), .x(x_a), .bin(bin_a));
  hash_pool #(.POOL(16), .VW(26), .BPG(3)) u_b (.id(id_b), .x(x_b), .bin(bin_b));

  function automatic int ref_bin(int f, longint x, int vw, int bpg);
    bit [15:0] h = 0;
    for (int i = 0; i < vw; i++) if (x[i]) h ^= h3_row(f, i);
    return int'((longint'(h) * bpg) >> 16);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) begin
      for (int x = 0; x < 32; x++) begin
        id_a = 4'(f); x_a = 5'(x); #1;
        checks++;
        if (int'(bin_a) != ref_bin(f, x, 5, 6)) begin
          failures++;
          $display("FAIL f=%0d x=%0d bin=%0d exp=%0d", f, x, bin_a, ref_bin(f, x, 5, 6));
        end
        hist[bin_a]++;
      end
      for (int k = 0; k < 200; k++) begin
        id_b = 4'(f); x_b = 26'($urandom); #1;
        checks++;
        if (int'(bin_b) != ref_bin(f, x_b, 26, 3) || bin_b > 2) begin
          failures++;
          $display("FAIL f=%0d x=%h bin=%0d", f, x_b, bin_b);
        end
      end
    end
    // the functions spread keys over all six bins
    for (int b = 0; b < 6; b++) begin
      checks++;
      if (hist[b] < 16) begin failures++; $display("FAIL bin %0d used %0d times", b, hist[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
