// fl_tb_pkg: testbench-side route table construction for FlashLook.
//
// This is a software model of the control plane: it expands prefixes to the
// length of each table, aggregates sibling prefixes into one element, picks
// for every bin group the hash function of the pool that overflows the
// fewest elements (HashTune), packs the bins (normal or overflow
// organisation) and the BSM rows, and gives the hash IDs to write. It also
// holds a plain longest-prefix-match reference. The hash reference here
// recomputes the H3 value bit by bit from the row constants.
package fl_tb_pkg;
  import flashlook_pkg::*;

  typedef struct {
    longint val;   // address-width value, bits below len are zero
    int     len;
    int     nh;
  } prefix_t;

  function automatic longint lmask(int n);
    return (n >= 64) ? -64'sd1 : ((64'sd1 <<< n) - 1);
  endfunction

  function automatic int ref_bin(int t, int f, longint ver);
    bit [15:0] h = '0;
    longint prod;
    for (int i = 0; i < tbl_ver_w(t); i++)
      if (ver[i]) h = h ^ h3_row(f, i);
    prod = longint'(h) * tbl_bpg(t);
    return int'(prod >> 16);
  endfunction

  // longest matching prefix with length in lo..hi; 0 if none
  function automatic int lpm(prefix_t p[$], longint addr, int aw, int lo, int hi);
    int best = -1, nh = 0;
    foreach (p[i]) begin
      if (p[i].len >= lo && p[i].len <= hi && p[i].len > best) begin
        if (p[i].len == 0 || ((addr ^ p[i].val) >>> (aw - p[i].len) & lmask(p[i].len)) == 0) begin
          best = p[i].len;
          nh   = p[i].nh;
        end
      end
    end
    return nh;
  endfunction

  // element key (parent key for aggregated tables) of an address
  function automatic longint elem_key(int t, longint addr);
    int aw = (t >= 2) ? 64 : 32;
    longint k = (addr >>> (aw - tbl_key_w(t))) & lmask(tbl_key_w(t));
    return (tbl_agg(t) != 0) ? (k >>> 1) : k;
  endfunction

  function automatic int tbl_lo(int t);
    case (t) 0: return 19; 1: return 25; 2: return 25; 3: return 33; default: return 41; endcase
  endfunction

  class tbl_builder;
    int t, pool, aw, hi, lo, vw, iw, ag, c, bpg, ew, binw, rw;
    int exp_nh  [longint];
    int exp_len [longint];
    bit [63:0] words [longint];
    int hid [int];
    bit [MAX_BSM_W-1:0] bsm_rows [int];
    int n_ovf_bins, n_bsm_elems, n_elems, n_groups, bsm_next;
    int used_ids [int];
    bit in_bsm [longint];   // element (parent key) stored in the BSM

    function new(int t_, int pool_);
      t = t_; pool = pool_;
      aw = (t >= 2) ? 64 : 32;
      hi = tbl_key_w(t); lo = tbl_lo(t);
      vw = tbl_ver_w(t); iw = tbl_idx_w(t); ag = tbl_agg(t);
      c = tbl_slots(t); bpg = tbl_bpg(t); ew = tbl_ew(t);
      binw = tbl_bin_w(t); rw = BSM_SLOTS * ew;
      bsm_next = 0;
    endfunction

    function void add_prefix(prefix_t p);
      longint top, base, key;
      if (p.len < lo || p.len > hi) return;
      top  = (p.val >>> (aw - hi)) & lmask(hi);
      base = top & ~lmask(hi - p.len);
      for (longint s = 0; s < (64'sd1 <<< (hi - p.len)); s++) begin
        key = base | s;
        if (!exp_len.exists(key) || exp_len[key] < p.len) begin
          exp_len[key] = p.len;
          exp_nh[key]  = p.nh;
        end
      end
    endfunction

    function longint elem_bits(longint ver, int nh0, int nh1);
      if (ag != 0) return (ver <<< 16) | (longint'(nh0) <<< 8) | longint'(nh1);
      return (ver <<< 8) | longint'(nh0);
    endfunction

    function void build();
      int nh0 [longint];
      int nh1 [longint];
      longint grp_members [int][$];
      longint pk, ver;
      int g;
      words.delete(); hid.delete(); bsm_rows.delete(); in_bsm.delete();
      n_ovf_bins = 0; n_bsm_elems = 0; n_elems = 0; n_groups = 0; bsm_next = 0;
      foreach (exp_nh[k]) begin
        pk = (ag != 0) ? (k >>> 1) : k;
        if (!nh0.exists(pk)) begin nh0[pk] = 0; nh1[pk] = 0; end
        if (ag != 0 && k[0]) nh1[pk] = exp_nh[k];
        else                 nh0[pk] = exp_nh[k];
      end
      foreach (nh0[p]) begin
        g = int'(p & lmask(iw));
        grp_members[g].push_back(p);
        n_elems++;
      end
      foreach (grp_members[gi]) begin
        int best_f, best_ovf, cnt[], ovf;
        longint bq [][$];
        n_groups++;
        best_f = 0; best_ovf = 1 << 30;
        for (int f = 0; f < pool; f++) begin
          cnt = new[bpg];
          foreach (grp_members[gi][m]) begin
            ver = (grp_members[gi][m] >>> iw) & lmask(vw);
            cnt[ref_bin(t, f, ver)]++;
          end
          ovf = 0;
          foreach (cnt[b]) if (cnt[b] > c) ovf += cnt[b] - c + 1;
          if (ovf < best_ovf) begin best_ovf = ovf; best_f = f; end
        end
        hid[gi] = best_f;
        used_ids[best_f] = 1;
        bq = new[bpg];
        foreach (grp_members[gi][m]) begin
          ver = (grp_members[gi][m] >>> iw) & lmask(vw);
          bq[ref_bin(t, best_f, ver)].push_back(grp_members[gi][m]);
        end
        for (int b = 0; b < bpg; b++) begin
          bit [127:0] bin = '0;
          longint addr;
          int nst;
          nst = (bq[b].size() > c) ? c - 1 : bq[b].size();
          for (int k = 0; k < nst; k++) begin
            pk = bq[b][k];
            ver = (pk >>> iw) & lmask(vw);
            bin = bin | (128'(elem_bits(ver, nh0[pk], nh1[pk])) << (binw - (k+1)*ew));
          end
          if (bq[b].size() > c) begin
            bit [MAX_BSM_W-1:0] row = '0;
            if (bq[b].size() - nst > BSM_SLOTS)
              $display("BUILD ERROR: table %0d bin overflows the BSM row", t);
            for (int k = nst; k < bq[b].size() && k - nst < BSM_SLOTS; k++) begin
              pk = bq[b][k];
              ver = (pk >>> iw) & lmask(vw);
              row = row | (MAX_BSM_W'(elem_bits(ver, nh0[pk], nh1[pk])) << (rw - (k-nst+1)*ew));
              n_bsm_elems++;
              in_bsm[pk] = 1'b1;
            end
            bsm_rows[bsm_next] = row;
            bin = bin | (128'(bsm_next) << (binw - c*ew)) | 128'd1;
            bsm_next++;
            n_ovf_bins++;
          end
          addr = (longint'(gi) * bpg + b) <<< tbl_bl8(t);
          if (bin != '0) begin
            if (binw == 128) begin
              words[addr]   = bin[127:64];
              words[addr+1] = bin[63:0];
            end else begin
              words[addr]   = bin[63:0];
            end
          end
        end
      end
    endfunction
  endclass

endpackage
