// flashlook_pkg: shared constants, table geometry and DRAM data allocation of
// the FlashLook route lookup datapath.
//
// FlashLook keeps five prefix-expanded hash tables in DRAM: IPv4/24, IPv4/32,
// IPv6/32, IPv6/40 and IPv6/48. A key of one table is the leading bits of the
// destination address, split from the most significant bit down into
//   [implicit | verify | index | aggregation]
// The index bits select a bin group (HashTune), the verify bits are stored in
// the bin to tell the prefixes of a group apart, and the last bit picks one of
// the two next hops of an aggregated element. The three implicit bits of IPv6
// are the fixed 001 global unicast prefix and are neither stored nor hashed.
//
// From the document: index bit counts (IPv4/24 bits 6-23, IPv4/32 bits 16-31,
// IPv6 15/16/18 bits), verify bit counts, which tables aggregate, bin sizes
// (64 or 128 bits), bin capacities c (3 for IPv4/24, 4 for IPv4/32), the 8-bit
// next hop ID, v+1 = 8 BSM elements per overflowed bin, the table sizes and
// their placement in the four banks of each DRAM chip. This design's own
// choices: IPv6 bin capacities (as many elements as fit), the position of the
// IPv6 index bits (just above the aggregation bit, like IPv4), BSM depths, the
// hash constants and the DRAM word address map.
package flashlook_pkg;

  localparam int NH_W        = 8;    // next hop ID width; ID 0 means "no route"
  localparam int WORD_W      = 64;   // one DRAM word = 4-burst on a 16-bit bus
  localparam int BANK_AW     = 21;   // 128-Mbit bank in 64-bit words
  localparam int BANKS_PER_CHIP = 4;
  localparam int BSM_SLOTS   = 8;    // v + 1
  localparam int HASH_W      = 16;   // width of the raw universal hash value
  localparam int NTBL        = 5;
  localparam int MAX_EW      = 42;   // widest element (IPv6/48)
  localparam int MAX_VER_W   = 26;   // widest verify field (IPv6/48)
  localparam int MAX_BSM_W   = BSM_SLOTS * MAX_EW;

  typedef enum logic [2:0] {
    T4_24 = 3'd0,
    T4_32 = 3'd1,
    T6_32 = 3'd2,
    T6_40 = 3'd3,
    T6_48 = 3'd4
  } tbl_e;

  // Which memory an update writes.
  typedef enum logic [1:0] {
    UPD_DIRECT = 2'd0,   // IPv4/18 direct table
    UPD_HID    = 2'd1,   // hash ID table of one DRAM table
    UPD_BSM    = 2'd2,   // black sheep memory row of one DRAM table
    UPD_BIN    = 2'd3    // DRAM bin of one table, written to every copy
  } upd_e;

  // Which level of the lookup produced the next hop.
  typedef enum logic [2:0] {
    SRC_NONE  = 3'd0,   // no route
    SRC_SHORT = 3'd1,   // on-chip table of short prefixes (IPv4/18 direct table)
    SRC_TBL0  = 3'd2,   // shortest DRAM table of the family
    SRC_TBL1  = 3'd3,
    SRC_TBL2  = 3'd4,
    SRC_LONG  = 3'd5    // on-chip table of long prefixes (IPv6 /49-/64)
  } src_e;

  function automatic int tbl_impl_w(int t);
    return (t >= 2) ? 3 : 0;
  endfunction

  function automatic int tbl_ver_w(int t);
    case (t)
      0: return 5;  1: return 15; 2: return 13; 3: return 21; default: return 26;
    endcase
  endfunction

  function automatic int tbl_idx_w(int t);
    case (t)
      0: return 18; 1: return 16; 2: return 15; 3: return 16; default: return 18;
    endcase
  endfunction

  function automatic int tbl_agg(int t);
    return (t == 3) ? 0 : 1;
  endfunction

  // bin capacity c
  function automatic int tbl_slots(int t);
    case (t)
      0: return 3; 1: return 4; 2: return 2; 3: return 2; default: return 3;
    endcase
  endfunction

  // bins per group = table size / bin size / 2^index bits
  function automatic int tbl_bpg(int t);
    case (t)
      0: return 6; 1: return 4; 2: return 16; 3: return 8; default: return 3;
    endcase
  endfunction

  // 1: bin is an 8-burst (128 bits, two DRAM words), 0: 4-burst (64 bits)
  function automatic int tbl_bl8(int t);
    return (t == 1 || t == 4) ? 1 : 0;
  endfunction

  function automatic int tbl_bsm_depth(int t);
    case (t)
      0: return 8192; 1: return 1024; 2: return 512; 3: return 512; default: return 256;
    endcase
  endfunction

  function automatic int tbl_key_w(int t);
    return tbl_impl_w(t) + tbl_ver_w(t) + tbl_idx_w(t) + tbl_agg(t);
  endfunction

  function automatic int tbl_ew(int t);
    return tbl_ver_w(t) + NH_W * (1 + tbl_agg(t));
  endfunction

  function automatic int tbl_bin_w(int t);
    return WORD_W * (1 + tbl_bl8(t));
  endfunction

  // ---------------------------------------------------------------------
  // DRAM data allocation. Bank b = chip*4 + bank-in-chip; the layout of a
  // basic configuration of three chips repeats. Banks 0 and 2 hold IPv4/24
  // (96 Mbit from word 0), banks 1 and 3 hold IPv4/32 (32 Mbit from word 0).
  // The IPv6 table sharing a bank sits at word 1.5M (below IPv4/24 or in the
  // lower part of bank 3) or at word 512K (below IPv4/32).
  // ---------------------------------------------------------------------
  localparam logic [BANK_AW-1:0] BASE_LOW  = 21'd1572864;  // 96 Mbit / 64
  localparam logic [BANK_AW-1:0] BASE_MID  = 21'd524288;   // 32 Mbit / 64

  function automatic bit bank_has(int b, int t);
    int bk, ch;
    bk = b % BANKS_PER_CHIP;
    ch = (b / BANKS_PER_CHIP) % 3;
    case (t)
      0: return (bk == 0) || (bk == 2);
      1: return (bk == 1) || (bk == 3);
      2: return (bk == 0) || (bk == 3 && ch == 0);
      3: return (bk == 2) || (bk == 3 && ch == 2);
      default: return (bk == 1) || (bk == 3 && ch == 1);
    endcase
  endfunction

  function automatic logic [BANK_AW-1:0] bank_base(int t);
    case (t)
      0, 1: return '0;
      2, 3: return BASE_LOW;
      default: return BASE_MID;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // H3 universal hash constants: row i of function f. The row is a fixed
  // integer mix (multiply by odd constants, xor-shift) of f and i.
  // ---------------------------------------------------------------------
  function automatic logic [HASH_W-1:0] h3_row(int f, int i);
    logic [31:0] x;
    x = (32'(f) * 32'd64 + 32'(i) + 32'd1) * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA77;
    x = x ^ (x >> 13);
    return x[HASH_W-1:0];
  endfunction

endpackage
