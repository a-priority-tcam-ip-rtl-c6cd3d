// ptcam_pkg: types and constants shared by the priority-TCAM IP-routing
// lookup engine.
//
// The engine splits a 32-bit destination address into a 16-bit segment
// (bits 1..16, counting bit 1 as the most significant bit) and a 16-bit
// remainder. Prefixes of length 17..24 are served by the compact lookup
// (segment table, associated default hops, next hop arrays); prefixes longer
// than 24 are served by the priority TCAM.
//
// The segment-information word follows the field list and widths of the
// scheme: Cprefix (6), Cmarker (6), Mlength (3), Nbit (1), Npointer (16).
// Their order inside the 32-bit word is this design's choice: the fields are
// packed from the most significant bit down in the order listed.
// Next hops are 8 bits wide, the widest of the two NHA encodings (4 or 8 bits).
package ptcam_pkg;

  localparam int unsigned IP_W      = 32;
  localparam int unsigned SEG_W     = 16;   // segment index = address bits 1..16
  localparam int unsigned HOP_W     = 8;    // widest next-hop encoding
  localparam int unsigned NPTR_W    = 16;   // Npointer width, in 4-byte units
  localparam int unsigned NHA_WORD_W = 32;  // NHA memory word (double word)
  localparam int unsigned LEN_W     = 6;    // prefix length 0..32

  typedef logic [IP_W-1:0]  ip_t;
  typedef logic [HOP_W-1:0] hop_t;
  typedef logic [SEG_W-1:0] seg_idx_t;

  // 4-byte segment information.
  typedef struct packed {
    logic [5:0]        cprefix;   // common bit pattern of p(17,22)
    logic [5:0]        cmarker;   // 1 = position of p(17,22) common to all prefixes
    logic [2:0]        mlength;   // longest compact prefix length minus 17
    logic              nbit;      // 0: 4-bit NHA entries, 1: 8-bit NHA entries
    logic [NPTR_W-1:0] npointer;  // NHA start address / 4; 0 = no NHA
  } seg_entry_t;

  // Where a lookup result came from (reported alongside each next hop).
  typedef enum logic [2:0] {
    SRC_ADH_ONLY     = 3'd0,  // segment holds only a default route (Npointer = 0)
    SRC_ADH_MISMATCH = 3'd1,  // common bits differ: segment default hop
    SRC_NHA4         = 3'd2,  // 4-bit entry of a next hop array
    SRC_NHA8         = 3'd3,  // 8-bit entry of a next hop array
    SRC_TCAM         = 3'd4   // priority TCAM hit
  } hop_src_e;

  // Mask of a prefix of length len (1 = bit is compared).
  function automatic ip_t len_to_mask(input logic [LEN_W-1:0] len);
    ip_t m;
    for (int b = 0; b < IP_W; b++)
      m[IP_W-1-b] = (b < int'(len));
    return m;
  endfunction

endpackage
