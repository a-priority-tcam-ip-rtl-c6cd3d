// logic_process_unit: the address logic of the compact lookup.
//
// Given the segment-information word of the destination's segment and the
// destination's bits 17..24 (bit 1 = most significant address bit), it
//   1. checks the common bits: the address bits 17..22 at the positions
//      marked in Cmarker must equal Cprefix. This is the same test as
//      comparing P1(p(17,22), Cmarker) with P1(Cprefix, Cmarker);
//   2. forms the NHA index k = P0(p(17,24), Cmarker << 2) >> (7 - Mlength),
//      i.e. the unmarked bits of 17..24, packed together in order with bit 17
//      leading, and cut to the bits that lie within the longest prefix;
//   3. turns k into a word address of the NHA memory: byte offset k (8-bit
//      entries, Nbit = 1) or k/2 (4-bit entries, Nbit = 0) from byte address
//      Npointer*4, plus the byte lane and, for 4-bit entries, the nibble.
// The next hop is taken from the NHA when Npointer is non-zero and the common
// bits match, otherwise from the segment's associated default hop.
// The checks and the index formula follow the scheme's lookup algorithm; the
// split of the result into word address, byte lane and nibble is this design's
// memory organisation. Purely combinational.
module logic_process_unit
  import ptcam_pkg::*;
(
  input  seg_entry_t        seg,          // segment information
  input  logic [7:0]        addr_17_24,   // destination bits 17..24 (bit 17 = MSB)
  output logic              common_match, // marked bits equal Cprefix
  output logic              use_nha,      // next hop comes from the NHA
  output logic [7:0]        k,            // NHA entry index
  output logic [NPTR_W-1:0] nha_word_addr,
  output logic [1:0]        nha_byte,     // byte lane within the word
  output logic              nha_nibble    // 1 = high nibble (4-bit entries)
);

  logic [7:0] marker8;   // Cmarker << 2: bits 23 and 24 are never common
  logic [7:0] packed_bits;
  logic [7:0] byte_off;

  always_comb begin
    common_match = ((addr_17_24[7:2] ^ seg.cprefix) & seg.cmarker) == 6'b0;
    use_nha      = (seg.npointer != '0) && common_match;

    // P0: keep the unmarked bits, in order, the last one kept ending up as LSB
    marker8     = {seg.cmarker, 2'b00};
    packed_bits = '0;
    for (int i = 7; i >= 0; i--)
      if (!marker8[i]) packed_bits = {packed_bits[6:0], addr_17_24[i]};
    k = packed_bits >> (3'd7 - seg.mlength);

    byte_off      = seg.nbit ? k : {1'b0, k[7:1]};
    nha_word_addr = seg.npointer + NPTR_W'(byte_off[7:2]);
    nha_byte      = byte_off[1:0];
    nha_nibble    = ~seg.nbit & k[0];
  end

endmodule
