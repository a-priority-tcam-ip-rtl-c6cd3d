// ptcam_tb_pkg: reference models for the lookup-engine testbenches.
//
//  - lpm_lookup: plain longest-prefix match over a route list. This is the
//    independent reference every lookup result is compared with.
//  - build_segment: the table-construction procedure run by the router's
//    control software for one 16-bit segment. From the segment's routes of
//    length 16..24 it produces the segment-information word, the associated
//    default hop and the bytes of the segment's next hop array (NHA):
//      1. sort the routes by length; the /16 route is the default hop h0;
//      2. only a default: Npointer = 0, no NHA;
//      3. Mlength = longest length - 17, Cprefix = p1(17,22), Cmarker = 111111;
//      4. for every further route clear the Cmarker bits where its bits 17..22
//         differ from Cprefix, and also the bits beyond its own length (those
//         bits are not part of the prefix); Nbit = 1 if any hop, h0 included,
//         exceeds 15;
//      5. the NHA has 2^(Mlength + 1 - Clength) entries of 4 or 8 bits
//         (Clength = number of ones in Cmarker), at least 4 bytes, placed at a
//         4-byte aligned address; every entry starts as h0;
//      6. in increasing length order, route j overwrites the
//         2^(Mlength + 17 - l_j) entries from k_j = P0(p_j(17,24), Cmarker<<2)
//         >> (7 - Mlength) onward with h_j.
//    4-bit entries are packed two per byte, even entry in the low nibble.
package ptcam_tb_pkg;
  import ptcam_pkg::*;

  typedef struct {
    ip_t prefix;
    int  len;
    int  hop;
  } route_t;

  typedef route_t route_q_t[$];
  typedef byte unsigned byte_q_t[$];

  function automatic bit prefix_covers(ip_t prefix, int len, ip_t ip);
    ip_t m = (len == 0) ? '0 : ~(32'hFFFF_FFFF >> len);
    return ((prefix ^ ip) & m) == '0;
  endfunction

  // longest-prefix match; returns -1 when no route covers ip
  function automatic int lpm_lookup(const ref route_q_t routes, input ip_t ip,
                                    output int best_len);
    int hop = -1;
    best_len = -1;
    foreach (routes[i])
      if (routes[i].len > best_len && prefix_covers(routes[i].prefix, routes[i].len, ip)) begin
        best_len = routes[i].len;
        hop      = routes[i].hop;
      end
    return hop;
  endfunction

  // bits of p(17,24) at unmarked positions, packed in order (bit 17 first)
  function automatic int p0_17_24(logic [7:0] bits, logic [5:0] cmarker);
    int v = 0;
    logic [7:0] r = {cmarker, 2'b00};
    for (int pos = 17; pos <= 24; pos++)
      if (!r[24 - pos]) v = (v << 1) | int'(bits[24 - pos]);
    return v;
  endfunction

  function automatic void build_segment(input route_q_t rs_in,
                                        input int unsigned nha_byte_addr,
                                        output seg_entry_t se, output hop_t adh,
                                        output byte_q_t nha);
    route_q_t rs = rs_in;
    int m, lmax, mlen, clen, nk, entries, nbytes, h0;
    logic [5:0] cpre, cmark;
    bit nbit;
    int ent[];
    // step 1: sort by length (insertion sort)
    for (int i = 1; i < rs.size(); i++) begin
      route_t t = rs[i];
      int j = i - 1;
      while (j >= 0 && rs[j].len > t.len) begin rs[j+1] = rs[j]; j--; end
      rs[j+1] = t;
    end
    m   = rs.size();
    h0  = rs[0].hop;
    adh = hop_t'(h0);
    nha.delete();
    se = '0;
    if (m == 1) return;                       // step 2
    lmax  = rs[m-1].len;                      // step 3
    mlen  = lmax - 17;
    cpre  = rs[1].prefix[15:10];
    cmark = 6'b111111;
    nbit  = (h0 > 15);
    for (int j = 1; j < m; j++) begin         // step 4
      cmark &= ~(rs[j].prefix[15:10] ^ cpre);
      for (int pos = 17; pos <= 22; pos++)
        if (pos > rs[j].len) cmark[22 - pos] = 1'b0;
      if (rs[j].hop > 15) nbit = 1;
    end
    clen = $countones(cmark);
    nk      = mlen + 1 - clen;                // step 5
    entries = 1 << nk;
    ent = new[entries];
    foreach (ent[e]) ent[e] = h0;
    for (int j = 1; j < m; j++) begin         // step 6
      int k0 = p0_17_24(rs[j].prefix[15:8], cmark) >> (7 - mlen);
      for (int e = k0; e < k0 + (1 << (lmax - rs[j].len)); e++) ent[e] = rs[j].hop;
    end
    nbytes = nbit ? entries : (entries + 1) / 2;
    if (nbytes < 4) nbytes = 4;
    for (int b = 0; b < nbytes; b++) nha.push_back(8'h00);
    foreach (ent[e])
      if (nbit) nha[e] = byte'(ent[e]);
      else if (e % 2 == 0) nha[e/2] = nha[e/2] | byte'(ent[e] & 15);
      else                 nha[e/2] = nha[e/2] | byte'((ent[e] & 15) << 4);
    se.cprefix  = cpre & cmark;
    se.cmarker  = cmark;
    se.mlength  = 3'(mlen);
    se.nbit     = nbit;
    se.npointer = NPTR_W'(nha_byte_addr >> 2);
  endfunction

endpackage
