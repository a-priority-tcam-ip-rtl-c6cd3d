// compact_lookup: the compact IP-routing lookup for prefixes of length <= 24.
//
// A lookup takes two memory accesses, pipelined so that one destination can
// enter every clock:
//   access 1 (edge 1): the segment table and the associated default hops are
//     both read with the segment index, destination bits 1..16;
//   between the edges the logic process unit checks the common bits and
//     forms the NHA address from the segment information;
//   access 2 (edge 2): the NHA word is read (only when it is needed);
//   after edge 2 the 4- or 8-bit entry is picked out of the word, or the
//     default hop is passed on, and out_valid/out_hop/out_src are valid.
// So a destination presented with in_valid before edge 1 has its next hop on
// the outputs right after edge 2 (latency 2 cycles, throughput 1 per cycle).
// The memories and the two-access lookup follow the scheme; reading the ADH in
// parallel with the segment table and the pipeline registers are this design's
// choices. The table write ports go straight to the three memories; table
// contents are built by the router's control software.
module compact_lookup
  import ptcam_pkg::*;
#(
  parameter int unsigned SEG_AW = SEG_W,   // log2 of segment table / ADH entries
  parameter int unsigned NHA_AW = NPTR_W   // log2 of NHA words
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup
  input  logic                    in_valid,
  input  ip_t                     in_ip,
  output logic                    out_valid,
  output hop_t                    out_hop,
  output hop_src_e                out_src,
  // table writes
  input  logic                    seg_wr_en,
  input  logic [SEG_AW-1:0]       seg_wr_addr,
  input  seg_entry_t              seg_wr_data,
  input  logic                    adh_wr_en,
  input  logic [SEG_AW-1:0]       adh_wr_addr,
  input  hop_t                    adh_wr_data,
  input  logic                    nha_wr_en,
  input  logic [NHA_AW-1:0]       nha_wr_addr,
  input  logic [NHA_WORD_W/8-1:0] nha_wr_be,
  input  logic [NHA_WORD_W-1:0]   nha_wr_data
);

  // ---- access 1: segment table and ADH -----------------------------------
  seg_entry_t seg_q;
  hop_t       adh_q;
  logic       v1_q;
  logic [7:0] a1724_q;

  seg_table #(.AW(SEG_AW)) u_seg (
    .clk, .rd_en(in_valid), .rd_addr(in_ip[IP_W-1 -: SEG_AW]), .rd_data(seg_q),
    .wr_en(seg_wr_en), .wr_addr(seg_wr_addr), .wr_data(seg_wr_data)
  );

  adh_mem #(.AW(SEG_AW)) u_adh (
    .clk, .rd_en(in_valid), .rd_addr(in_ip[IP_W-1 -: SEG_AW]), .rd_data(adh_q),
    .wr_en(adh_wr_en), .wr_addr(adh_wr_addr), .wr_data(adh_wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q    <= 1'b0;
      a1724_q <= '0;
    end else begin
      v1_q <= in_valid;
      if (in_valid) a1724_q <= in_ip[15:8];
    end
  end

  // ---- logic process unit --------------------------------------------------
  logic              use_nha, nha_nibble;
  logic [NPTR_W-1:0] nha_word_addr;
  logic [1:0]        nha_byte;

  logic_process_unit u_lpu (
    .seg(seg_q), .addr_17_24(a1724_q), .common_match(), .use_nha, .k(),
    .nha_word_addr, .nha_byte, .nha_nibble
  );

  // ---- access 2: NHA -----------------------------------------------------
  logic [NHA_WORD_W-1:0] nha_q;
  logic                  v2_q, use_nha_q, nibble_q, nbit_q;
  logic [1:0]            byte_q;
  hop_t                  adh2_q;
  hop_src_e              src_adh_q;

  nha_mem #(.AW(NHA_AW)) u_nha (
    .clk, .rd_en(v1_q && use_nha), .rd_addr(nha_word_addr[NHA_AW-1:0]), .rd_data(nha_q),
    .wr_en(nha_wr_en), .wr_addr(nha_wr_addr), .wr_be(nha_wr_be), .wr_data(nha_wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2_q      <= 1'b0;
      use_nha_q <= 1'b0;
      nibble_q  <= 1'b0;
      nbit_q    <= 1'b0;
      byte_q    <= '0;
      adh2_q    <= '0;
      src_adh_q <= SRC_ADH_ONLY;
    end else begin
      v2_q <= v1_q;
      if (v1_q) begin
        use_nha_q <= use_nha;
        nibble_q  <= nha_nibble;
        nbit_q    <= seg_q.nbit;
        byte_q    <= nha_byte;
        adh2_q    <= adh_q;
        src_adh_q <= (seg_q.npointer == '0) ? SRC_ADH_ONLY : SRC_ADH_MISMATCH;
      end
    end
  end

  // ---- entry extraction ----------------------------------------------------
  logic [7:0] nha_byte_val;

  always_comb begin
    nha_byte_val = nha_q[8*byte_q +: 8];
    out_valid    = v2_q;
    if (!use_nha_q) begin
      out_hop = adh2_q;
      out_src = src_adh_q;
    end else if (nbit_q) begin
      out_hop = nha_byte_val;
      out_src = SRC_NHA8;
    end else begin
      out_hop = {4'b0, nibble_q ? nha_byte_val[7:4] : nha_byte_val[3:0]};
      out_src = SRC_NHA4;
    end
  end

endmodule
