// seg_table: the segment table of the compact lookup.
//
// One 4-byte segment-information word (seg_entry_t) per 16-bit segment, so
// 2^16 entries at the default size. The lookup side reads the entry of the
// segment given by the first 16 address bits; the table-update side writes
// whole entries. Both ports are synchronous: rd_data shows the entry addressed
// on the clock edge where rd_en was high, and holds it otherwise. A read and a
// write of the same entry in one cycle return the old entry (read-first).
// The size and word format follow the scheme; the port arrangement and
// read-first behaviour are this design's choices.
module seg_table
  import ptcam_pkg::*;
#(
  parameter int unsigned AW = SEG_W          // 2^AW entries
) (
  input  logic          clk,
  // lookup read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output seg_entry_t    rd_data,
  // table update write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  seg_entry_t    wr_data
);

  seg_entry_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
