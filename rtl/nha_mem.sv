// nha_mem: next hop array (NHA) memory of the compact lookup.
//
// Holds the encoded next hop arrays of all segments. It is organised in
// 32-bit (double word) words because Npointer counts 4-byte units: with a
// 16-bit Npointer the memory spans 2^16 words = 256 KB. Inside a word, byte 0
// is bits [7:0]; with 4-bit encoding the even-numbered entry of a byte is its
// low nibble. The word organisation follows from the scheme's Npointer
// alignment; byte and nibble order are this design's choices.
// Synchronous read (data valid the cycle after rd_en) and synchronous word
// write with per-byte enables, read-first on a same-address collision.
module nha_mem
  import ptcam_pkg::*;
#(
  parameter int unsigned AW = NPTR_W          // 2^AW words of 32 bits
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output logic [NHA_WORD_W-1:0]   rd_data,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic [NHA_WORD_W/8-1:0] wr_be,
  input  logic [NHA_WORD_W-1:0]   wr_data
);

  logic [NHA_WORD_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en)
      for (int b = 0; b < NHA_WORD_W/8; b++)
        if (wr_be[b]) mem[wr_addr][8*b +: 8] <= wr_data[8*b +: 8];
  end

endmodule
