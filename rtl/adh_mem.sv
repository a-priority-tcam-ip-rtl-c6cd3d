// adh_mem: associated default hops (ADHs) of the compact lookup.
//
// One next hop per segment, 2^16 entries at the default size. It is read with
// the same segment index as the segment table and in the same cycle, so the
// default hop is ready when the logic process unit decides between it and the
// next hop array. Synchronous read (data valid the cycle after rd_en) and
// synchronous write, read-first on a same-address collision. The entry count
// follows the scheme; the 8-bit hop width and the port timing are this
// design's choices.
module adh_mem
  import ptcam_pkg::*;
#(
  parameter int unsigned AW = SEG_W
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output hop_t          rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  hop_t          wr_data
);

  hop_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
