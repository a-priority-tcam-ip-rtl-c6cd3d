// assoc_mem: associated memory of the priority TCAM block.
//
// Stores the next hop of every TCAM entry, addressed by
// {TCAM number, entry address}. Synchronous read (data valid the cycle after
// rd_en) and synchronous write, read-first on a same-address collision.
// Its function follows the scheme; its size (4 TCAMs x 128 entries by
// default) and timing are this design's choices.
module assoc_mem
  import ptcam_pkg::*;
#(
  parameter int unsigned AW = 9             // 2^AW next hops
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
