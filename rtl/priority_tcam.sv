// priority_tcam: the priority TCAM block, for prefixes longer than 24.
//
// NT TCAMs (four priority classes by default) search the destination in
// parallel; the priority resolve unit picks the hit of the lowest-numbered
// TCAM, and the associated memory returns that entry's next hop. Routes must
// be placed so that at most one entry per TCAM matches any address, and so
// that a longer matching prefix always sits in a higher-priority TCAM.
// Timing with full-width TCAMs (SLICE_W = 32, the default), matching the
// two-access compact lookup beside it:
//   edge 1: the TCAM compare and priority resolution, done in the cycle where
//           search_valid is high, are registered;
//   edge 2: the associated memory is read; after it out_valid, out_hit,
//           out_class and out_hop are valid (latency 2, one search per cycle,
//           search_ready always 1).
// With sliced TCAMs (SLICE_W = 8: four clocks per compare) a search may start
// only while search_ready is 1; the compare takes 32/SLICE_W clocks, then the
// two steps above follow, so the latency is 32/SLICE_W + 2 clocks and one
// search is accepted every 32/SLICE_W clocks.
// One write command loads a TCAM entry (prefix, length, valid) and its next
// hop in the associated memory together.
// The block structure follows the scheme; the pipeline split, the write
// command and the entry count are this design's choices.
module priority_tcam
  import ptcam_pkg::*;
#(
  parameter int unsigned NT = 4,                          // TCAMs / priority classes
  parameter int unsigned N  = 128,                        // entries per TCAM
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned TW = (NT > 1) ? $clog2(NT) : 1,
  parameter int unsigned SLICE_W = IP_W                  // TCAM bits compared per clock
) (
  input  logic             clk,
  input  logic             rst_n,
  // search
  input  logic             search_valid,
  input  ip_t              search_ip,
  output logic             search_ready,
  output logic             out_valid,
  output logic             out_hit,
  output logic [TW-1:0]    out_class,
  output hop_t             out_hop,
  // entry write
  input  logic             wr_en,
  input  logic [TW-1:0]    wr_tcam,
  input  logic [AW-1:0]    wr_addr,
  input  ip_t              wr_prefix,
  input  logic [LEN_W-1:0] wr_len,
  input  logic             wr_valid,
  input  hop_t             wr_hop
);

  logic [NT-1:0]         hit, busy, done;
  logic [NT-1:0][AW-1:0] addr;

  for (genvar t = 0; t < NT; t++) begin : g_tcam
    tcam #(.N(N), .AW(AW), .SLICE_W(SLICE_W)) u_tcam (
      .clk, .rst_n,
      .wr_en(wr_en && wr_tcam == TW'(t)), .wr_addr, .wr_prefix, .wr_len, .wr_valid,
      .search_start(search_valid), .search_ip, .search_busy(busy[t]), .search_done(done[t]),
      .hit(hit[t]), .match_addr(addr[t])
    );
  end

  logic             any_hit;
  logic [TW-1:0]    sel;
  logic [TW+AW-1:0] mem_addr;

  priority_resolve #(.NT(NT), .AW(AW), .TW(TW)) u_resolve (
    .hit, .addr, .any_hit, .sel, .mem_addr
  );

  logic             v1_q, hit1_q, v2_q, hit2_q;
  logic [TW-1:0]    cls1_q, cls2_q;
  logic [TW+AW-1:0] maddr1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q     <= 1'b0;
      hit1_q   <= 1'b0;
      cls1_q   <= '0;
      maddr1_q <= '0;
      v2_q     <= 1'b0;
      hit2_q   <= 1'b0;
      cls2_q   <= '0;
    end else begin
      v1_q <= done[0];                  // all TCAMs run in lockstep
      if (done[0]) begin
        hit1_q   <= any_hit;
        cls1_q   <= sel;
        maddr1_q <= mem_addr;
      end
      v2_q <= v1_q;
      if (v1_q) begin
        hit2_q <= hit1_q;
        cls2_q <= cls1_q;
      end
    end
  end

  assoc_mem #(.AW(TW + AW)) u_assoc (
    .clk, .rd_en(v1_q && hit1_q), .rd_addr(maddr1_q), .rd_data(out_hop),
    .wr_en, .wr_addr({wr_tcam, wr_addr}), .wr_data(wr_hop)
  );

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               done == {NT{done[0]}} && busy == {NT{busy[0]}})
    else $error("priority_tcam: TCAMs out of step");

  assign search_ready = ~busy[0];
  assign out_valid    = v2_q;
  assign out_hit   = hit2_q;
  assign out_class = cls2_q;

endmodule
