// ptcam_lookup_top: priority TCAM IP-routing lookup engine.
//
// A destination address enters on in_valid/in_ip and goes to two engines at
// once:
//   - the compact lookup (segment table, logic process unit, associated
//     default hops, next hop arrays) resolves every prefix of length <= 24
//     with two memory accesses;
//   - the priority TCAM (NT TCAMs, priority resolve unit, associated memory)
//     resolves prefixes longer than 24.
// The selector prefers a TCAM hit, which is always the longer prefix.
// Timing (default, full-width TCAMs): out_valid/out_hop/out_src appear 3
// clock edges after the edge that samples in_valid (two memory accesses plus
// the selector's output register); a new destination can enter every cycle
// and in_ready stays 1.
// With TCAM_SLICE_W = 8 the TCAMs compare 8 bits per clock over four clocks:
// a destination is taken only when in_valid and in_ready are both 1, which
// happens at most every fourth clock, the compact result is delayed to meet
// the TCAM result, and the latency becomes 32/TCAM_SLICE_W + 3 clocks.
// Table contents are written through the four write ports by the router's
// control software: segment entries, default hops, 32-bit NHA words (with
// byte enables) and TCAM entries together with their next hops.
// The block structure follows the scheme; the port list, the pipeline
// registers and the TCAM sizes are this design's choices.
module ptcam_lookup_top
  import ptcam_pkg::*;
#(
  parameter int unsigned SEG_AW = SEG_W,    // segment table / ADH: 2^16 entries
  parameter int unsigned NHA_AW = NPTR_W,   // NHA: 2^16 words of 32 bits = 256 KB
  parameter int unsigned NT     = 4,        // TCAMs (priority classes)
  parameter int unsigned N      = 128,      // entries per TCAM
  parameter int unsigned AW     = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned TW     = (NT > 1) ? $clog2(NT) : 1,
  parameter int unsigned TCAM_SLICE_W = IP_W // TCAM bits compared per clock (32 or 8)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup
  input  logic                    in_valid,
  input  ip_t                     in_ip,
  output logic                    in_ready,    // a destination is taken when in_valid && in_ready
  output logic                    out_valid,
  output hop_t                    out_hop,
  output hop_src_e                out_src,
  output logic [TW-1:0]           out_class,   // winning TCAM when out_src = SRC_TCAM
  // segment table write
  input  logic                    seg_wr_en,
  input  logic [SEG_AW-1:0]       seg_wr_addr,
  input  seg_entry_t              seg_wr_data,
  // associated default hop write
  input  logic                    adh_wr_en,
  input  logic [SEG_AW-1:0]       adh_wr_addr,
  input  hop_t                    adh_wr_data,
  // next hop array write
  input  logic                    nha_wr_en,
  input  logic [NHA_AW-1:0]       nha_wr_addr,
  input  logic [NHA_WORD_W/8-1:0] nha_wr_be,
  input  logic [NHA_WORD_W-1:0]   nha_wr_data,
  // TCAM entry write
  input  logic                    tcam_wr_en,
  input  logic [TW-1:0]           tcam_wr_tcam,
  input  logic [AW-1:0]           tcam_wr_addr,
  input  ip_t                     tcam_wr_prefix,
  input  logic [LEN_W-1:0]        tcam_wr_len,
  input  logic                    tcam_wr_valid,
  input  hop_t                    tcam_wr_hop
);

  localparam int unsigned NSL   = IP_W / TCAM_SLICE_W;
  localparam int unsigned EXTRA = (NSL > 1) ? NSL : 0;  // extra TCAM latency

  logic     accept;
  logic     cmp_valid, tcam_valid, tcam_hit;
  logic     cl_valid;
  hop_t     cl_hop;
  hop_src_e cl_src;
  hop_t     cmp_hop, tcam_hop;
  hop_src_e cmp_src;
  logic [TW-1:0] tcam_class;

  compact_lookup #(.SEG_AW(SEG_AW), .NHA_AW(NHA_AW)) u_compact (
    .clk, .rst_n,
    .in_valid(accept), .in_ip,
    .out_valid(cl_valid), .out_hop(cl_hop), .out_src(cl_src),
    .seg_wr_en, .seg_wr_addr, .seg_wr_data,
    .adh_wr_en, .adh_wr_addr, .adh_wr_data,
    .nha_wr_en, .nha_wr_addr, .nha_wr_be, .nha_wr_data
  );

  // align the compact result with the (slower) sliced TCAM result
  if (EXTRA == 0) begin : g_no_delay
    assign cmp_valid = cl_valid;
    assign cmp_hop   = cl_hop;
    assign cmp_src   = cl_src;
  end else begin : g_delay
    logic     dv_q [EXTRA];
    hop_t     dh_q [EXTRA];
    hop_src_e ds_q [EXTRA];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < EXTRA; i++) begin
          dv_q[i] <= 1'b0;
          dh_q[i] <= '0;
          ds_q[i] <= SRC_ADH_ONLY;
        end
      end else begin
        dv_q[0] <= cl_valid;
        dh_q[0] <= cl_hop;
        ds_q[0] <= cl_src;
        for (int i = 1; i < EXTRA; i++) begin
          dv_q[i] <= dv_q[i-1];
          dh_q[i] <= dh_q[i-1];
          ds_q[i] <= ds_q[i-1];
        end
      end
    end
    assign cmp_valid = dv_q[EXTRA-1];
    assign cmp_hop   = dh_q[EXTRA-1];
    assign cmp_src   = ds_q[EXTRA-1];
  end

  assign accept = in_valid && in_ready;

  priority_tcam #(.NT(NT), .N(N), .AW(AW), .TW(TW), .SLICE_W(TCAM_SLICE_W)) u_ptcam (
    .clk, .rst_n,
    .search_valid(accept), .search_ip(in_ip), .search_ready(in_ready),
    .out_valid(tcam_valid), .out_hit(tcam_hit), .out_class(tcam_class), .out_hop(tcam_hop),
    .wr_en(tcam_wr_en), .wr_tcam(tcam_wr_tcam), .wr_addr(tcam_wr_addr),
    .wr_prefix(tcam_wr_prefix), .wr_len(tcam_wr_len), .wr_valid(tcam_wr_valid),
    .wr_hop(tcam_wr_hop)
  );

  route_selector #(.TW(TW)) u_sel (
    .clk, .rst_n,
    .cmp_valid, .cmp_hop, .cmp_src,
    .tcam_valid, .tcam_hit, .tcam_hop, .tcam_class,
    .out_valid, .out_hop, .out_src, .out_class
  );

endmodule
