// tcam: one TCAM of the priority TCAM block.
//
// Each of the N entries holds a prefix register and a mask register; the mask
// is derived from the prefix length when the entry is written (mask bit = 1
// for the first len address bits). Per address bit a 3-input comparator
// passes when the mask bit is 0 or the prefix bit equals the address bit, and
// the bit results are ANDed into the entry's match line. The address
// generator turns the match lines into the matched entry address.
// Routes are placed so that at most one entry of a TCAM can match any
// destination; the address generator therefore simply ORs the indices of the
// matching lines, and an assertion checks the one-match rule.
//
// SLICE_W sets how many address bits each entry compares per clock:
//   32 (default): all 32 comparators per entry, search in the same cycle:
//        search_done = search_start, hit/match_addr combinational from
//        search_ip, search_busy stays 0.
//   8 (or 16): only SLICE_W comparators per entry, reused over 32/SLICE_W
//        clocks, most significant slice first, with a running match flag
//        per entry. search_start (while !search_busy) samples search_ip and
//        compares slice 0; the remaining slices follow on the next clocks,
//        and search_done is high for one cycle after the last slice, with
//        hit/match_addr valid in that cycle. This trades search time for
//        comparator count (a quarter of them at SLICE_W = 8).
// Entry layout, comparators, AND, address generator and the sliced option
// follow the scheme. The per-entry valid bit (so that empty entries never
// match), the write port, the start/done handshake and the entry count
// default of 128 are this design's choices. Writes take effect on the clock
// edge; reset clears every valid bit and any search in progress.
module tcam
  import ptcam_pkg::*;
#(
  parameter int unsigned N       = 128,              // entries in this TCAM
  parameter int unsigned AW      = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned SLICE_W = IP_W              // bits compared per clock
) (
  input  logic             clk,
  input  logic             rst_n,
  // entry write
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  ip_t              wr_prefix,
  input  logic [LEN_W-1:0] wr_len,
  input  logic             wr_valid,   // 0 removes the entry
  // search
  input  logic             search_start,
  input  ip_t              search_ip,
  output logic             search_busy,
  output logic             search_done,
  output logic             hit,
  output logic [AW-1:0]    match_addr
);

  localparam int unsigned NSL = IP_W / SLICE_W;     // clocks per search

  ip_t          prefix_q [N];
  ip_t          mask_q   [N];
  logic [N-1:0] valid_q;
  logic [N-1:0] match_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      prefix_q[wr_addr] <= wr_prefix;
      mask_q[wr_addr]   <= len_to_mask(wr_len);
    end
  end

  if (NSL == 1) begin : g_full
    // comparators and AND per entry, whole address at once
    always_comb begin
      for (int e = 0; e < N; e++)
        match_line[e] = valid_q[e] & (&(~mask_q[e] | ~(prefix_q[e] ^ search_ip)));
    end
    assign search_done = search_start;
    assign search_busy = 1'b0;

  end else begin : g_sliced
    localparam int unsigned CW = $clog2(NSL + 1);
    ip_t                  ip_q;
    logic [CW-1:0]        step_q;       // slice compared in this cycle while busy
    logic                 busy_q, done_q;
    logic [N-1:0]         acc_q;        // running match per entry
    logic [N-1:0]         slice_match;
    logic [SLICE_W-1:0]   cur_slice;
    logic [CW-1:0]        cur_step;

    always_comb begin
      cur_step  = busy_q ? step_q : '0;
      cur_slice = busy_q ? ip_q[IP_W-1 - int'(step_q)*SLICE_W -: SLICE_W]
                         : search_ip[IP_W-1 -: SLICE_W];
      for (int e = 0; e < N; e++)
        slice_match[e] = &(~mask_q[e][IP_W-1 - int'(cur_step)*SLICE_W -: SLICE_W] |
                           ~(prefix_q[e][IP_W-1 - int'(cur_step)*SLICE_W -: SLICE_W] ^ cur_slice));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy_q <= 1'b0;
        done_q <= 1'b0;
        step_q <= '0;
        acc_q  <= '0;
        ip_q   <= '0;
      end else begin
        done_q <= 1'b0;
        if (busy_q) begin
          acc_q  <= acc_q & slice_match;
          step_q <= step_q + 1'b1;
          if (step_q == CW'(NSL - 1)) begin
            busy_q <= 1'b0;
            done_q <= 1'b1;
          end
        end else if (search_start) begin
          ip_q   <= search_ip;
          acc_q  <= valid_q & slice_match;
          step_q <= CW'(1);
          busy_q <= 1'b1;
        end
      end
    end

    assign match_line  = acc_q;
    assign search_done = done_q;
    assign search_busy = busy_q;
  end

  // address generator
  always_comb begin
    match_addr = '0;
    for (int e = 0; e < N; e++)
      if (match_line[e]) match_addr = match_addr | AW'(e);
    hit = |match_line;
  end

  a_one_match: assert property (@(posedge clk) disable iff (!rst_n)
                                search_done |-> $onehot0(match_line))
    else $error("tcam: more than one entry matches");

endmodule
