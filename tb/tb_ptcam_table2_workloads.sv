// tb_ptcam_table2_workloads: the engine at full size, loaded with tables of
// the sizes of three backbone routing tables (AADS, Mae-West, PAIX).
//
// For each table the route counts are those published for it: total
// prefixes, number of 16-bit segments in use, and prefixes longer than 24.
// The prefixes themselves are synthetic: each segment gets a default hop and
// a few prefixes of length 17..24 that share their upper bits around a random
// base (real tables are clustered this way), most next hops below 16 and some
// segments with 8-bit hops. The long prefixes are spread evenly over the four
// TCAM classes (lengths 31-32, 29-30, 27-28, 25-26 in TCAM 0..3), nested
// under compact prefixes, never overlapping inside one class.
// The testbench checks that each table fits (NHA bytes within the 256 KB the
// 16-bit Npointer spans, at most 128 entries per TCAM), then runs lookups
// and compares every next hop with a longest-prefix match over the segment's
// routes. Each table is loaded after a reset; memories are rewritten.
module tb_ptcam_table2_workloads;
  import ptcam_pkg::*;
  import ptcam_tb_pkg::*;

  localparam int NLOOKUP  = 10000;
  localparam int WATCHDOG = 2_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, in_ready;
  ip_t         in_ip = '0;
  logic        out_valid;
  hop_t        out_hop;
  hop_src_e    out_src;
  logic [1:0]  out_class;
  logic        seg_wr_en = 1'b0, adh_wr_en = 1'b0, nha_wr_en = 1'b0, tcam_wr_en = 1'b0;
  logic [15:0] seg_wr_addr = '0, adh_wr_addr = '0, nha_wr_addr = '0;
  seg_entry_t  seg_wr_data = '0;
  hop_t        adh_wr_data = '0, tcam_wr_hop = '0;
  logic [3:0]  nha_wr_be = 4'hF;
  logic [31:0] nha_wr_data = '0;
  logic [1:0]  tcam_wr_tcam = '0;
  logic [6:0]  tcam_wr_addr = '0;
  ip_t         tcam_wr_prefix = '0;
  logic [5:0]  tcam_wr_len = '0;
  logic        tcam_wr_valid = 1'b0;

  ptcam_lookup_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  route_q_t    seg_routes[int];    // all routes of a segment, compact and long
  route_q_t    cls[4];
  int          used_segs[$];
  int unsigned nha_next;

  function automatic hop_t base_hop(int seg);
    return hop_t'(seg * 7 + 3);
  endfunction

  typedef struct { ip_t ip; int hop; int issue; } exp_t;
  exp_t exp_q[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic exp_t e = exp_q.pop_front();
      checks += 2;
      if (int'(out_hop) != e.hop) begin
        failures++; $display("FAIL ip=%h hop=%0d expected %0d", e.ip, out_hop, e.hop);
      end
      if (cyc - e.issue + 1 != 3) begin failures++; $display("FAIL latency"); end
    end
  end

  task automatic run_table(string name, int n_prefix, int n_seg, int n_long);
    int n_compact = n_prefix - n_long - n_seg;   // beyond one default per segment
    int placed_long = 0, tries = 0;
    seg_entry_t se; hop_t adh; byte_q_t nb;
    seg_routes.delete();
    used_segs.delete();
    for (int c = 0; c < 4; c++) cls[c].delete();
    nha_next = 4;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 65536; s++) begin
      seg_wr_en = 1; seg_wr_addr = 16'(s); seg_wr_data = '0;
      adh_wr_en = 1; adh_wr_addr = 16'(s); adh_wr_data = base_hop(s);
      @(negedge clk);
    end
    seg_wr_en = 0; adh_wr_en = 0;
    // compact prefixes
    for (int n = 0; n < n_seg; n++) begin
      automatic route_q_t rs;
      automatic int s;
      automatic int nr = n_compact / n_seg + ((n < n_compact % n_seg) ? 1 : 0);
      automatic bit wide = ($urandom_range(9) == 0);
      automatic logic [7:0] base = 8'($urandom());
      automatic int free = $urandom_range(2, 7);   // low bits 17..24 that vary
      do s = $urandom_range(65535); while (seg_routes.exists(s));
      rs.push_back('{ip_t'({16'(s), 16'h0}), 16, wide ? $urandom_range(16, 255) : $urandom_range(15)});
      for (int r = 0; r < nr; r++) begin
        automatic int  len = $urandom_range(0, 2) != 0 ? 24 : $urandom_range(25 - free, 24);
        automatic logic [7:0] b = base ^ (8'($urandom()) & 8'((1 << free) - 1));
        automatic ip_t p = {16'(s), b, 8'h00} & ~(32'hFFFF_FFFF >> len);
        automatic bit dup = 0;
        foreach (rs[i]) if (rs[i].len == len && rs[i].prefix == p) dup = 1;
        if (dup) r--;
        else rs.push_back('{p, len, wide ? $urandom_range(255) : $urandom_range(15)});
      end
      build_segment(rs, nha_next, se, adh, nb);
      @(negedge clk);
      seg_wr_en = 1; seg_wr_addr = 16'(s); seg_wr_data = se;
      adh_wr_en = 1; adh_wr_addr = 16'(s); adh_wr_data = adh;
      for (int w = 0; w < nb.size() / 4; w++) begin
        @(negedge clk);
        seg_wr_en = 0; adh_wr_en = 0;
        nha_wr_en = 1; nha_wr_addr = 16'(nha_next / 4 + w);
        nha_wr_data = {nb[4*w+3], nb[4*w+2], nb[4*w+1], nb[4*w]};
      end
      @(negedge clk);
      seg_wr_en = 0; adh_wr_en = 0; nha_wr_en = 0;
      nha_next += nb.size();
      seg_routes[s] = rs;
      used_segs.push_back(s);
    end
    // long prefixes, one class after another
    while (placed_long < n_long && tries < 100 * n_long) begin
      automatic int c = placed_long % 4;
      automatic int len = 32 - 2 * c - $urandom_range(1);
      automatic int s = used_segs[$urandom_range(used_segs.size() - 1)];
      automatic route_t r = seg_routes[s][$urandom_range(seg_routes[s].size() - 1)];
      automatic ip_t m = ~(32'hFFFF_FFFF >> r.len);
      automatic ip_t p = ((r.prefix & m) | ($urandom() & ~m)) & ~(32'hFFFF_FFFF >> len);
      automatic bit ok = (cls[c].size() < 128);
      tries++;
      foreach (cls[c][i])
        if (prefix_covers(cls[c][i].prefix, (len < cls[c][i].len) ? len : cls[c][i].len, p)) ok = 0;
      if (ok) begin
        automatic int h = $urandom_range(255);
        @(negedge clk);
        tcam_wr_en = 1; tcam_wr_tcam = 2'(c); tcam_wr_addr = 7'(cls[c].size());
        tcam_wr_prefix = p; tcam_wr_len = 6'(len); tcam_wr_valid = 1; tcam_wr_hop = hop_t'(h);
        @(negedge clk);
        tcam_wr_en = 0;
        cls[c].push_back('{p, len, h});
        seg_routes[s].push_back('{p, len, h});
        placed_long++;
      end
    end
    $display("%s: %0d segments, %0d prefixes, %0d long; NHA %0d bytes of 262144; TCAM %0d/%0d/%0d/%0d",
             name, n_seg, n_prefix, placed_long, nha_next, cls[0].size(), cls[1].size(),
             cls[2].size(), cls[3].size());
    checks++;
    if (nha_next > 262144) begin failures++; $display("FAIL %s: NHA does not fit", name); end
    checks++;
    if (placed_long != n_long) begin failures++; $display("FAIL %s: long prefixes not placed", name); end
    // lookups, back to back
    for (int i = 0; i < NLOOKUP; i++) begin
      automatic int s = used_segs[$urandom_range(used_segs.size() - 1)];
      automatic route_t r = seg_routes[s][$urandom_range(seg_routes[s].size() - 1)];
      automatic ip_t m = ~(32'hFFFF_FFFF >> r.len);
      automatic ip_t ip = (i % 20 == 19) ? $urandom() : ((r.prefix & m) | ($urandom() & ~m));
      automatic int bl, h;
      automatic int sg = int'(ip[31:16]);
      automatic route_q_t rq;
      if (seg_routes.exists(sg)) rq = seg_routes[sg];
      h = (rq.size() != 0) ? lpm_lookup(rq, ip, bl) : -1;
      if (h < 0) h = int'(base_hop(sg));
      @(negedge clk);
      in_valid = 1; in_ip = ip;
      exp_q.push_back('{ip, h, cyc + 1});
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %s: results missing", name); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_table("AADS",     33931, 5813, 431);
    run_table("Mae-West", 37523, 6126, 433);
    run_table("PAIX",     18569, 3571, 443);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
