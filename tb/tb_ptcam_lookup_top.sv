// tb_ptcam_lookup_top: end-to-end test of the lookup engine at its full
// default size (2^16 segments, 256 KB of next hop arrays, 4 x 128 TCAM
// entries).
//
// The testbench builds a routing table, loads it through the write ports and
// compares every lookup result with a plain longest-prefix match over the
// route list. The table holds the worked 192.168 segment of the scheme (its
// segment word and NHA bytes are checked against the published values),
// random segments with 4-bit and 8-bit next hop arrays, segments with only a
// default route, and long prefixes spread over the four TCAM classes
// (lengths 31-32, 29-30, 27-28 and 25-26 in TCAM 0..3). Every one of the
// 2^16 segments gets a default hop first.
// It checks each next hop, its source (TCAM or compact lookup), the latency
// (3 clocks), back-to-back throughput, and a run-time route update (a TCAM entry
// added and another removed). It counts how often each mechanism occurred:
// default-only segment, common-bit mismatch, 4-bit NHA, 8-bit NHA, TCAM hit
// overriding a compact route, several TCAMs matching at once; a mechanism
// never seen counts as a failure.
module tb_ptcam_lookup_top;
  import ptcam_pkg::*;
  import ptcam_tb_pkg::*;

  localparam int NSEG_RAND = 60;
  localparam int NLOOKUP   = 20000;
  localparam int WATCHDOG  = 600_000;
  localparam int LAT       = 3;        // clocks from input to result

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  ip_t         in_ip = '0;
  logic        in_ready;
  logic        out_valid;
  hop_t        out_hop;
  hop_src_e    out_src;
  logic [1:0]  out_class;
  logic        seg_wr_en = 1'b0;
  logic [15:0] seg_wr_addr = '0;
  seg_entry_t  seg_wr_data = '0;
  logic        adh_wr_en = 1'b0;
  logic [15:0] adh_wr_addr = '0;
  hop_t        adh_wr_data = '0;
  logic        nha_wr_en = 1'b0;
  logic [15:0] nha_wr_addr = '0;
  logic [3:0]  nha_wr_be = '0;
  logic [31:0] nha_wr_data = '0;
  logic        tcam_wr_en = 1'b0;
  logic [1:0]  tcam_wr_tcam = '0;
  logic [6:0]  tcam_wr_addr = '0;
  ip_t         tcam_wr_prefix = '0;
  logic [5:0]  tcam_wr_len = '0;
  logic        tcam_wr_valid = 1'b0;
  hop_t        tcam_wr_hop = '0;

  ptcam_lookup_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- tables
  route_q_t routes;          // every explicit route
  route_q_t tcam_routes[4];  // per TCAM class
  int       tcam_used[4];
  int unsigned nha_next = 4; // byte address; 0 is reserved for "no NHA"

  function automatic hop_t base_hop(int seg);
    return hop_t'((seg * 37) ^ (seg >> 8));
  endfunction

  function automatic int class_of(int len);
    return (32 - len) / 2;
  endfunction

  task automatic write_seg(int s, seg_entry_t e, hop_t h);
    @(negedge clk);
    seg_wr_en = 1; seg_wr_addr = 16'(s); seg_wr_data = e;
    adh_wr_en = 1; adh_wr_addr = 16'(s); adh_wr_data = h;
    @(negedge clk);
    seg_wr_en = 0; adh_wr_en = 0;
  endtask

  task automatic write_nha(int unsigned byte_addr, byte_q_t b);
    for (int w = 0; w < (b.size() + 3) / 4; w++) begin
      logic [31:0] word = '0;
      for (int i = 0; i < 4; i++)
        if (4*w + i < b.size()) word[8*i +: 8] = b[4*w + i];
      @(negedge clk);
      nha_wr_en = 1; nha_wr_addr = 16'((byte_addr >> 2) + w); nha_wr_be = 4'hF;
      nha_wr_data = word;
    end
    @(negedge clk);
    nha_wr_en = 0;
  endtask

  task automatic write_tcam(int t, int a, ip_t p, int len, bit v, int hop);
    @(negedge clk);
    tcam_wr_en = 1; tcam_wr_tcam = 2'(t); tcam_wr_addr = 7'(a);
    tcam_wr_prefix = p; tcam_wr_len = 6'(len); tcam_wr_valid = v; tcam_wr_hop = hop_t'(hop);
    @(negedge clk);
    tcam_wr_en = 0;
  endtask

  // build and load the compact tables of one segment
  task automatic load_segment(int s, route_q_t rs, output seg_entry_t se, output byte_q_t nb);
    hop_t adh;
    build_segment(rs, nha_next, se, adh, nb);
    write_seg(s, se, adh);
    if (nb.size() != 0) begin
      write_nha(nha_next, nb);
      nha_next += (nb.size() + 3) / 4 * 4;
    end
    foreach (rs[i]) routes.push_back(rs[i]);
  endtask

  // add a long prefix to its TCAM class unless it overlaps one already there
  task automatic add_tcam_route(ip_t p, int len, int hop, output bit added);
    int c = class_of(len);
    added = 0;
    foreach (tcam_routes[c][i])
      if (prefix_covers(tcam_routes[c][i].prefix, (len < tcam_routes[c][i].len) ? len : tcam_routes[c][i].len, p))
        return;
    if (tcam_used[c] >= 128) return;
    write_tcam(c, tcam_used[c], p, len, 1'b1, hop);
    tcam_routes[c].push_back('{p, len, hop});
    routes.push_back('{p, len, hop});
    tcam_used[c]++;
    added = 1;
  endtask

  // ---------------------------------------------------------------- lookups
  typedef struct { ip_t ip; int hop; bit tcam; int issue; } exp_t;
  exp_t exp_q[$];
  int cnt_src[5];
  int cnt_stall = 0;   // clocks a lookup waited for in_ready
  int cnt_tcam_over_compact = 0, cnt_multi_tcam = 0, cnt_lat_ok = 0;

  function automatic int expect_hop(ip_t ip, output bit from_tcam);
    int bl;
    int h = lpm_lookup(routes, ip, bl);
    from_tcam = (bl > 24);
    if (h < 0) h = int'(base_hop(int'(ip[31:16])));
    return h;
  endfunction

  // present ip on the next clock edge that takes it
  task automatic issue(ip_t ip);
    bit ft;
    int h, nm = 0;
    while (!in_ready) begin
      cnt_stall++;
      in_valid = 0;
      @(negedge clk);
    end
    h = expect_hop(ip, ft);
    in_valid = 1; in_ip = ip;
    exp_q.push_back('{ip, h, ft, cyc + 1});
    // mechanism bookkeeping from the route list
    for (int c = 0; c < 4; c++)
      foreach (tcam_routes[c][i]) if (prefix_covers(tcam_routes[c][i].prefix, tcam_routes[c][i].len, ip)) nm++;
    if (nm > 1) cnt_multi_tcam++;
    if (ft) begin
      foreach (routes[i])
        if (routes[i].len > 16 && routes[i].len <= 24 && prefix_covers(routes[i].prefix, routes[i].len, ip)) begin
          cnt_tcam_over_compact++;
          break;
        end
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected result"); 
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (int'(out_hop) != e.hop) begin
          failures++;
          $display("FAIL ip=%h hop=%0d expected %0d (src %s)", e.ip, out_hop, e.hop, out_src.name());
        end
        checks++;
        if ((out_src == SRC_TCAM) != e.tcam) begin
          failures++; $display("FAIL ip=%h source %s", e.ip, out_src.name());
        end
        checks++;
        if (cyc - e.issue + 1 != LAT) begin
          failures++; $display("FAIL ip=%h latency %0d", e.ip, cyc - e.issue + 1);
        end else cnt_lat_ok++;
        cnt_src[int'(out_src)]++;
      end
    end
  end

  function automatic ip_t random_ip_near(const ref route_q_t rs);
    route_t r = rs[$urandom_range(rs.size() - 1)];
    ip_t m = (r.len == 0) ? '0 : ~(32'hFFFF_FFFF >> r.len);
    return (r.prefix & m) | ($urandom() & ~m);
  endfunction

  task automatic run_lookups(int n);
    for (int i = 0; i < n; i++) begin
      ip_t ip;
      int sel = $urandom_range(99);
      @(negedge clk);
      if (sel < 75)      ip = random_ip_near(routes);
      else if (sel < 90) ip = {16'hC0A8, 16'($urandom())};
      else               ip = $urandom();
      if ($urandom_range(9) == 0) begin   // occasional bubble
        in_valid = 0;
        @(negedge clk);
      end
      issue(ip);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    seg_entry_t se;
    byte_q_t    nb;
    bit         added;
    int         used_seg[int];

    repeat (3) @(negedge clk);
    rst_n = 1;

    // every segment: default hop only
    @(negedge clk);
    for (int s = 0; s < 65536; s++) begin
      seg_wr_en = 1; seg_wr_addr = 16'(s); seg_wr_data = '0;
      adh_wr_en = 1; adh_wr_addr = 16'(s); adh_wr_data = base_hop(s);
      @(negedge clk);
    end
    seg_wr_en = 0; adh_wr_en = 0;

    // the worked 192.168 segment
    begin
      route_q_t rs;
      rs.push_back('{32'hC0A8_0000, 16, 0});
      rs.push_back('{32'hC0A8_1400, 22, 1});
      rs.push_back('{32'hC0A8_5400, 22, 2});
      rs.push_back('{32'hC0A8_4400, 23, 3});
      load_segment(16'hC0A8, rs, se, nb);
      used_seg[16'hC0A8] = 1;
      checks++;
      if (se.cmarker != 6'b101011 || se.mlength != 3'd6 || se.nbit != 1'b0 ||
          (se.cprefix & se.cmarker) != 6'b000001) begin
        failures++; $display("FAIL 192.168 segment word %p", se);
      end
      checks++;
      if (nb.size() != 4 || nb[0] != 8'h00 || nb[1] != 8'h11 || nb[2] != 8'h03 || nb[3] != 8'h22) begin
        failures++; $display("FAIL 192.168 NHA %p", nb);
      end
      add_tcam_route(32'hC0A8_4410, 28, 4, added);
      add_tcam_route(32'hC0A8_4410, 32, 5, added);
    end

    // random segments
    for (int n = 0; n < NSEG_RAND; n++) begin
      route_q_t rs;
      int s, nr, wide, lmax;
      rs.delete();
      do s = $urandom_range(65535); while (used_seg.exists(s));
      used_seg[s] = 1;
      wide = (n % 3 == 0);
      nr   = (n % 7 == 0) ? 0 : $urandom_range(1, 6);
      rs.push_back('{ip_t'({16'(s), 16'h0}), 16, wide ? $urandom_range(255) : $urandom_range(15)});
      // a common high part for some segments, fully random for others
      lmax = $urandom_range(17, 24);
      for (int r = 0; r < nr; r++) begin
        automatic int len = $urandom_range(17, lmax);
        automatic ip_t p = {16'(s), 16'($urandom())};
        p = p & ~(32'hFFFF_FFFF >> len);
        rs.push_back('{p, len, wide ? $urandom_range(255) : $urandom_range(15)});
      end
      // drop duplicate prefixes of equal length (keep the first)
      for (int a = rs.size() - 1; a > 0; a--)
        for (int b = 0; b < a; b++)
          if (rs[a].len == rs[b].len && rs[a].prefix == rs[b].prefix) begin rs.delete(a); break; end
      load_segment(s, rs, se, nb);
      if (n % 2 == 0)
        for (int t = 0; t < 4; t++) begin
          automatic int len = $urandom_range(25, 32);
          automatic ip_t p = random_ip_near(rs);
          p = p & ~(32'hFFFF_FFFF >> len);
          add_tcam_route(p, len, $urandom_range(255), added);
          if (added && $urandom_range(1)) begin   // a longer one inside it
            automatic int l2 = $urandom_range(len, 32);
            if (class_of(l2) != class_of(len)) begin
              automatic ip_t p2 = (p | ($urandom() & (32'hFFFF_FFFF >> len))) & ~(32'hFFFF_FFFF >> l2);
              add_tcam_route(p2, l2, $urandom_range(255), added);
            end
          end
        end
    end
    $display("routes=%0d nha_bytes=%0d tcam=%0d/%0d/%0d/%0d", routes.size(), nha_next,
             tcam_used[0], tcam_used[1], tcam_used[2], tcam_used[3]);

    run_lookups(NLOOKUP);

    // run-time update: add a TCAM route on a hot address, remove another
    begin
      automatic ip_t p = 32'hC0A8_1404;
      add_tcam_route(p, 30, 200, added);
      checks++;
      if (!added) begin failures++; $display("FAIL update route not added"); end
      // remove the 192.168.68.16/32 entry (TCAM 0, entry 0)
      write_tcam(0, 0, 32'hC0A8_4410, 32, 1'b0, 0);
      foreach (routes[i]) if (routes[i].prefix == 32'hC0A8_4410 && routes[i].len == 32) begin
        routes.delete(i); break;
      end
      tcam_routes[0].delete(0);
      @(negedge clk); issue(32'hC0A8_1405);
      @(negedge clk); issue(32'hC0A8_4410);
      @(negedge clk); in_valid = 0;
      repeat (LAT + 4) @(negedge clk);
      run_lookups(NLOOKUP / 4);
    end

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end

    $display("sources: adh_only=%0d adh_mismatch=%0d nha4=%0d nha8=%0d tcam=%0d",
             cnt_src[0], cnt_src[1], cnt_src[2], cnt_src[3], cnt_src[4]);
    $display("tcam_over_compact=%0d multi_tcam=%0d latency_ok=%0d stalls=%0d",
             cnt_tcam_over_compact, cnt_multi_tcam, cnt_lat_ok, cnt_stall);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt_src[i] == 0) begin failures++; $display("FAIL source %0d never seen", i); end
    end
    checks++; if (cnt_tcam_over_compact == 0) begin failures++; $display("FAIL no TCAM override"); end
    checks++; if (cnt_stall != 0) begin failures++; $display("FAIL input stalled %0d times", cnt_stall); end
    checks++; if (cnt_multi_tcam == 0) begin failures++; $display("FAIL no multi-TCAM match"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
