// tb_priority_tcam: self-checking test of the priority TCAM block.
//
// Places random long prefixes in the four TCAMs by length class (31-32,
// 29-30, 27-28, 25-26 in TCAM 0..3), never two overlapping ones in one TCAM,
// often nesting a longer prefix inside a shorter one of another class. It
// searches addresses back to back and compares hit, class and next hop with
// a longest-prefix match over the stored routes, checks the 2-cycle latency,
// and counts searches where several TCAMs matched (that must happen).
// A second block with sliced TCAMs (8 bits per clock) gets the same entries;
// its searches are issued whenever search_ready allows, and its results are
// checked the same way, with a latency of 6 clocks and at most one search
// accepted per four clocks.
module tb_priority_tcam;
  import ptcam_pkg::*;
  import ptcam_tb_pkg::*;

  localparam int NT = 4, N = 16, AW = 4, TW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          search_valid = 1'b0;
  ip_t           search_ip = '0;
  logic          out_valid, out_hit;
  logic [TW-1:0] out_class;
  hop_t          out_hop;
  logic          wr_en = 1'b0, wr_valid = 1'b0;
  logic [TW-1:0] wr_tcam = '0;
  logic [AW-1:0] wr_addr = '0;
  ip_t           wr_prefix = '0;
  logic [5:0]    wr_len = '0;
  hop_t          wr_hop = '0;

  logic          search_ready;
  priority_tcam #(.NT(NT), .N(N)) dut (.*);

  logic          s_valid = 1'b0, s_ready, s_out_valid, s_out_hit;
  logic [TW-1:0] s_out_class;
  hop_t          s_out_hop;
  priority_tcam #(.NT(NT), .N(N), .SLICE_W(8)) dut_sliced (
    .clk, .rst_n, .search_valid(s_valid), .search_ip, .search_ready(s_ready),
    .out_valid(s_out_valid), .out_hit(s_out_hit), .out_class(s_out_class), .out_hop(s_out_hop),
    .wr_en, .wr_tcam, .wr_addr, .wr_prefix, .wr_len, .wr_valid, .wr_hop
  );

  int checks = 0, failures = 0, cyc = 0, multi = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  route_q_t all, cls[NT];

  task automatic try_add(ip_t p, int len, int hop);
    int c = (32 - len) / 2;
    foreach (cls[c][i])
      if (prefix_covers(cls[c][i].prefix, (len < cls[c][i].len) ? len : cls[c][i].len, p)) return;
    if (cls[c].size() >= N) return;
    @(negedge clk);
    wr_en = 1; wr_tcam = TW'(c); wr_addr = AW'(cls[c].size());
    wr_prefix = p; wr_len = 6'(len); wr_valid = 1; wr_hop = hop_t'(hop);
    @(negedge clk);
    wr_en = 0;
    cls[c].push_back('{p, len, hop});
    all.push_back('{p, len, hop});
  endtask

  typedef struct { int hop; int cls; int issue; } exp_t;
  exp_t exp_q[$], sexp_q[$];
  int last_accept = -100, s_results = 0;

  always @(negedge clk) begin
    if (rst_n && s_out_valid) begin
      automatic exp_t e = sexp_q.pop_front();
      s_results++;
      checks++;
      if ((e.hop >= 0) != s_out_hit || (s_out_hit && (int'(s_out_hop) != e.hop || int'(s_out_class) != e.cls))) begin
        failures++;
        $display("FAIL sliced hit=%0d hop=%0d class=%0d expected hop %0d class %0d", s_out_hit, s_out_hop, s_out_class, e.hop, e.cls);
      end
      checks++;
      if (cyc - e.issue + 1 != 6) begin failures++; $display("FAIL sliced latency %0d", cyc - e.issue + 1); end
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic exp_t e = exp_q.pop_front();
      checks++;
      if ((e.hop >= 0) != out_hit || (out_hit && (int'(out_hop) != e.hop || int'(out_class) != e.cls))) begin
        failures++;
        $display("FAIL hit=%0d hop=%0d class=%0d expected hop %0d class %0d", out_hit, out_hop, out_class, e.hop, e.cls);
      end
      checks++;
      if (cyc - e.issue + 1 != 2) begin failures++; $display("FAIL latency %0d", cyc - e.issue + 1); end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      automatic int  len = $urandom_range(25, 32);
      automatic ip_t p = $urandom() & ~(32'hFFFF_FFFF >> len);
      automatic int  l2 = $urandom_range(25, 32);
      try_add(p, len, $urandom_range(255));
      if (l2 > len && (32 - l2) / 2 != (32 - len) / 2)
        try_add((p | ($urandom() & (32'hFFFF_FFFF >> len))) & ~(32'hFFFF_FFFF >> l2), l2, $urandom_range(255));
    end
    for (int i = 0; i < 20000; i++) begin
      automatic route_t r = all[$urandom_range(all.size() - 1)];
      automatic ip_t m = ~(32'hFFFF_FFFF >> r.len);
      automatic ip_t ip = (i % 5 == 4) ? $urandom() : ((r.prefix & m) | ($urandom() & ~m));
      automatic int bl, nm = 0;
      automatic int h = lpm_lookup(all, ip, bl);
      foreach (all[j]) if (prefix_covers(all[j].prefix, all[j].len, ip)) nm++;
      if (nm > 1) multi++;
      @(negedge clk);
      search_valid = ($urandom_range(7) != 0);
      search_ip = ip;
      if (search_valid) exp_q.push_back('{h, (32 - bl) / 2, cyc + 1});
    end
    @(negedge clk);
    search_valid = 0;
    repeat (4) @(negedge clk);
    // sliced block: issue whenever it is ready
    for (int i = 0; i < 4000; i++) begin
      automatic route_t r = all[$urandom_range(all.size() - 1)];
      automatic ip_t m = ~(32'hFFFF_FFFF >> r.len);
      automatic ip_t ip = (i % 5 == 4) ? $urandom() : ((r.prefix & m) | ($urandom() & ~m));
      automatic int bl;
      automatic int h = lpm_lookup(all, ip, bl);
      @(negedge clk);
      s_valid = 0;
      while (!s_ready) @(negedge clk);
      s_valid = 1;
      search_ip = ip;
      checks++;
      if (cyc + 1 - last_accept < 4) begin failures++; $display("FAIL sliced accepted too early"); end
      last_accept = cyc + 1;
      sexp_q.push_back('{h, (32 - bl) / 2, cyc + 1});
    end
    @(negedge clk);
    s_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (s_results != 4000 || sexp_q.size() != 0) begin failures++; $display("FAIL sliced results %0d", s_results); end
    checks++;
    if (multi == 0 || exp_q.size() != 0) begin failures++; $display("FAIL multi=%0d left=%0d", multi, exp_q.size()); end
    $display("searches with several TCAMs matching: %0d", multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
