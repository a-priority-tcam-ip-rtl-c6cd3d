// tb_compact_lookup: self-checking test of the compact lookup.
//
// Gives every segment a default hop, then builds random segments (routes of
// length 17..24, next hops below 16 for 4-bit arrays or up to 255 for 8-bit
// arrays, some segments with a default route only) with the table
// construction procedure, loads segment words, default hops and NHA words,
// and compares lookups with a longest-prefix match over the routes.
// It checks the 2-cycle latency at one lookup per cycle and that each kind of
// result (default-only segment, common-bit mismatch, 4-bit and 8-bit array)
// occurred.
module tb_compact_lookup;
  import ptcam_pkg::*;
  import ptcam_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0;
  ip_t         in_ip = '0;
  logic        out_valid;
  hop_t        out_hop;
  hop_src_e    out_src;
  logic        seg_wr_en = 1'b0, adh_wr_en = 1'b0, nha_wr_en = 1'b0;
  logic [15:0] seg_wr_addr = '0, adh_wr_addr = '0, nha_wr_addr = '0;
  seg_entry_t  seg_wr_data = '0;
  hop_t        adh_wr_data = '0;
  logic [3:0]  nha_wr_be = 4'hF;
  logic [31:0] nha_wr_data = '0;

  compact_lookup dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int cnt_src[4];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  route_q_t routes;
  int unsigned nha_next = 4;

  function automatic hop_t base_hop(int seg);
    return hop_t'(seg ^ (seg >> 8));
  endfunction

  typedef struct { int hop; int issue; ip_t ip; } exp_t;
  exp_t exp_q[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      automatic exp_t e = exp_q.pop_front();
      checks += 2;
      if (int'(out_hop) != e.hop) begin
        failures++; $display("FAIL ip=%h hop=%0d expected %0d (%s)", e.ip, out_hop, e.hop, out_src.name());
      end
      if (cyc - e.issue + 1 != 2) begin failures++; $display("FAIL latency %0d", cyc - e.issue + 1); end
      cnt_src[int'(out_src) % 4]++;
    end
  end

  initial begin
    seg_entry_t se; hop_t adh; byte_q_t nb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 65536; s++) begin
      @(negedge clk);
      seg_wr_en = 1; seg_wr_addr = 16'(s); seg_wr_data = '0;
      adh_wr_en = 1; adh_wr_addr = 16'(s); adh_wr_data = base_hop(s);
    end
    for (int n = 0; n < 40; n++) begin
      automatic route_q_t rs;
      automatic int s = (n * 1103 + 77) % 65536;
      automatic int wide = n % 2;
      automatic int nr = (n % 5 == 0) ? 0 : $urandom_range(1, 7);
      rs.push_back('{ip_t'({16'(s), 16'h0}), 16, wide ? $urandom_range(255) : $urandom_range(15)});
      for (int r = 0; r < nr; r++) begin
        automatic int len = $urandom_range(17, 24);
        automatic ip_t p = {16'(s), 16'($urandom())} & ~(32'hFFFF_FFFF >> len);
        automatic bit dup = 0;
        foreach (rs[i]) if (rs[i].len == len && rs[i].prefix == p) dup = 1;
        if (!dup) rs.push_back('{p, len, wide ? $urandom_range(255) : $urandom_range(15)});
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
      nha_next += nb.size();
      foreach (rs[i]) routes.push_back(rs[i]);
    end
    @(negedge clk);
    seg_wr_en = 0; adh_wr_en = 0; nha_wr_en = 0;
    for (int i = 0; i < 20000; i++) begin
      automatic route_t r = routes[$urandom_range(routes.size() - 1)];
      automatic ip_t m = ~(32'hFFFF_FFFF >> r.len);
      automatic ip_t ip = (i % 10 == 9) ? $urandom() : ((r.prefix & m) | ($urandom() & ~m));
      automatic int bl;
      automatic int h = lpm_lookup(routes, ip, bl);
      if (h < 0) h = int'(base_hop(int'(ip[31:16])));
      @(negedge clk);
      in_valid = 1; in_ip = ip;
      exp_q.push_back('{h, cyc + 1, ip});
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    $display("adh_only=%0d mismatch=%0d nha4=%0d nha8=%0d", cnt_src[0], cnt_src[1], cnt_src[2], cnt_src[3]);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cnt_src[i] == 0) begin failures++; $display("FAIL source %0d never seen", i); end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
