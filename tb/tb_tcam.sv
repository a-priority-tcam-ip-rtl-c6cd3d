// tb_tcam: self-checking test of one TCAM.
//
// Loads non-overlapping prefixes (lengths 1, 32 and random 8..32; the stored
// prefix keeps random bits beyond its length, which the mask must hide) at
// every entry, searches random addresses inside and outside them, and
// compares hit and matched address with a reference that tests each stored
// prefix bit by bit. Then removes entries and checks they no longer match,
// and checks that reset empties the TCAM.
// Two TCAMs receive the same writes: one comparing all 32 bits at once
// (answer in the search cycle) and one comparing 8 bits per clock (answer
// with search_done exactly four clocks after search_start, busy meanwhile,
// while the search address input has already moved on).
module tb_tcam;
  import ptcam_pkg::*;

  localparam int N  = 32;
  localparam int AW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_en = 1'b0, wr_valid = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  ip_t           wr_prefix = '0, search_ip = '0;
  logic [5:0]    wr_len = '0;
  logic          hit;
  logic [AW-1:0] match_addr;
  logic          search_start = 1'b0;
  logic          f_busy, f_done;
  logic          s_busy, s_done, s_hit;
  logic [AW-1:0] s_addr;

  tcam #(.N(N), .AW(AW)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_prefix, .wr_len, .wr_valid,
    .search_start, .search_ip, .search_busy(f_busy), .search_done(f_done),
    .hit, .match_addr
  );

  tcam #(.N(N), .AW(AW), .SLICE_W(8)) dut_sliced (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_prefix, .wr_len, .wr_valid,
    .search_start, .search_ip, .search_busy(s_busy), .search_done(s_done),
    .hit(s_hit), .match_addr(s_addr)
  );

  int checks = 0, failures = 0;
  ip_t ref_p [N];
  int  ref_l [N];
  bit  ref_v [N];

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit covers(ip_t p, int l, ip_t ip);
    for (int b = 1; b <= l; b++) if (p[32 - b] != ip[32 - b]) return 0;
    return 1;
  endfunction

  task automatic search_check(ip_t ip);
    int exp_hit = 0, exp_addr = 0;
    @(negedge clk);
    search_ip = ip;
    search_start = 1;
    #1;
    for (int e = 0; e < N; e++)
      if (ref_v[e] && covers(ref_p[e], ref_l[e], ip)) begin exp_hit = 1; exp_addr = e; end
    checks++;
    if (int'(hit) != exp_hit || (exp_hit && int'(match_addr) != exp_addr) || !f_done || f_busy) begin
      failures++;
      $display("FAIL ip=%h hit=%0d addr=%0d expected %0d/%0d", ip, hit, match_addr, exp_hit, exp_addr);
    end
    begin
      int n = 0;
      @(negedge clk);                        // start sampled on this edge
      search_start = 0;
      search_ip = $urandom();                // the sliced TCAM must hold its copy
      while (!s_done && n < 10) begin
        checks++;
        if (!s_busy) begin failures++; $display("FAIL sliced not busy"); end
        @(negedge clk);
        n++;
      end
      checks++;
      if (n != 3 || int'(s_hit) != exp_hit || (exp_hit && int'(s_addr) != exp_addr)) begin
        failures++;
        $display("FAIL sliced ip=%h hit=%0d addr=%0d after %0d, expected %0d/%0d",
                 ip, s_hit, s_addr, n + 1, exp_hit, exp_addr);
      end
    end
    search_start = 0;
  endtask

  task automatic write(int a, ip_t p, int l, bit v);
    @(negedge clk);
    wr_en = 1; wr_addr = AW'(a); wr_prefix = p; wr_len = 6'(l); wr_valid = v;
    @(negedge clk);
    wr_en = 0;
    ref_p[a] = p; ref_l[a] = l; ref_v[a] = v;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < N; e++) ref_v[e] = 0;
    search_check($urandom());                   // empty after reset
    // fill with non-overlapping prefixes
    for (int e = 0; e < N; e++) begin
      ip_t p; int l; bit ok;
      do begin
        l = (e == 0) ? 32 : (e == 1) ? 1 : $urandom_range(8, 32);
        p = $urandom();
        ok = 1;
        for (int f = 0; f < e; f++)
          if (covers(ref_p[f], (l < ref_l[f]) ? l : ref_l[f], p)) ok = 0;
      end while (!ok);
      write(e, p, l, 1'b1);   // stored prefix keeps its random tail bits
    end
    for (int i = 0; i < 20000; i++) begin
      automatic int e = $urandom_range(N - 1);
      automatic ip_t m = ~(32'hFFFF_FFFF >> ref_l[e]);
      if (i % 4 == 3) search_check($urandom());
      else            search_check((ref_p[e] & m) | ($urandom() & ~m));
    end
    // remove half the entries
    for (int e = 0; e < N; e += 2) write(e, ref_p[e], ref_l[e], 1'b0);
    for (int i = 0; i < 4000; i++) begin
      automatic int e = $urandom_range(N - 1);
      automatic ip_t m = ~(32'hFFFF_FFFF >> ref_l[e]);
      search_check((ref_p[e] & m) | ($urandom() & ~m));
    end
    // reset clears every entry
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int e = 0; e < N; e++) ref_v[e] = 0;
    for (int e = 0; e < N; e++) search_check(ref_p[e]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
