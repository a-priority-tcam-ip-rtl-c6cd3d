// tb_route_selector: self-checking test of route_selector.
//
// Drives random compact-lookup and TCAM results in lockstep and checks, one
// clock later, that a TCAM hit wins (source SRC_TCAM and its class), that
// otherwise the compact result and its source pass through, and that the
// output valid follows the input valid.
module tb_route_selector;
  import ptcam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cmp_valid = 1'b0, tcam_valid = 1'b0, tcam_hit = 1'b0;
  hop_t     cmp_hop = '0, tcam_hop = '0;
  hop_src_e cmp_src = SRC_ADH_ONLY;
  logic [1:0] tcam_class = '0;
  logic     out_valid;
  hop_t     out_hop;
  hop_src_e out_src;
  logic [1:0] out_class;

  route_selector #(.TW(2)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_tcam = 0, n_cmp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      bit v, h; hop_t ch, th; hop_src_e cs; logic [1:0] tc;
      v = ($urandom_range(3) != 0); h = $urandom_range(1);
      ch = hop_t'($urandom()); th = hop_t'($urandom());
      cs = hop_src_e'($urandom_range(3)); tc = 2'($urandom());
      @(negedge clk);
      cmp_valid = v; tcam_valid = v; tcam_hit = h;
      cmp_hop = ch; tcam_hop = th; cmp_src = cs; tcam_class = tc;
      @(negedge clk);
      checks++;
      if (out_valid != v) begin failures++; $display("FAIL valid"); end
      if (v) begin
        checks++;
        if (h) begin
          n_tcam++;
          if (out_hop != th || out_src != SRC_TCAM || out_class != tc) begin
            failures++; $display("FAIL tcam pick %0d %s", out_hop, out_src.name());
          end
        end else begin
          n_cmp++;
          if (out_hop != ch || out_src != cs) begin
            failures++; $display("FAIL compact pick %0d %s", out_hop, out_src.name());
          end
        end
      end
      cmp_valid = 0; tcam_valid = 0;
    end
    checks++;
    if (n_tcam == 0 || n_cmp == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
