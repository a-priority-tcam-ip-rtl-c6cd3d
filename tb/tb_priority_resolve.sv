// tb_priority_resolve: self-checking test of priority_resolve.
//
// Runs every pattern of TCAM hits with random matched addresses and checks
// that the lowest-numbered hitting TCAM wins and that the associated-memory
// address is {TCAM number, its entry address}.
module tb_priority_resolve;

  localparam int NT = 4, AW = 7, TW = 2;

  logic [NT-1:0]         hit;
  logic [NT-1:0][AW-1:0] addr;
  logic                  any_hit;
  logic [TW-1:0]         sel;
  logic [TW+AW-1:0]      mem_addr;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  priority_resolve #(.NT(NT), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 200; rep++)
      for (int h = 0; h < 2**NT; h++) begin
        automatic int win = -1;
        hit = NT'(h);
        for (int t = 0; t < NT; t++) addr[t] = AW'($urandom());
        for (int t = NT - 1; t >= 0; t--) if (h & (1 << t)) win = t;
        #1;
        checks++;
        if (any_hit != (win >= 0)) begin failures++; $display("FAIL any_hit %b", hit); end
        if (win >= 0) begin
          checks += 2;
          if (int'(sel) != win) begin failures++; $display("FAIL sel %b -> %0d", hit, sel); end
          if (int'(mem_addr) != win * (1 << AW) + int'(addr[win])) begin
            failures++; $display("FAIL mem_addr %b -> %h", hit, mem_addr);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
