// tb_seg_table: self-checking test of seg_table.
//
// Writes random words to random addresses while keeping a reference copy,
// then reads them back and checks the one-cycle read latency, that the output
// holds while no read is requested, and that a read colliding with a write
// of the same address returns the old contents.
module tb_seg_table;
  import ptcam_pkg::*;

  localparam int AW = 16;
  localparam int NW = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  seg_entry_t         rd_data, wr_data;

  seg_table #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  seg_entry_t ref_mem [int];

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, seg_entry_t got, seg_entry_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int unsigned a;
    wr_data = '0;
    // fill
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      a = $urandom_range(2**AW - 1);
      wr_en = 1; wr_addr = AW'(a); wr_data = seg_entry_t'($urandom());
      ref_mem[int'(a)] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // read back every written address, back to back
    foreach (ref_mem[k]) begin
      rd_en = 1; rd_addr = AW'(k);
      @(negedge clk);
      check("read", rd_data, ref_mem[k]);
    end
    // output holds without rd_en
    begin
      automatic seg_entry_t last = rd_data;
      rd_en = 0; rd_addr = rd_addr + 1'b1;
      repeat (3) @(negedge clk);
      check("hold", rd_data, last);
    end
    // read-first collision
    foreach (ref_mem[k]) begin
      rd_en = 1; rd_addr = AW'(k); wr_en = 1; wr_addr = AW'(k);
      wr_data = $bits(wr_data)'(~ref_mem[k]);
      @(negedge clk);
      check("collision old data", rd_data, ref_mem[k]);
      ref_mem[k] = wr_data;
      wr_en = 0;
      @(negedge clk);
      check("collision new data", rd_data, ref_mem[k]);
      if (checks > 2 * NW) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
