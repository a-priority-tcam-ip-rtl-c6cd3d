// tb_nha_mem: self-checking test of nha_mem.
//
// Writes random 32-bit words with random byte enables to random addresses,
// keeping a reference copy (bytes not enabled keep their old value), then
// reads every touched word back and checks the one-cycle read latency and
// that the output holds while no read is requested.
module tb_nha_mem;
  import ptcam_pkg::*;

  localparam int AW = 16;
  localparam int NW = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [3:0]    wr_be = '0;
  logic [31:0]   rd_data, wr_data = '0;

  nha_mem #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned a;
    // first a full-word write of every address that will be used
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      a = $urandom_range(2**AW - 1);
      wr_en = 1; wr_addr = AW'(a); wr_be = 4'hF; wr_data = $urandom();
      ref_mem[int'(a)] = wr_data;
    end
    // then partial writes over them
    foreach (ref_mem[k]) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(k); wr_be = 4'($urandom()); wr_data = $urandom();
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) ref_mem[k][8*b +: 8] = wr_data[8*b +: 8];
    end
    @(negedge clk);
    wr_en = 0;
    foreach (ref_mem[k]) begin
      rd_en = 1; rd_addr = AW'(k);
      @(negedge clk);
      checks++;
      if (rd_data !== ref_mem[k]) begin
        failures++; $display("FAIL word %h: got %h expected %h", k, rd_data, ref_mem[k]);
      end
    end
    begin
      automatic logic [31:0] last = rd_data;
      rd_en = 0; rd_addr = rd_addr + 1'b1;
      repeat (3) @(negedge clk);
      checks++;
      if (rd_data !== last) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
