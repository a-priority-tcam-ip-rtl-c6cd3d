// tb_logic_process_unit: self-checking test of logic_process_unit.
//
// Checks the worked 192.168 segment of the scheme (Cmarker 101011, Mlength 6:
// the index is formed from address bits 18, 20 and 23), then random segment
// words and addresses against a reference that rebuilds the index bit by bit
// from bit positions 17..24 and derives the NHA word, byte lane and nibble
// from a byte address.
module tb_logic_process_unit;
  import ptcam_pkg::*;

  seg_entry_t        seg;
  logic [7:0]        addr_17_24;
  logic              common_match, use_nha, nha_nibble;
  logic [7:0]        k;
  logic [NPTR_W-1:0] nha_word_addr;
  logic [1:0]        nha_byte;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic_process_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: seg=%h addr=%b got %0d expected %0d", what, seg, addr_17_24, got, exp);
    end
  endtask

  // reference: bit positions 17..24, bit 17 = addr_17_24[7]
  task automatic check_one();
    int kk = 0, nsel = 0, byte_addr;
    bit match = 1;
    for (int pos = 17; pos <= 22; pos++)
      if (seg.cmarker[22 - pos] && seg.cprefix[22 - pos] != addr_17_24[24 - pos]) match = 0;
    for (int pos = 17; pos <= 24; pos++)
      if (pos > 22 || !seg.cmarker[22 - pos]) begin
        kk = kk * 2 + int'(addr_17_24[24 - pos]);
        nsel++;
      end
    kk = kk / (1 << (7 - int'(seg.mlength)));
    byte_addr = int'(seg.npointer) * 4 + (seg.nbit ? kk : kk / 2);
    #1;
    expect_eq("match", int'(common_match), int'(match));
    expect_eq("use_nha", int'(use_nha), int'(match && seg.npointer != 0));
    expect_eq("k", int'(k), kk);
    expect_eq("word", int'(nha_word_addr), (byte_addr / 4) % 65536);
    expect_eq("byte", int'(nha_byte), byte_addr % 4);
    expect_eq("nibble", int'(nha_nibble), seg.nbit ? 0 : kk % 2);
  endtask

  initial begin
    // worked example: 192.168 segment, address 192.168.68.x -> entry 4
    seg = '{cprefix: 6'b000001, cmarker: 6'b101011, mlength: 3'd6, nbit: 1'b0, npointer: 16'd1};
    addr_17_24 = 8'd68;
    #1;
    expect_eq("example k", int'(k), 4);
    expect_eq("example byte", int'(nha_byte), 2);
    expect_eq("example nibble", int'(nha_nibble), 0);
    expect_eq("example use", int'(use_nha), 1);
    addr_17_24 = 8'd84;           // 192.168.84.x -> entry 6 (bits 18,20,23 = 1,1,0)
    #1;
    expect_eq("example k84", int'(k), 6);
    addr_17_24 = 8'd128;          // bit 17 = 1 differs from the common 0
    #1;
    expect_eq("example mismatch", int'(common_match), 0);
    for (int i = 0; i < 50000; i++) begin
      seg = seg_entry_t'($urandom());
      if ($urandom_range(3) == 0) seg.npointer = '0;
      if ($urandom_range(1)) seg.cprefix = addr_17_24[7:2];  // make matches common
      addr_17_24 = 8'($urandom());
      if ($urandom_range(1)) seg.cprefix = addr_17_24[7:2];
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
