// tb_sram_8k: writes and reads the full 8 KB SRAM through an AHB master
// model: a word pattern over every word, byte and halfword writes merged
// into words, back-to-back write-then-read of one word, and random
// accesses against a reference array.
module tb_sram_8k;
  import ahb_pkg::*;
  logic hclk = 0, hresetn = 0;
  ahb_m2s_t m; ahb_s2m_t s;
  logic [31:0] ref_mem [2048];
  logic [31:0] d;
  int checks = 0, failures = 0;

  sram_8k dut (.hclk, .hresetn, .hsel(1'b1), .s_i(m), .hready(s.hreadyout), .s_o(s));
  tb_ahb_bfm bfm (.hclk, .m_o(m), .m_i(s));
  always #5 hclk = ~hclk;

  initial begin
    #5000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge hclk); #1 hresetn = 1;
    for (int i = 0; i < 2048; i++) begin
      ref_mem[i] = 32'h5A00_0000 ^ (i * 32'h0001_0003);
      bfm.write32(i * 4, ref_mem[i]);
    end
    for (int i = 0; i < 2048; i++) begin
      bfm.read32(i * 4, d); checks++;
      if (d !== ref_mem[i]) begin failures++; $display("FAIL word %0d: %h vs %h", i, d, ref_mem[i]); end
    end
    // sub-word writes
    bfm.write_sized(32'h10, HSIZE_BYTE, 32'h00CC_0000 << 0);   // lane 0 gets 0x00
    ref_mem[4][7:0] = 8'h00;
    bfm.write_sized(32'h16, HSIZE_HALF, 32'hBEEF_0000);
    ref_mem[5][31:16] = 16'hBEEF;
    bfm.write_sized(32'h1B, HSIZE_BYTE, 32'h7700_0000);
    ref_mem[6][31:24] = 8'h77;
    for (int i = 4; i <= 6; i++) begin
      bfm.read32(i * 4, d); checks++;
      if (d !== ref_mem[i]) begin failures++; $display("FAIL sub-word %0d: %h vs %h", i, d, ref_mem[i]); end
    end
    for (int t = 0; t < 2000; t++) begin
      int a = $urandom % 2048;
      if ($urandom % 2) begin ref_mem[a] = $urandom; bfm.write32(a * 4, ref_mem[a]); end
      else begin
        bfm.read32(a * 4, d); checks++;
        if (d !== ref_mem[a]) begin failures++; $display("FAIL random %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
