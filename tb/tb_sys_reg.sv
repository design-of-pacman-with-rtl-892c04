// tb_sys_reg: checks that writing the System Register drives Pacman's
// interrupt lines: writing 1 at offset 0 raises line 0, bits of word n
// drive lines 32n..32n+31, writing 0 lowers them, and the words read back.
module tb_sys_reg;
  import ahb_pkg::*;
  logic hclk = 0, hresetn = 0;
  ahb_m2s_t m; ahb_s2m_t s;
  logic [127:0] irq, ref_irq;
  logic [31:0] d;
  int checks = 0, failures = 0;

  sys_reg #(.NUM_IRQ(128)) dut (.hclk, .hresetn, .hsel(1'b1), .s_i(m), .hready(s.hreadyout), .s_o(s), .irq_o(irq));
  tb_ahb_bfm bfm (.hclk, .m_o(m), .m_i(s));
  always #5 hclk = ~hclk;

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge hclk); #1 hresetn = 1;
    #1; checks++; if (irq !== '0) begin failures++; $display("FAIL reset"); end
    bfm.write32(32'h3000, 32'h1); @(posedge hclk); #1;
    checks++; if (irq !== 128'h1) begin failures++; $display("FAIL line 0: %h", irq); end
    ref_irq = 128'h1;
    for (int t = 0; t < 200; t++) begin
      int w = $urandom % 4; logic [31:0] v = $urandom;
      bfm.write32(32'h3000 + 4 * w, v); ref_irq[32*w +: 32] = v;
      @(posedge hclk); #1;
      checks++; if (irq !== ref_irq) begin failures++; $display("FAIL lines %h vs %h", irq, ref_irq); end
      bfm.read32(32'h3000 + 4 * w, d);
      checks++; if (d !== v) begin failures++; $display("FAIL readback"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
