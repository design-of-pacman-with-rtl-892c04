// tb_debug_unit: checks the debug registers and the stop decision. Reset
// values (break points 0xFFFFFFFF), halt bit and halted status, a break
// point hit at PC == BP1 or BP2 (sets Clear BP, holds stop), release by
// writing Clear BP = 0 with a one-shot skip of the same address, and single
// stepping: one issue per SStep_go write, with SStep_ack.
module tb_debug_unit;
  import pacman_pkg::*;
  logic hclk = 0, hresetn = 0;
  logic we; logic [11:0] addr; logic [31:0] wdata, rdata; logic hit;
  logic [31:0] pc; logic at_b, issue, stop;
  int checks = 0, failures = 0;
  int p;

  debug_unit dut (.hclk, .hresetn, .reg_we(we), .reg_addr(addr), .reg_wdata(wdata),
    .reg_rdata(rdata), .reg_hit(hit), .pc, .at_boundary(at_b), .issue, .stop);

  always #5 hclk = ~hclk;
  // a model core: issues whenever at a boundary and not stopped, PC += 1
  assign issue = at_b && !stop;
  always_ff @(posedge hclk) if (issue) pc <= pc + 1;

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge hclk); we = 1; addr = a; wdata = d; @(negedge hclk); we = 0;
  endtask
  task automatic rd_check(input logic [11:0] a, input logic [31:0] e, input string what);
    @(negedge hclk); addr = a; #1; checks++;
    if (!hit || rdata !== e) begin failures++; $display("FAIL %s: read %h expected %h", what, rdata, e); end
  endtask
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s (pc=%0d stop=%0d)", what, pc, stop); end
  endtask

  initial begin
    #200000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; pc = 0; at_b = 0;
    repeat (2) @(posedge hclk); hresetn = 1;
    rd_check(REG_BP1, 32'hFFFF_FFFF, "BP1 reset");
    rd_check(REG_BP2, 32'hFFFF_FFFF, "BP2 reset");
    rd_check(REG_HALT, 32'h0, "halt reset");
    rd_check(REG_SSTEP, 32'h0, "sstep reset");
    // free running
    at_b = 1; repeat (10) @(posedge hclk); #1;
    chk(pc == 10, "runs freely");
    // halt
    wr(REG_HALT, 1); repeat (3) @(posedge hclk); #1;
    begin p = pc; repeat (5) @(posedge hclk); #1; chk(pc == p, "halt holds pc"); end
    rd_check(REG_HALT, 32'h3, "halted status");
    wr(REG_HALT, 0); repeat (3) @(posedge hclk); #1;
    chk(!stop, "halt released");
    // break points
    @(negedge hclk); at_b = 0; pc = 0;
    wr(REG_BP1, 32'd6); wr(REG_BP2, 32'd25);
    @(negedge hclk); at_b = 1;
    repeat (20) @(posedge hclk); #1;
    chk(pc == 6 && stop, "stops at BP1");
    rd_check(REG_CLR_BP, 32'h1, "clear-bp set by hit");
    rd_check(REG_HALT, 32'h2, "halted at BP1");
    wr(REG_CLR_BP, 0);
    repeat (30) @(posedge hclk); #1;
    chk(pc == 25 && stop, "runs to BP2");
    wr(REG_CLR_BP, 0); repeat (3) @(posedge hclk); #1;
    chk(pc > 25, "released from BP2");
    // disabled by 0
    wr(REG_BP1, 0); wr(REG_BP2, 32'hFFFF_FFFF);
    @(negedge hclk); pc = 0; repeat (10) @(posedge hclk); #1;
    chk(pc >= 9, "zero break point never matches");
    // single step
    wr(REG_SSTEP, 1); repeat (2) @(posedge hclk); #1;
    begin
      p = pc;
      repeat (5) @(posedge hclk); #1; chk(pc == p, "single-step mode holds");
      rd_check(REG_SSTEP, 32'h1, "sstep en, no ack");
      for (int s = 1; s <= 4; s++) begin
        wr(REG_SSTEP, 3); repeat (4) @(posedge hclk); #1;
        chk(pc == p + s, "one instruction per go");
        rd_check(REG_SSTEP, 32'h7, "ack after step");
      end
      wr(REG_SSTEP, 0); repeat (4) @(posedge hclk); #1;
      chk(pc > p + 6, "single-step disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
