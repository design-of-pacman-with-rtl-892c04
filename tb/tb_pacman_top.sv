// tb_pacman_top: tests the Pacman controller on its own: the register slave
// driven by an AHB master model and the microcode fetched through its AHB
// master from a memory model with random wait states.
//
// Checks: round-robin service of two permanently active vectors alternates
// between them, fixed priority always serves the lower vector; each run
// appends its vector number to a log in memory through LDI/ST/STI. WAIT
// holds until its event input rises. A load from a region that answers
// ERROR stops the controller with cause 3 and ERROR high, and the soft reset
// bit recovers it. The memory model checks the burst rules (no 1 KB
// crossing, SEQ addresses) throughout.
module tb_pacman_top;
  import ahb_pkg::*;
  import pacman_pkg::*;
  import tb_asm_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic [127:0] irq = '0;
  logic [3:0] evt = '0, gpo;
  logic err;
  ahb_m2s_t sm, mm; ahb_s2m_t ss, ms;
  logic hbusreq;
  logic [31:0] d;
  int checks = 0, failures = 0;
  byte_q_t pv [4];

  pacman_top dut (.hclk, .hresetn, .irq_i(irq), .event_i(evt), .gpo_o(gpo), .error_o(err),
    .hsel(1'b1), .s_i(sm), .hready(ss.hreadyout), .s_o(ss),
    .m_o(mm), .m_i(ms), .hbusreq, .hgrant(1'b1));
  tb_ahb_bfm bfm (.hclk, .m_o(sm), .m_i(ss));
  tb_ahb_mem #(.BYTES(8192), .MAX_WAIT(3), .ERR_LO(32'h1F00), .ERR_HI(32'h1FFF)) mem (
    .hclk, .hresetn, .hsel(1'b1), .s_i(mm), .hready(ms.hreadyout), .s_o(ms));
  always #5 hclk = ~hclk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s (d=%h)", what, d); end
  endtask
  task automatic load(input byte_q_t q, input logic [31:0] base);
    for (int i = 0; i < q.size(); i++) mem.poke8(base + i, q[i]);
  endtask
  task automatic wait_idle();
    int n = 0;
    do begin bfm.read32(REG_STATUS, d); n++; end while (d[0] && n < 2000);
  endtask
  // log in memory: pointer at 0x700, entries from 0x800
  task automatic check_log(input bit rr, input string what);
    int n;
    logic [31:0] prev, cur;
    n = (mem.peek32(32'h700) - 32'h800) / 4;
    chk(n >= 6, $sformatf("%s: %0d runs logged", what, n));
    for (int i = 0; i < n; i++) begin
      cur = mem.peek32(32'h800 + 4 * i);
      if (rr) begin
        if (i > 0) chk(cur != prev && (cur == 1 || cur == 2), $sformatf("%s: entry %0d = %0d", what, i, cur));
      end else chk(cur == 1, $sformatf("%s: entry %0d = %0d", what, i, cur));
      prev = cur;
    end
  endtask

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // vectors 1 and 2: log their number at *ptr and advance ptr
    for (int v = 1; v <= 2; v++) begin
      opi(pv[v], OP_LDI, 3, 32'h700);     // R3 = ptr
      opi(pv[v], OP_MOVI, 0, 32'(v));     // acc = v
      op1(pv[v], OP_ST, 3);               // mem[R3] = v
      op1(pv[v], OP_MOVF, 3);
      op1(pv[v], OP_ADDI, 2);             // ptr += 4
      opi(pv[v], OP_STI, 0, 32'h700);
      op1(pv[v], OP_END);
    end
    // vector 0: WAIT for event 2, then GPO1 = 1
    op1(pv[0], OP_WAIT, 2);
    op1(pv[0], OP_SETB, 5);
    op1(pv[0], OP_END);
    // vector 3: load from an address that answers ERROR
    opi(pv[3], OP_LDI, 0, 32'h1F00);
    op1(pv[3], OP_END);

    mem.clear();
    for (int v = 0; v < 4; v++) load(pv[v], 32'h400 + 32'h40 * v + 32'(v));  // unaligned bases
    mem.poke32(32'h700, 32'h800);
    repeat (3) @(posedge hclk); hresetn = 1;
    for (int v = 0; v < 4; v++) bfm.write32(REG_BASE + 4 * v, 32'h400 + 32'h40 * v + 32'(v));
    bfm.write32(REG_BASE + 4, 32'h441); bfm.read32(REG_BASE + 4, d); chk(d == 32'h441, "base readback");
    // lines 5 -> vector 1, 77 -> vector 2, 127 -> vector 0, 9 -> vector 3
    bfm.write32(REG_IRQ_CFG + 4 * 5, 32'h9);
    bfm.write32(REG_IRQ_CFG + 4 * 77, 32'hA);
    bfm.write32(REG_IRQ_CFG + 4 * 127, 32'h8);
    bfm.write32(REG_IRQ_CFG + 4 * 9, 32'hB);
    bfm.read32(REG_IRQ_CFG + 4 * 77, d); chk(d == 32'hA, "irq cfg readback");

    // round robin
    bfm.write32(REG_CTRL, 32'h1);
    irq[5] = 1; irq[77] = 1;
    repeat (1500) @(posedge hclk);
    bfm.write32(REG_CTRL, 32'h0);
    wait_idle();
    check_log(1, "round robin");
    // fixed priority
    mem.poke32(32'h700, 32'h800);
    bfm.write32(REG_CTRL, 32'h3);
    repeat (1500) @(posedge hclk);
    bfm.write32(REG_CTRL, 32'h0);
    wait_idle();
    check_log(0, "fixed priority");
    irq[5] = 0; irq[77] = 0;

    // WAIT for an event
    bfm.write32(REG_CTRL, 32'h1);
    irq[127] = 1;
    repeat (200) @(posedge hclk);
    chk(gpo[1] == 1'b0, "WAIT holds");
    bfm.read32(REG_STATUS, d); chk(d[0] && d[3:1] == 3'd0, "vector 0 in service");
    irq[127] = 0;
    evt[2] = 1;
    repeat (100) @(posedge hclk);
    chk(gpo[1] == 1'b1, "WAIT released by event");
    evt[2] = 0;
    wait_idle();

    // load error
    irq[9] = 1;
    repeat (200) @(posedge hclk);
    chk(err, "ERROR on load bus error");
    bfm.read32(REG_ERR, d); chk(d == 32'(ERR_LDST), "cause load/store");
    irq[9] = 0;
    bfm.write32(REG_CTRL, 32'h5);
    repeat (5) @(posedge hclk);
    chk(!err, "soft reset");
    bfm.read32(REG_IRQ_CFG + 4 * 77, d); chk(d == 32'hA, "config kept over soft reset");

    checks++;
    if (mem.proto_errors != 0) begin failures++; $display("FAIL %0d AHB burst rule violations", mem.proto_errors); end
    checks++;
    if (mem.n_incr4 == 0 && mem.n_incr8 == 0) begin failures++; $display("FAIL no bursts"); end
    $display("bursts: incr8=%0d incr4=%0d single=%0d", mem.n_incr8, mem.n_incr4, mem.n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
