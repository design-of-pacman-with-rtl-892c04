// tb_soc_top: end-to-end test of the Pacman subsystem at its default size,
// driven only through the JTAG pins, the way a debugger uses the chip.
//
// It reads the IDCODE, loads microcode into the SRAM over JtagtoAHB,
// routes interrupt line 0 to vector 1, sets the vector base address, starts
// the controller and raises the interrupt through the System Register. The
// microcode uses MOVI/MOVT/ADDI/ADD/SETB/STI/LD, a counted loop with
// JUMPC/JUMP, and clears its own interrupt by storing to the System
// Register before END. On the way the test exercises:
//   - break points: BP1 stops at 0x106; BP2 on the loop head stops on every
//     pass through the loop (three times); each release by Clear BP = 0;
//   - halt mode: Halt_bit set before the interrupt holds the core at its
//     first instruction until cleared;
//   - single step: each SStep_go write advances the PC by one instruction;
//   - errors: an undefined opcode and a fetch from an unmapped address both
//     raise ERROR with the cause and PC readable, and the soft reset bit
//     clears it.
// Results (registers, memory, GPO) are compared with values worked out by
// hand from the microcode below. Each mechanism is counted and one that
// never happened counts as a failure.
module tb_soc_top;
  import pacman_pkg::*;
  import tb_asm_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic [3:0] evt = 4'h0, gpo;
  logic err;
  int checks = 0, failures = 0;
  logic [127:0] o;
  logic [31:0] d;
  byte_q_t prog, bad;

  soc_top dut (.hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo, .event_i(evt), .gpo_o(gpo), .error_o(err));
  tb_jtag_drv #(.TCK_HALF(40)) host (.tck, .tms, .tdi, .trst_n, .tdo);
  always #5 hclk = ~hclk;

  // mechanism counters
  int n_bp = 0, n_halt = 0, n_sstep = 0, n_jump = 0, n_b8 = 0, n_b4 = 0, n_ld = 0, n_st = 0,
      n_err = 0, n_srst = 0, n_irq = 0, n_grant_jtag = 0, n_grant_pac = 0;
  always @(posedge hclk) if (hresetn) begin
    if (dut.u_pacman.u_debug.at_boundary && dut.u_pacman.u_debug.bp_match &&
        !dut.u_pacman.u_debug.bp_skip && !dut.u_pacman.u_debug.clr_bp_en) n_bp++;
    if (dut.u_pacman.u_exec.pf_redirect) n_jump++;
    if (dut.u_pacman.u_master.cmd_valid && dut.u_pacman.u_master.cmd_ready) begin
      if (dut.u_pacman.u_master.cmd_beats == 8) n_b8++;
      if (dut.u_pacman.u_master.cmd_beats == 4) n_b4++;
      if (dut.u_pacman.u_master.cmd_beats == 1 && !dut.u_pacman.u_master.cmd_write) n_ld++;
      if (dut.u_pacman.u_master.cmd_beats == 1 &&  dut.u_pacman.u_master.cmd_write) n_st++;
    end
    if (dut.u_pacman.u_resolver.start) n_irq++;
    if (dut.u_pacman.soft_rst) n_srst++;
    if (dut.hgrant[1] && dut.hbusreq[1]) n_grant_jtag++;
    if (dut.hgrant[2] && dut.hbusreq[2]) n_grant_pac++;
  end
  logic err_q = 0;
  always @(posedge hclk) begin err_q <= err; if (err && !err_q) n_err++; end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s (d=%h)", what, d); end
  endtask
  task automatic rd(input logic [31:0] a); host.ahb_read(a, d); endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] v); host.ahb_write(a, v); endtask
  task automatic wait_halted(input string what);
    int n = 0;
    do begin rd(32'h22C0); n++; end while (d[1] != 1'b1 && n < 50);
    chk(d[1], {what, ": halted"});
  endtask
  task automatic wait_idle(input string what);
    int n = 0;
    do begin rd(32'h2220); n++; end while (d[0] && n < 50);
    chk(!d[0], {what, ": vector finished"});
  endtask
  task automatic load(input byte_q_t q, input logic [31:0] base);
    for (int i = 0; i < q.size(); i += 4) begin
      logic [31:0] w = '0;
      for (int b = 0; b < 4; b++) if (i + b < q.size()) w[8*b +: 8] = q[i + b];
      wr(base + i, w);
    end
  endtask

  initial begin
    #60000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // ---------------- microcode for vector 1 at 0x100 ----------------
    opi(prog, OP_MOVI, 0, 32'h141);   // 0x00 acc = 0x141
    op1(prog, OP_MOVT, 1);            // 0x05 R1 = acc
    op1(prog, OP_ADDI, 0);            // 0x06 acc += 1        (BP1 here)
    op1(prog, OP_MOVT, 2);            // 0x07 R2 = 0x142
    op1(prog, OP_SETB, 4);            // 0x08 GPO0 = 1
    opi(prog, OP_STI, 0, 32'h400);    // 0x09 mem[0x400] = 0x142
    opi(prog, OP_MOVI, 3, 32'h400);   // 0x0E R3 = 0x400
    op1(prog, OP_LD, 3);              // 0x13 acc = mem[R3]
    op1(prog, OP_ADD, 1);             // 0x14 acc = 0x142 + 0x141
    opi(prog, OP_STI, 0, 32'h404);    // 0x15 mem[0x404] = 0x283
    opi(prog, OP_MOVI, 0, 32'd3);     // 0x1A acc = 3
    align(prog, 32'h20);
    op1(prog, OP_SUBI, 0);            // 0x20 loop: acc -= 1  (BP2 here)
    op1(prog, OP_EQZ);                // 0x21
    opj(prog, OP_JUMPC, 2);           // 0x22 if zero -> 0x28
    opj(prog, OP_JUMP, -1);           // 0x24 -> 0x20
    align(prog, 32'h28);
    op1(prog, OP_MOVT, 4);            // 0x28 R4 = 0
    op1(prog, OP_MOVF, 2);            // 0x29 acc = R2
    op1(prog, OP_MOVT, 5);            // 0x2A R5 = 0x142
    op1(prog, OP_CLR);                // 0x2B acc = 0
    opi(prog, OP_STI, 0, 32'h3000);   // 0x2C clear interrupt line 0
    op1(prog, OP_END);                // 0x31
    bad.push_back(8'hF8);             // undefined opcode 31

    repeat (4) @(posedge hclk); hresetn = 1;
    host.reset_tap();
    host.scan_dr('0, 32, o); d = o[31:0];
    chk(o[31:0] == 32'h149511C3, "IDCODE");
    host.scan_ir(128'h8, 4, o);

    load(prog, 32'h100);
    load(bad, 32'h200);
    rd(32'h100); chk(d == {prog[3], prog[2], prog[1], prog[0]}, "SRAM holds microcode");
    wr(32'h2000, 32'h9);              // line 0: enable, vector 1
    rd(32'h2000); chk(d == 32'h9, "IRQ0 config");
    wr(32'h2204, 32'h100);            // vector 1 base
    wr(32'h22EC, 32'h106);            // BP1
    wr(32'h22F4, 32'h120);            // BP2 (loop head)
    wr(32'h2224, 32'h1);              // start
    wr(32'h3000, 32'h1);              // raise interrupt 0

    wait_halted("BP1");
    rd(32'h2230); chk(d == 32'h106, "PC at BP1");
    rd(32'h2244); chk(d == 32'h141, "R1 at BP1");
    rd(32'h2234); chk(d == 32'h141, "acc at BP1");
    rd(32'h22F0); chk(d == 32'h1, "Clear BP set");
    wr(32'h22F0, 32'h0);
    for (int pass = 0; pass < 3; pass++) begin
      wait_halted($sformatf("BP2 pass %0d", pass));
      rd(32'h2230); chk(d == 32'h120, "PC at BP2");
      rd(32'h2234); chk(d == 32'(3 - pass), "acc in loop");
      wr(32'h22F0, 32'h0);
    end
    wait_idle("first run");
    rd(32'h2244); chk(d == 32'h141, "R1");
    rd(32'h2248); chk(d == 32'h142, "R2");
    rd(32'h224C); chk(d == 32'h400, "R3");
    rd(32'h2250); chk(d == 32'h0,   "R4");
    rd(32'h2254); chk(d == 32'h142, "R5");
    rd(32'h2234); chk(d == 32'h0,   "acc");
    rd(32'h0400); chk(d == 32'h142, "mem[0x400]");
    rd(32'h0404); chk(d == 32'h283, "mem[0x404]");
    rd(32'h3000); chk(d == 32'h0,   "interrupt cleared by microcode");
    chk(gpo == 4'h1, "GPO0 set");
    chk(!err, "no error");

    // ---------------- halt mode ----------------
    wr(32'h22EC, 32'h0); wr(32'h22F4, 32'h0);      // break points off
    wr(32'h22C0, 32'h1);
    wr(32'h3000, 32'h1);
    wait_halted("halt mode");
    rd(32'h22C0); chk(d == 32'h3, "halt register reads Halted|Halt_bit");
    rd(32'h2230); chk(d == 32'h100, "halted at first instruction");
    n_halt++;
    wr(32'h22C0, 32'h0);
    wait_idle("after halt");

    // ---------------- single step ----------------
    wr(32'h22F8, 32'h1);
    wr(32'h3000, 32'h1);
    wait_halted("single step");
    begin
      logic [31:0] exp_pc [7] = '{32'h100, 32'h105, 32'h106, 32'h107, 32'h108, 32'h109, 32'h10E};
      for (int s = 0; s < 6; s++) begin
        rd(32'h2230); chk(d == exp_pc[s], $sformatf("single step PC %0d", s));
        wr(32'h22F8, 32'h3);
        rd(32'h22F8); chk(d == 32'h7, "SStep_ack");
        n_sstep++;
      end
      rd(32'h2230); chk(d == exp_pc[6], "single step PC 6");
    end
    wr(32'h22F8, 32'h0);
    wait_idle("after single step");

    // ---------------- errors and soft reset ----------------
    wr(32'h2004, 32'hA);              // line 1 -> vector 2
    wr(32'h2208, 32'h200);
    wr(32'h3000, 32'h2);
    rd(32'h2228); chk(d == 32'(ERR_OPCODE), "undefined opcode cause");
    rd(32'h222C); chk(d == 32'h200, "error PC");
    chk(err, "ERROR pin");
    wr(32'h3000, 32'h0);
    wr(32'h2224, 32'h5);              // soft reset, keep enabled
    rd(32'h2228); chk(d == 32'h0 && !err, "soft reset clears error");
    wr(32'h2008, 32'hB);              // line 2 -> vector 3
    wr(32'h220C, 32'h8000_0000);      // unmapped
    wr(32'h3000, 32'h4);
    rd(32'h2228); chk(d == 32'(ERR_PREFETCH), "fetch error cause");
    chk(err, "ERROR pin (fetch)");
    wr(32'h3000, 32'h0);
    wr(32'h2224, 32'h5);
    chk(!err, "soft reset clears fetch error");

    // ---------------- mechanisms seen ----------------
    chk(n_bp >= 4,  $sformatf("break point hits %0d", n_bp));
    chk(n_halt >= 1, "halt");
    chk(n_sstep >= 6, "single steps");
    chk(n_jump >= 3, $sformatf("jumps %0d", n_jump));
    chk(n_b8 + n_b4 >= 2, $sformatf("bursts 8:%0d 4:%0d", n_b8, n_b4));
    chk(n_b8 >= 1 && n_b4 >= 1, $sformatf("both burst sizes 8:%0d 4:%0d", n_b8, n_b4));
    chk(n_ld >= 1 && n_st >= 2, $sformatf("loads %0d stores %0d", n_ld, n_st));
    chk(n_err >= 2, $sformatf("errors %0d", n_err));
    chk(n_srst >= 2, "soft resets");
    chk(n_irq >= 5, $sformatf("vectors started %0d", n_irq));
    chk(n_grant_jtag > 0 && n_grant_pac > 0, "both masters used the bus");
    $display("mechanisms: bp=%0d halt=%0d sstep=%0d jump=%0d b8=%0d b4=%0d ld=%0d st=%0d err=%0d srst=%0d irq=%0d",
             n_bp, n_halt, n_sstep, n_jump, n_b8, n_b4, n_ld, n_st, n_err, n_srst, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
