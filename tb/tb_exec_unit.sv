// tb_exec_unit: runs random microcode programs on the execution unit (with
// the prefetch buffer, AHB master and a memory model with random wait
// states) and compares the final accumulator, flag, R0..R7, GPO and data
// memory with an instruction-set reference model written in this
// testbench. Programs mix every ALU, compare, shift, move and immediate
// instruction, SETB, LDI/STI and LD/ST, and taken and not-taken JUMPC and
// forward JUMP (skipped bytes hold an undefined opcode, so a wrong jump
// ends in the error state). The debug stop input is toggled at random to
// check that a stopped core changes nothing. Also checks that an undefined
// opcode enters the error state and that END pulses done.
module tb_exec_unit;
  import ahb_pkg::*;
  import pacman_pkg::*;
  import tb_asm_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic start, done, busy, stop;
  logic [31:0] base;
  logic pf_sop, pf_redirect, pf_stop, pf_err, mem_valid, mem_done, mem_err, at_b, issue, err;
  logic [31:0] pf_target, mem_rdata, err_pc;
  logic [5:0] avail; logic [39:0] peek; logic [2:0] consume;
  mem_req_t mem_req; err_cause_e cause; core_state_t core;
  logic [3:0] gpo;
  logic cmd_valid, cmd_write, cmd_ready, rvalid, mdone, merr, hbusreq;
  logic [31:0] cmd_addr, cmd_wdata, rdata; logic [3:0] cmd_beats;
  ahb_m2s_t mm; ahb_s2m_t ms;
  int checks = 0, failures = 0, n_issue = 0, n_stopped = 0;

  exec_unit dut (.hclk, .hresetn, .start, .base_addr(base), .done, .busy,
    .pf_sop, .pf_redirect, .pf_target, .pf_stop, .avail, .peek, .consume, .pf_err,
    .mem_valid, .mem_req, .mem_done, .mem_rdata, .mem_err, .stop, .at_boundary(at_b), .issue,
    .event_i(4'hF), .gpo_o(gpo), .error_o(err), .err_cause(cause), .err_pc, .core);
  prefetch_buffer u_pf (.hclk, .hresetn, .sop(pf_sop), .redirect(pf_redirect), .target(pf_target),
    .stop(pf_stop), .avail, .peek, .consume, .pf_err, .mem_valid, .mem_req, .mem_done, .mem_rdata,
    .mem_err, .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata, .cmd_ready,
    .rvalid, .rdata, .done(mdone), .err(merr));
  pacman_ahb_master u_m (.hclk, .hresetn, .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata,
    .cmd_ready, .rvalid, .rdata, .done(mdone), .err(merr), .m_o(mm), .m_i(ms), .hbusreq, .hgrant(1'b1));
  tb_ahb_mem #(.BYTES(8192), .MAX_WAIT(2)) mem (.hclk, .hresetn, .hsel(1'b1), .s_i(mm), .hready(ms.hreadyout), .s_o(ms));
  always #5 hclk = ~hclk;
  always @(posedge hclk) begin
    if (issue) n_issue++;
    if (at_b && stop) n_stopped++;
  end

  // ---------------- reference model ----------------
  logic [31:0] r_acc, r_gpr [8];
  logic        r_flag;
  logic [3:0]  r_gpo;
  logic [7:0]  r_mem [8192];

  function automatic logic [31:0] rd32(input logic [31:0] a);
    for (int b = 0; b < 4; b++) rd32[8*b +: 8] = r_mem[(a + b) % 8192];
  endfunction

  task automatic iss_run(input logic [31:0] pc0);
    logic [31:0] pc = pc0;
    int steps = 0;
    forever begin
      logic [7:0] ib = r_mem[pc % 8192];
      logic [4:0] op = ib[7:3];
      logic [2:0] n = ib[2:0];
      logic [31:0] imm = {r_mem[(pc+4)%8192], r_mem[(pc+3)%8192], r_mem[(pc+2)%8192], r_mem[(pc+1)%8192]};
      logic [7:0] off = r_mem[(pc+1)%8192];
      logic [31:0] rn = r_gpr[n];
      logic [32:0] s;
      logic [31:0] npc = pc + 32'(instr_len(op));
      logic [31:0] jt = {pc[31:2], 2'b00} + {{22{off[7]}}, off, 2'b00};
      if (++steps > 10000) break;
      case (op)
        OP_END:  break;
        OP_NOP, OP_WAIT: ;
        OP_SETB: r_gpo[n[1:0]] = n[2];
        OP_LD:   r_acc = rd32(rn);
        OP_ST:   for (int b = 0; b < 4; b++) r_mem[(rn + b) % 8192] = r_acc[8*b +: 8];
        OP_SUBA: begin s = {1'b0, rn} - {1'b0, r_acc}; r_acc = s[31:0]; r_flag = s[32]; end
        OP_MOVI: if (n == 0) r_acc = imm; else r_gpr[n] = imm;
        OP_STI:  for (int b = 0; b < 4; b++) r_mem[(imm + b) % 8192] = (n == 0 ? r_acc[8*b +: 8] : r_gpr[n][8*b +: 8]);
        OP_LDI:  if (n == 0) r_acc = rd32(imm); else r_gpr[n] = rd32(imm);
        OP_JUMP: npc = jt;
        OP_JUMPC: if (r_flag) npc = jt;
        OP_ADD:  begin s = {1'b0, r_acc} + {1'b0, rn}; r_acc = s[31:0]; r_flag = s[32]; end
        OP_SUB:  begin s = {1'b0, r_acc} - {1'b0, rn}; r_acc = s[31:0]; r_flag = s[32]; end
        OP_AND:  r_acc &= rn;
        OP_OR:   r_acc |= rn;
        OP_XOR:  r_acc ^= rn;
        OP_GT:   r_flag = r_acc > rn;
        OP_LT:   r_flag = r_acc < rn;
        OP_EQ:   r_flag = r_acc == rn;
        OP_EQZ:  r_flag = r_acc == 0;
        OP_LS:   begin logic f = r_acc[31]; r_acc = {r_acc[30:0], r_flag}; r_flag = f; end
        OP_RS:   begin logic f = r_acc[0];  r_acc = {r_flag, r_acc[31:1]}; r_flag = f; end
        OP_MOVF: r_acc = rn;
        OP_MOVT: r_gpr[n] = r_acc;
        OP_CLR:  r_acc = 0;
        OP_ADDI: begin s = {1'b0, r_acc} + (33'd1 << n); r_acc = s[31:0]; r_flag = s[32]; end
        OP_SUBI: begin s = {1'b0, r_acc} - (33'd1 << n); r_acc = s[31:0]; r_flag = s[32]; end
        default: break;
      endcase
      pc = npc;
    end
  endtask

  // ---------------- random program generator ----------------
  localparam opcode_e ALU [19] = '{OP_SUBA, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_GT, OP_LT,
    OP_EQ, OP_EQZ, OP_LS, OP_RS, OP_MOVF, OP_MOVT, OP_CLR, OP_ADDI, OP_SUBI, OP_NOP, OP_SETB};

  function automatic void gen(ref byte_q_t q, input int n_ins, input int pc0);
    for (int i = 0; i < n_ins; i++) begin
      int k = $urandom % 20;
      if (k < 11) op1(q, ALU[$urandom % 19], $urandom % 8);
      else if (k < 13) opi(q, OP_MOVI, $urandom % 8, ($urandom % 4 == 0) ? 32'hFFFF_FFF0 + ($urandom % 16) : $urandom);
      else if (k == 13) opi(q, OP_LDI, $urandom % 8, 32'h1000 + 4 * ($urandom % 32));
      else if (k == 14) opi(q, OP_STI, $urandom % 8, 32'h1000 + 4 * ($urandom % 32));
      else if (k == 15) begin
        opi(q, OP_MOVI, 6, 32'h1000 + 4 * ($urandom % 32));
        op1(q, ($urandom % 2) ? OP_LD : OP_ST, 6);
      end else if (k == 16) begin
        // forward JUMP over bytes that must never execute
        int here = pc0 + q.size(); int offw = 1 + $urandom % 3;
        int tgt = (here & ~3) + 4 * offw - pc0;
        opj(q, OP_JUMP, offw);
        while (q.size() < tgt) q.push_back(8'hF8);
      end else if (k == 17) begin
        // JUMPC over valid one-byte instructions
        int here = pc0 + q.size(); int offw = 1 + $urandom % 2;
        int tgt = (here & ~3) + 4 * offw - pc0;
        opj(q, OP_JUMPC, offw);
        while (q.size() < tgt) op1(q, ALU[$urandom % 17], $urandom % 8);
      end else op1(q, ($urandom % 2) ? OP_GT : OP_EQZ, $urandom % 8);
    end
    op1(q, OP_END);
  endfunction

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; base = 0; stop = 0;
    mem.clear();
    for (int i = 0; i < 8192; i++) r_mem[i] = 8'h00;
    repeat (3) @(posedge hclk); hresetn = 1;
    for (int t = 0; t < 40; t++) begin
      automatic byte_q_t q;
      automatic logic [31:0] pc0 = 32'h100 + 32'($urandom % 64);
      automatic int cyc = 0;
      gen(q, 40 + $urandom % 60, pc0);
      for (int i = 0; i < q.size(); i++) begin mem.poke8(pc0 + i, q[i]); r_mem[pc0 + i] = q[i]; end
      for (int i = 0; i < 128; i++) begin
        automatic logic [7:0] v = 8'($urandom); mem.poke8(32'h1000 + i, v); r_mem[32'h1000 + i] = v;
      end
      // reference state = core state at start
      r_acc = core.acc; r_flag = core.flag; r_gpo = gpo;
      for (int i = 0; i < 8; i++) r_gpr[i] = core.gpr[i];
      iss_run(pc0);
      @(negedge hclk); start = 1; base = pc0; @(negedge hclk); start = 0;
      while (!done && !err && cyc < 20000) begin
        @(negedge hclk); cyc++;
        stop = (t % 3 == 0) ? ($urandom % 4 == 0) : 1'b0;
      end
      stop = 0;
      @(negedge hclk);
      if (err) begin
        $write("DBG pc0=%h bytes:", pc0);
        for (int i = 0; i < q.size(); i++) $write(" %h", q[i]);
        $display("");
        hresetn = 0; repeat (2) @(negedge hclk); hresetn = 1;
      end
      chk(!err, $sformatf("program %0d ran without error (cause %0d pc %h)", t, cause, err_pc));
      chk(core.acc == r_acc && core.flag == r_flag, $sformatf("program %0d acc %h/%h flag %0d/%0d", t, core.acc, r_acc, core.flag, r_flag));
      for (int i = 0; i < 8; i++) chk(core.gpr[i] == r_gpr[i], $sformatf("program %0d R%0d %h/%h", t, i, core.gpr[i], r_gpr[i]));
      chk(gpo == r_gpo, $sformatf("program %0d gpo", t));
      for (int i = 0; i < 128; i += 4) chk(mem.peek32(32'h1000 + i) == rd32(32'h1000 + i), $sformatf("program %0d mem %0d", t, i));
      repeat (20) @(negedge hclk);     // let the prefetcher settle
    end
    // undefined opcode
    mem.poke8(32'h200, 8'hF0);
    @(negedge hclk); start = 1; base = 32'h200; @(negedge hclk); start = 0;
    repeat (60) @(negedge hclk);
    chk(err && cause == ERR_OPCODE && err_pc == 32'h200, "undefined opcode -> error");
    chk(n_stopped > 0, "stop exercised");
    chk(mem.proto_errors == 0, "AHB burst rules");
    $display("issued %0d instructions, %0d stopped cycles", n_issue, n_stopped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
