// tb_pacman_regs: checks Pacman's register file through AHB word accesses
// from the bus model. Random writes to all 128 interrupt config registers
// and the 8 base address registers are read back and compared with the
// irq_en/irq_route/base_addr outputs; the control register drives start
// and fixed, and its soft reset bit gives a one-cycle pulse and reads back
// as 0. Status, error, PC, accumulator, flag, GPO and R0..R7 read back
// random values driven on the status inputs. Accesses to the debug window
// must appear on the debug bus and return the debug unit's data.
module tb_pacman_regs;
  import ahb_pkg::*;
  import pacman_pkg::*;

  logic hclk = 0, hresetn = 0;
  ahb_m2s_t mo; ahb_s2m_t so;
  logic [127:0] irq_en; logic [127:0][2:0] irq_route; logic [7:0][31:0] base_addr;
  logic ctrl_start, ctrl_fixed, soft_rst, in_service, error_i, exec_busy, dbg_we, dbg_hit;
  logic [2:0] sel_vec; logic [7:0] active_int; err_cause_e err_cause;
  logic [31:0] err_pc, dbg_wdata, dbg_rdata; logic [11:0] dbg_addr;
  core_state_t core; logic [3:0] gpo;
  int checks = 0, failures = 0, n_pulse = 0, n_dbgw = 0;
  logic [11:0] last_dbg_addr; logic [31:0] last_dbg_data;

  pacman_regs dut (.hclk, .hresetn, .hsel(1'b1), .s_i(mo), .hready(so.hreadyout), .s_o(so),
    .irq_en, .irq_route, .base_addr, .ctrl_start, .ctrl_fixed, .soft_rst, .in_service, .sel_vec,
    .active_int, .error_i, .exec_busy, .err_cause, .err_pc, .core, .gpo,
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .dbg_hit);
  tb_ahb_bfm bfm (.hclk, .m_o(mo), .m_i(so));
  always #5 hclk = ~hclk;

  assign dbg_hit   = dbg_addr >= 12'h2C0;
  assign dbg_rdata = {20'hDB6, dbg_addr};
  always @(posedge hclk) begin
    if (hresetn && soft_rst) n_pulse++;
    if (hresetn && dbg_we && dbg_hit) begin n_dbgw++; last_dbg_addr <= dbg_addr; last_dbg_data <= dbg_wdata; end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d;
    logic [3:0] cfg [128];
    logic [31:0] ba [8];
    {in_service, error_i, exec_busy, sel_vec, active_int} = '0;
    err_cause = ERR_NONE; err_pc = 0; core = '0; gpo = 0;
    repeat (3) @(posedge hclk); hresetn = 1;
    bfm.read32(32'h2000 + 32'(REG_CTRL), d);
    chk(d == 0 && irq_en == 0, "reset values");
    for (int i = 0; i < 128; i++) begin cfg[i] = 4'($urandom); bfm.write32(32'h2000 + 4 * i, 32'hFFFF_FFF0 | cfg[i]); end
    for (int v = 0; v < 8; v++) begin ba[v] = $urandom; bfm.write32(32'h2000 + 32'(REG_BASE) + 4 * v, ba[v]); end
    for (int i = 0; i < 128; i++) begin
      bfm.read32(32'h2000 + 4 * i, d);
      chk(d == 32'(cfg[i]) && irq_en[i] == cfg[i][3] && irq_route[i] == cfg[i][2:0], $sformatf("irq cfg %0d", i));
    end
    for (int v = 0; v < 8; v++) begin
      bfm.read32(32'h2000 + 32'(REG_BASE) + 4 * v, d);
      chk(d == ba[v] && base_addr[v] == ba[v], $sformatf("base %0d", v));
    end
    bfm.write32(32'h2000 + 32'(REG_CTRL), 32'h3);
    bfm.read32(32'h2000 + 32'(REG_CTRL), d);
    chk(d == 3 && ctrl_start && ctrl_fixed, "control start/fixed");
    bfm.write32(32'h2000 + 32'(REG_CTRL), 32'h5);
    bfm.read32(32'h2000 + 32'(REG_CTRL), d);
    chk(d == 1 && ctrl_start && !ctrl_fixed && n_pulse == 1, "soft reset one pulse, reads 0");
    for (int k = 0; k < 20; k++) begin
      in_service = 1'($urandom); error_i = 1'($urandom); exec_busy = 1'($urandom);
      sel_vec = 3'($urandom); active_int = 8'($urandom);
      err_cause = err_cause_e'($urandom % 4); err_pc = $urandom; gpo = 4'($urandom);
      core.pc = $urandom; core.acc = $urandom; core.flag = 1'($urandom);
      for (int i = 0; i < 8; i++) core.gpr[i] = $urandom;
      bfm.read32(32'h2000 + 32'(REG_STATUS), d);
      chk(d == {16'h0, active_int, 2'b00, exec_busy, error_i, sel_vec, in_service}, "status");
      bfm.read32(32'h2000 + 32'(REG_ERR), d);    chk(d == 32'(err_cause), "error cause");
      bfm.read32(32'h2000 + 32'(REG_ERR_PC), d); chk(d == err_pc, "error pc");
      bfm.read32(32'h2000 + 32'(REG_PC), d);     chk(d == core.pc, "pc");
      bfm.read32(32'h2000 + 32'(REG_ACC), d);    chk(d == core.acc, "acc");
      bfm.read32(32'h2000 + 32'(REG_FLAG), d);   chk(d == 32'(core.flag), "flag");
      bfm.read32(32'h2000 + 32'(REG_GPO), d);    chk(d == 32'(gpo), "gpo");
      for (int i = 0; i < 8; i++) begin
        bfm.read32(32'h2000 + 32'(REG_GPR) + 4 * i, d); chk(d == core.gpr[i], $sformatf("R%0d", i));
      end
    end
    for (int k = 0; k < 5; k++) begin
      automatic logic [11:0] a = k == 0 ? REG_HALT : k == 1 ? REG_BP1 : k == 2 ? REG_CLR_BP : k == 3 ? REG_BP2 : REG_SSTEP;
      automatic logic [31:0] w = $urandom;
      bfm.write32(32'h2000 + a, w);
      @(negedge hclk);
      chk(last_dbg_addr == a && last_dbg_data == w, $sformatf("debug write %h", a));
      bfm.read32(32'h2000 + a, d);
      chk(d == {20'hDB6, a}, $sformatf("debug read %h", a));
    end
    chk(n_dbgw == 5, "one debug write strobe per write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
