// pacman_top: the Pacman controller, a 128x8 interrupt controller and
// priority resolver that services interrupts by running small microcode
// programs itself, as a secondary processor beside the main CPU.
//
// Up to NUM_IRQ active-high level interrupt lines are each enabled and
// routed to one of NUM_VEC vectors (int_router). The priority resolver picks
// an active vector (round robin or fixed priority) and starts the execution
// unit at that vector's base address. The execution unit runs the vector's
// microcode, fetched ahead by the prefetch buffer through Pacman's own AHB
// master, until END; then the next vector is served. Microcode can drive
// NUM_GPO general purpose outputs, wait on NUM_EVT event inputs and load and
// store words over the bus. ERROR goes high when fetching or executing
// fails; the cause and PC are readable and only the soft reset bit leaves
// that state. The AHB slave (pacman_regs) holds the configuration and
// exposes PC, registers and the debug unit (halt, two break points, single
// step).
//
// One clock (HCLK) and a synchronous active-low reset (HRESETn). The soft
// reset bit resets the execution unit, prefetch buffer, AHB master and
// resolver for one cycle but keeps the configuration and debug registers.
// The block split and the interfaces follow the document; the soft reset
// scope is this design's choice.
module pacman_top
  import ahb_pkg::*;
  import pacman_pkg::*;
#(
  parameter int unsigned NUM_IRQ = 128,
  parameter int unsigned NUM_VEC = 8,
  parameter int unsigned NUM_GPO = 4,
  parameter int unsigned NUM_EVT = 4
) (
  input  logic               hclk,
  input  logic               hresetn,
  input  logic [NUM_IRQ-1:0] irq_i,
  input  logic [NUM_EVT-1:0] event_i,
  output logic [NUM_GPO-1:0] gpo_o,
  output logic               error_o,
  // AHB slave
  input  logic               hsel,
  input  ahb_m2s_t           s_i,
  input  logic               hready,
  output ahb_s2m_t           s_o,
  // AHB master
  output ahb_m2s_t           m_o,
  input  ahb_s2m_t           m_i,
  output logic               hbusreq,
  input  logic               hgrant
);

  localparam int unsigned VW = $clog2(NUM_VEC);

  logic core_rstn, soft_rst;
  assign core_rstn = hresetn && !soft_rst;

  // configuration
  logic [NUM_IRQ-1:0]          irq_en;
  logic [NUM_IRQ-1:0][VW-1:0]  irq_route;
  logic [NUM_VEC-1:0][31:0]    base_addr;
  logic                        ctrl_start, ctrl_fixed;

  // router / resolver
  logic [NUM_VEC-1:0] active_int;
  logic [VW-1:0]      sel_vec;
  logic [31:0]        sel_ba;
  logic               start, in_service;

  // execution unit
  logic        exec_done, exec_busy;
  err_cause_e  err_cause;
  logic [31:0] err_pc;
  core_state_t core;
  logic        stop, at_boundary, issue;

  // prefetch
  logic        pf_sop, pf_redirect, pf_stop, pf_err;
  logic [31:0] pf_target;
  logic [5:0]  avail;
  logic [39:0] peek;
  logic [2:0]  consume;
  logic        mem_valid, mem_done, mem_err;
  mem_req_t    mem_req;
  logic [31:0] mem_rdata;

  // master command
  logic        cmd_valid, cmd_write, cmd_ready, rvalid, mdone, merr;
  logic [31:0] cmd_addr, cmd_wdata, rdata;
  logic [3:0]  cmd_beats;

  // debug register bus
  logic        dbg_we, dbg_hit;
  logic [11:0] dbg_addr;
  logic [31:0] dbg_wdata, dbg_rdata;

  pacman_regs #(.NUM_IRQ(NUM_IRQ), .NUM_VEC(NUM_VEC), .NUM_GPO(NUM_GPO)) u_regs (
    .hclk, .hresetn, .hsel, .s_i, .hready, .s_o,
    .irq_en, .irq_route, .base_addr, .ctrl_start, .ctrl_fixed, .soft_rst,
    .in_service, .sel_vec, .active_int, .error_i(error_o), .exec_busy,
    .err_cause, .err_pc, .core, .gpo(gpo_o),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .dbg_hit
  );

  debug_unit u_debug (
    .hclk, .hresetn,
    .reg_we(dbg_we), .reg_addr(dbg_addr), .reg_wdata(dbg_wdata),
    .reg_rdata(dbg_rdata), .reg_hit(dbg_hit),
    .pc(core.pc), .at_boundary, .issue, .stop
  );

  int_router #(.NUM_IRQ(NUM_IRQ), .NUM_VEC(NUM_VEC)) u_router (
    .irq_i, .irq_en, .irq_route, .active_int
  );

  priority_resolver #(.NUM_VEC(NUM_VEC)) u_resolver (
    .hclk, .hresetn(core_rstn), .active_int, .base_addr,
    .fixed_prio(ctrl_fixed), .enable(ctrl_start), .exec_done,
    .sel_vec, .sel_ba, .start, .in_service
  );

  exec_unit #(.NUM_GPO(NUM_GPO), .NUM_EVT(NUM_EVT)) u_exec (
    .hclk, .hresetn(core_rstn),
    .start, .base_addr(sel_ba), .done(exec_done), .busy(exec_busy),
    .pf_sop, .pf_redirect, .pf_target, .pf_stop, .avail, .peek, .consume, .pf_err,
    .mem_valid, .mem_req, .mem_done, .mem_rdata, .mem_err,
    .stop, .at_boundary, .issue,
    .event_i, .gpo_o, .error_o, .err_cause, .err_pc, .core
  );

  prefetch_buffer u_prefetch (
    .hclk, .hresetn(core_rstn),
    .sop(pf_sop), .redirect(pf_redirect), .target(pf_target), .stop(pf_stop),
    .avail, .peek, .consume, .pf_err,
    .mem_valid, .mem_req, .mem_done, .mem_rdata, .mem_err,
    .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata, .cmd_ready,
    .rvalid, .rdata, .done(mdone), .err(merr)
  );

  pacman_ahb_master u_master (
    .hclk, .hresetn(core_rstn),
    .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata, .cmd_ready,
    .rvalid, .rdata, .done(mdone), .err(merr),
    .m_o, .m_i, .hbusreq, .hgrant
  );

endmodule
