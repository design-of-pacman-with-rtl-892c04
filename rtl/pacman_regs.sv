// pacman_regs: Pacman's AHB slave interface and register file. The CPU (or
// the JTAG debugger) programs the controller and reads status and debug
// state through it.
//
// Map (byte offsets inside the 4 KB window; the window starts at 0x2000):
//   0x000 + 4n  IRQ n config, n < NUM_IRQ: [3] enable, [2:0] routing bits
//   0x200 + 4v  base address of vector v's microcode, v < NUM_VEC
//   0x220       status (RO): [0] vector in service, [3:1] vector,
//               [4] ERROR, [5] execution unit busy, [15:8] Active_Int
//   0x224       control: [0] start (controller enabled), [1] fixed priority
//               (0 = round robin), [2] soft reset (self-clearing)
//   0x228       error cause (RO): 0 none, 1 undefined opcode, 2 fetch bus
//               error, 3 load/store bus error; 0x22C PC of the error (RO)
//   0x230 PC, 0x234 accumulator, 0x238 flag, 0x23C GPO, 0x240 + 4n Rn (RO)
//   0x2C0 .. 0x2F8 debug registers, forwarded to debug_unit
// Zero wait states, OKAY for every access. The address phase is registered;
// a write takes effect at the end of its data phase and a read returns the
// value at that time. Writes are word writes (HSIZE is ignored).
//
// Following the document: the start bit at 0x224, the PC at 0x230, enable
// and routing bits per line, one base address per vector, a soft reset bit,
// an error/debug register and read-back of R0..R7, accumulator and flag.
// The other offsets, the bit position of the enable above the routing bits
// and the status layout are this design's choices.
module pacman_regs
  import ahb_pkg::*;
  import pacman_pkg::*;
#(
  parameter int unsigned NUM_IRQ = 128,
  parameter int unsigned NUM_VEC = 8,
  parameter int unsigned NUM_GPO = 4
) (
  input  logic                               hclk,
  input  logic                               hresetn,
  input  logic                               hsel,
  input  ahb_m2s_t                           s_i,
  input  logic                               hready,
  output ahb_s2m_t                           s_o,
  // configuration
  output logic [NUM_IRQ-1:0]                 irq_en,
  output logic [NUM_IRQ-1:0][$clog2(NUM_VEC)-1:0] irq_route,
  output logic [NUM_VEC-1:0][31:0]           base_addr,
  output logic                               ctrl_start,
  output logic                               ctrl_fixed,
  output logic                               soft_rst,
  // status inputs
  input  logic                               in_service,
  input  logic [$clog2(NUM_VEC)-1:0]         sel_vec,
  input  logic [NUM_VEC-1:0]                 active_int,
  input  logic                               error_i,
  input  logic                               exec_busy,
  input  err_cause_e                         err_cause,
  input  logic [31:0]                        err_pc,
  input  core_state_t                        core,
  input  logic [NUM_GPO-1:0]                 gpo,
  // debug register bus
  output logic                               dbg_we,
  output logic [11:0]                        dbg_addr,
  output logic [31:0]                        dbg_wdata,
  input  logic [31:0]                        dbg_rdata,
  input  logic                               dbg_hit
);

  localparam int unsigned VW = $clog2(NUM_VEC);

  logic        wr_q;
  logic [11:0] addr_q;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      wr_q   <= 1'b0;
      addr_q <= '0;
    end else if (hready) begin
      wr_q   <= hsel && s_i.htrans[1] && s_i.hwrite;
      addr_q <= {s_i.haddr[11:2], 2'b00};
    end
  end

  localparam int unsigned IW = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1;
  logic [9:0]    widx;
  logic [IW-1:0] lidx;   // interrupt line addressed by a config access
  assign widx = addr_q[11:2];
  assign lidx = IW'(widx);

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      irq_en     <= '0;
      irq_route  <= '0;
      base_addr  <= '0;
      ctrl_start <= 1'b0;
      ctrl_fixed <= 1'b0;
      soft_rst   <= 1'b0;
    end else begin
      soft_rst <= 1'b0;
      if (wr_q) begin
        if (addr_q < 12'(4 * NUM_IRQ)) begin
          irq_en[lidx]    <= s_i.hwdata[VW];
          irq_route[lidx] <= s_i.hwdata[VW-1:0];
        end else if (addr_q >= REG_BASE && addr_q < REG_BASE + 12'(4 * NUM_VEC)) begin
          base_addr[10'(widx - 10'(REG_BASE >> 2))] <= s_i.hwdata;
        end else if (addr_q == REG_CTRL) begin
          ctrl_start <= s_i.hwdata[0];
          ctrl_fixed <= s_i.hwdata[1];
          soft_rst   <= s_i.hwdata[2];
        end
      end
    end
  end

  assign dbg_we    = wr_q;
  assign dbg_addr  = addr_q;
  assign dbg_wdata = s_i.hwdata;

  logic [31:0] rdata;
  always_comb begin
    rdata = '0;
    if (addr_q < 12'(4 * NUM_IRQ))
      rdata = 32'({irq_en[lidx], irq_route[lidx]});
    else if (addr_q >= REG_BASE && addr_q < REG_BASE + 12'(4 * NUM_VEC))
      rdata = base_addr[10'(widx - 10'(REG_BASE >> 2))];
    else if (addr_q >= REG_GPR && addr_q < REG_GPR + 12'd32)
      rdata = core.gpr[addr_q[4:2]];
    else if (dbg_hit)
      rdata = dbg_rdata;
    else begin
      unique case (addr_q)
        REG_STATUS: rdata = 32'({active_int, 2'b00, exec_busy, error_i, VW'(sel_vec), in_service});
        REG_CTRL:   rdata = {29'h0, 1'b0, ctrl_fixed, ctrl_start};
        REG_ERR:    rdata = 32'(err_cause);
        REG_ERR_PC: rdata = err_pc;
        REG_PC:     rdata = core.pc;
        REG_ACC:    rdata = core.acc;
        REG_FLAG:   rdata = 32'(core.flag);
        REG_GPO:    rdata = 32'(gpo);
        default:    rdata = '0;
      endcase
    end
  end

  assign s_o.hrdata    = rdata;
  assign s_o.hreadyout = 1'b1;
  assign s_o.hresp     = HRESP_OKAY;

endmodule
