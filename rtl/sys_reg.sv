// sys_reg: System Register, an AHB slave whose bits drive Pacman's interrupt
// lines so that software (here, the JTAG debugger) can raise interrupts in a
// system without peripherals.
//
// Word n of the window (offset 4*n) holds interrupt lines 32n..32n+31; a bit
// written to 1 drives its line high until it is written back to 0, which
// matches Pacman's active-high level-sensitive inputs. All words read back.
// Zero wait states, OKAY responses; HSIZE is ignored (word accesses).
//
// That writing 1 to offset 0 raises an interrupt follows the subsystem
// description; the layout of the other 127 lines over further words is this
// design's choice.
module sys_reg
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_IRQ = 128
) (
  input  logic               hclk,
  input  logic               hresetn,
  input  logic               hsel,
  input  ahb_m2s_t           s_i,
  input  logic               hready,
  output ahb_s2m_t           s_o,
  output logic [NUM_IRQ-1:0] irq_o
);

  localparam int unsigned NW = (NUM_IRQ + 31) / 32;
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic [31:0]   regs [NW];
  logic          wr_q;
  logic [9:0]    addr_q;   // word index inside the 4 KB window

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      wr_q   <= 1'b0;
      addr_q <= '0;
    end else if (hready) begin
      wr_q   <= hsel && s_i.htrans[1] && s_i.hwrite;
      addr_q <= s_i.haddr[11:2];
    end
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      for (int i = 0; i < NW; i++) regs[i] <= '0;
    end else if (wr_q && addr_q < 10'(NW)) begin
      regs[addr_q[IW-1:0]] <= s_i.hwdata;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_IRQ; i++) irq_o[i] = regs[i / 32][i % 32];
  end

  assign s_o.hrdata    = (addr_q < 10'(NW)) ? regs[addr_q[IW-1:0]] : 32'h0;
  assign s_o.hreadyout = 1'b1;
  assign s_o.hresp     = HRESP_OKAY;

endmodule
