// soc_top: the Pacman subsystem. A debugger reaches the chip over JTAG; the
// JtagtoAHB bridge turns its scans into AHB transfers, so it can load
// microcode into the 8 KB SRAM, program Pacman and raise interrupts through
// the System Register. Pacman fetches that microcode from the SRAM with its
// own AHB master and serves the interrupts.
//
// Bus: one shared AHB (32-bit address and data) with a 16-master arbiter
// and a 16-slave decoder. Master 1 is JtagtoAHB and master 2 is Pacman's
// master; slave 1 is the SRAM (0x0000-0x1FFF), slave 2 Pacman's register
// window (0x2000-0x2FFF) and slave 3 the System Register (0x3000-0x3FFF).
// The unused masters are tied idle and never request; the unused slaves are
// disabled in the decoder, and accesses outside the three windows get an
// ERROR response. Everything runs on HCLK with synchronous active-low reset;
// JTAG is sampled with HCLK.
//
// The masters, slaves, windows and the 16x16 arbiter follow the document.
// Making Pacman's master number 2 is this design's choice: the document
// names only JtagtoAHB as a master of the arbiter although Pacman fetches
// its microcode over the bus.
module soc_top
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_IRQ = 128,
  parameter logic [31:0] IDCODE  = 32'h149511C3
) (
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       tck,
  input  logic       tms,
  input  logic       tdi,
  input  logic       trst_n,
  output logic       tdo,
  input  logic [3:0] event_i,
  output logic [3:0] gpo_o,
  output logic       error_o
);

  localparam int unsigned NM = 16;
  localparam int unsigned NS = 16;

  ahb_m2s_t    m_req  [NM];
  ahb_s2m_t    s_resp [NS];
  logic [NM-1:0] hbusreq, hlock, hgrant;
  logic [NS-1:0] hsel;
  logic [3:0]  hmaster;
  logic        hmastlock;
  ahb_m2s_t    bus;
  ahb_s2m_t    resp;
  logic [NUM_IRQ-1:0] irq;

  ahb_arbiter #(.NUM_MASTERS(NM)) u_arbiter (
    .hclk, .hresetn, .m_i(m_req), .hbusreq, .hlock, .hready(resp.hreadyout),
    .hgrant, .hmaster, .hmastlock, .bus_o(bus)
  );

  ahb_decoder #(.NUM_SLAVES(NS)) u_decoder (
    .hclk, .hresetn, .haddr(bus.haddr), .htrans(bus.htrans), .hsel,
    .s_i(s_resp), .bus_o(resp)
  );

  // unused masters and slaves
  always_comb begin
    for (int i = 0; i < NM; i++) if (i != 1 && i != 2) m_req[i] = AHB_M2S_IDLE;
    for (int i = 0; i < NS; i++) if (i < 1 || i > 3)   s_resp[i] = AHB_S2M_OKAY;
  end
  assign hlock = '0;
  assign hbusreq[0] = 1'b0;
  assign hbusreq[NM-1:3] = '0;

  jtag2ahb #(.IDCODE(IDCODE)) u_jtag2ahb (
    .hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo,
    .m_o(m_req[1]), .m_i(resp), .hbusreq(hbusreq[1]), .hgrant(hgrant[1])
  );

  sram_8k u_sram (
    .hclk, .hresetn, .hsel(hsel[1]), .s_i(bus), .hready(resp.hreadyout), .s_o(s_resp[1])
  );

  pacman_top #(.NUM_IRQ(NUM_IRQ)) u_pacman (
    .hclk, .hresetn, .irq_i(irq), .event_i, .gpo_o, .error_o,
    .hsel(hsel[2]), .s_i(bus), .hready(resp.hreadyout), .s_o(s_resp[2]),
    .m_o(m_req[2]), .m_i(resp), .hbusreq(hbusreq[2]), .hgrant(hgrant[2])
  );

  sys_reg #(.NUM_IRQ(NUM_IRQ)) u_sysreg (
    .hclk, .hresetn, .hsel(hsel[3]), .s_i(bus), .hready(resp.hreadyout), .s_o(s_resp[3]),
    .irq_o(irq)
  );

endmodule
