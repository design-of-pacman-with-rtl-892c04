// sram_8k: the subsystem's 8 KB on-chip memory as a zero-wait-state AHB
// slave. It holds the microcode that Pacman runs and any data the microcode
// loads or stores.
//
// The address phase (HSEL, HREADY and a NONSEQ/SEQ transfer) is registered;
// in the data phase a write updates the byte lanes selected by HSIZE and the
// address, and a read returns the addressed word. Every transfer completes
// in one data-phase cycle with an OKAY response. Addresses wrap inside the
// BYTES window.
//
// The 8 KB size and its window (0x0000-0x1FFF) follow the subsystem's memory
// map; the memory organisation (32-bit words, little-endian byte lanes) and
// the zero wait states are this design's choice.
module sram_8k
  import ahb_pkg::*;
#(
  parameter int unsigned BYTES = 8192
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_m2s_t s_i,
  input  logic     hready,
  output ahb_s2m_t s_o
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic          wr_q;
  logic [AW-1:0] addr_q;
  logic [3:0]    lanes_q;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      wr_q    <= 1'b0;
      addr_q  <= '0;
      lanes_q <= '0;
    end else if (hready) begin
      wr_q    <= hsel && s_i.htrans[1] && s_i.hwrite;
      addr_q  <= s_i.haddr[AW+1:2];
      lanes_q <= byte_lanes(s_i.hsize, s_i.haddr[1:0]);
    end
  end

  always_ff @(posedge hclk) begin
    if (wr_q) begin
      for (int b = 0; b < 4; b++)
        if (lanes_q[b]) mem[addr_q][8*b +: 8] <= s_i.hwdata[8*b +: 8];
    end
  end

  assign s_o.hrdata    = mem[addr_q];
  assign s_o.hreadyout = 1'b1;
  assign s_o.hresp     = HRESP_OKAY;

endmodule
