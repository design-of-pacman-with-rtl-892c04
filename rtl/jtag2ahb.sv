// jtag2ahb: JtagtoAHB bridge. A debugger shifts AHB commands in through the
// JTAG port and this block performs them as single 32-bit AHB transfers;
// it is AHB master 1 of the subsystem.
//
// With the TAP's user instruction selected, the 66-bit data register is
//   [65] valid  [64] write  [63:32] address  [31:0] write data
// shifted in LSB first. On Update-DR a valid command starts one NONSEQ
// SINGLE word transfer (ignored while a transfer is still running). On
// Capture-DR the register is loaded with the result of the last transfer:
//   [65:34] zero  [33] error (HRESP ERROR seen)  [32] busy  [31:0] read data
// so a read is one scan with the command and a second scan (valid = 0) to
// collect the data. The master requests the bus with HBUSREQ, drives the
// address phase once it owns the bus, and holds the write data for the data
// phase.
//
// That a JTAG scan becomes an AHB transfer follows the document; the command
// format, the two-scan read and the single-transfer-only master are this
// design's choices.
module jtag2ahb
  import ahb_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h149511C3
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     tck,
  input  logic     tms,
  input  logic     tdi,
  input  logic     trst_n,
  output logic     tdo,
  output ahb_m2s_t m_o,
  input  ahb_s2m_t m_i,
  output logic     hbusreq,
  input  logic     hgrant
);

  localparam int unsigned DR_LEN = 66;

  logic user_sel, user_capture, user_shift, user_update, tdi_bit;
  logic [DR_LEN-1:0] dr;

  jtag_tap #(.IDCODE(IDCODE)) u_tap (
    .hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo,
    .user_sel, .user_capture, .user_shift, .user_update, .tdi_bit,
    .user_tdo(dr[0])
  );

  typedef enum logic [1:0] {J_IDLE, J_ADDR, J_DATA} jst_e;
  jst_e        st;
  logic        cmd_write, err_q, owned;
  logic [31:0] cmd_addr, cmd_wdata, rdata_q;

  always_ff @(posedge hclk) begin
    if (!hresetn) dr <= '0;
    else if (user_capture) dr <= {32'h0, err_q, (st != J_IDLE), rdata_q};
    else if (user_shift)   dr <= {tdi_bit, dr[DR_LEN-1:1]};
  end

  // owned: this master owns the address bus in the current cycle
  always_ff @(posedge hclk) begin
    if (!hresetn)    owned <= 1'b0;
    else if (m_i.hreadyout) owned <= hgrant;
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      st        <= J_IDLE;
      cmd_write <= 1'b0;
      cmd_addr  <= '0;
      cmd_wdata <= '0;
      rdata_q   <= '0;
      err_q     <= 1'b0;
    end else begin
      unique case (st)
        J_IDLE: if (user_update && dr[65]) begin
          cmd_write <= dr[64];
          cmd_addr  <= dr[63:32];
          cmd_wdata <= dr[31:0];
          st        <= J_ADDR;
        end
        J_ADDR: if (owned && m_i.hreadyout) st <= J_DATA;
        J_DATA: if (m_i.hreadyout) begin
          if (!cmd_write) rdata_q <= m_i.hrdata;
          err_q <= (m_i.hresp == HRESP_ERROR);
          st    <= J_IDLE;
        end
        default: st <= J_IDLE;
      endcase
    end
  end

  assign hbusreq = (st == J_ADDR);

  always_comb begin
    m_o        = AHB_M2S_IDLE;
    m_o.haddr  = cmd_addr;
    m_o.hwrite = cmd_write;
    m_o.hwdata = cmd_wdata;
    if (st == J_ADDR && owned) m_o.htrans = HTRANS_NONSEQ;
  end

endmodule
