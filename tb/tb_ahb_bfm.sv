// tb_ahb_bfm: testbench-only AHB master bus-functional model for a bus with
// a single master (no arbitration). Tasks write32/read32 perform one
// NONSEQ SINGLE word transfer each, honouring HREADY, and report the HRESP
// seen in the data phase. Not synthesizable.
module tb_ahb_bfm
  import ahb_pkg::*;
(
  input  logic     hclk,
  output ahb_m2s_t m_o,
  input  ahb_s2m_t m_i
);

  hresp_e last_resp;

  initial m_o = AHB_M2S_IDLE;

  task automatic write32(input logic [31:0] addr, input logic [31:0] data);
    @(negedge hclk);
    m_o = AHB_M2S_IDLE;
    m_o.haddr  = addr;
    m_o.hwrite = 1'b1;
    m_o.htrans = HTRANS_NONSEQ;
    do @(posedge hclk); while (!m_i.hreadyout);
    @(negedge hclk);
    m_o.htrans = HTRANS_IDLE;
    m_o.hwdata = data;
    do @(posedge hclk); while (!m_i.hreadyout);
    last_resp = m_i.hresp;
  endtask

  task automatic read32(input logic [31:0] addr, output logic [31:0] data);
    @(negedge hclk);
    m_o = AHB_M2S_IDLE;
    m_o.haddr  = addr;
    m_o.hwrite = 1'b0;
    m_o.htrans = HTRANS_NONSEQ;
    do @(posedge hclk); while (!m_i.hreadyout);
    @(negedge hclk);
    m_o.htrans = HTRANS_IDLE;
    do @(posedge hclk); while (!m_i.hreadyout);
    data      = m_i.hrdata;
    last_resp = m_i.hresp;
  endtask

  // byte or halfword write (HSIZE)
  task automatic write_sized(input logic [31:0] addr, input logic [2:0] size, input logic [31:0] data);
    @(negedge hclk);
    m_o = AHB_M2S_IDLE;
    m_o.haddr  = addr;
    m_o.hwrite = 1'b1;
    m_o.hsize  = size;
    m_o.htrans = HTRANS_NONSEQ;
    do @(posedge hclk); while (!m_i.hreadyout);
    @(negedge hclk);
    m_o.htrans = HTRANS_IDLE;
    m_o.hwdata = data;
    do @(posedge hclk); while (!m_i.hreadyout);
    last_resp = m_i.hresp;
  endtask

endmodule
