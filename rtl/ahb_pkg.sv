// ahb_pkg: shared AMBA AHB (AHB2-style, with HBUSREQ/HGRANT arbitration) types
// and encodings used by every bus master, slave and the interconnect.
// A master drives one ahb_m2s_t (address, control and write data); a slave
// answers with one ahb_s2m_t (read data, HREADYOUT, two-bit HRESP).
// The HBURST and HRESP encodings are the standard AHB ones. The field set
// (no HPROT, no HSPLIT) is this design's choice: no slave here issues
// RETRY or SPLIT.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  localparam logic [2:0] HSIZE_BYTE = 3'b000;
  localparam logic [2:0] HSIZE_HALF = 3'b001;
  localparam logic [2:0] HSIZE_WORD = 3'b010;

  // master -> bus
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    hburst_e     hburst;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // slave -> bus
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    hresp_e      hresp;
  } ahb_s2m_t;

  localparam ahb_m2s_t AHB_M2S_IDLE = '{haddr: '0, htrans: HTRANS_IDLE, hwrite: 1'b0,
                                        hsize: HSIZE_WORD, hburst: HBURST_SINGLE, hwdata: '0};
  localparam ahb_s2m_t AHB_S2M_OKAY = '{hrdata: '0, hreadyout: 1'b1, hresp: HRESP_OKAY};

  // Byte-lane write mask for a little-endian 32-bit bus.
  function automatic logic [3:0] byte_lanes(input logic [2:0] hsize, input logic [1:0] a);
    unique case (hsize)
      HSIZE_BYTE: byte_lanes = 4'b0001 << a;
      HSIZE_HALF: byte_lanes = a[1] ? 4'b1100 : 4'b0011;
      default:    byte_lanes = 4'b1111;
    endcase
  endfunction

endpackage
