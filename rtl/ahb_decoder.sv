// ahb_decoder: AHB address decoder, default slave and slave-to-master
// multiplexer for up to 16 slaves.
//
// HSELx is decoded combinationally from HADDR: slave x is selected when it is
// enabled and (HADDR & ~SLV_MASK[x]) == SLV_BASE[x]. The selection is
// registered on every cycle with HREADY high, and that data-phase selection
// steers HRDATA, HRESP and HREADY (the chosen slave's HREADYOUT) back to the
// masters. An address that hits no slave goes to the built-in default slave,
// which answers IDLE/BUSY with a zero-wait OKAY and NONSEQ/SEQ with the
// two-cycle ERROR response.
//
// The slave numbering and windows follow the subsystem's memory map: slave 1
// SRAM 0x0000-0x1FFF, slave 2 Pacman 0x2000-0x2FFF, slave 3 System Register
// 0x3000-0x3FFF, all other slaves disabled. The default slave is this
// design's choice.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 16,
  parameter logic [NUM_SLAVES-1:0]        SLV_EN   = NUM_SLAVES'(16'b0000_0000_0000_1110),
  parameter logic [NUM_SLAVES-1:0][31:0]  SLV_BASE = {{(NUM_SLAVES-4){32'h0}},
                                                      32'h0000_3000, 32'h0000_2000,
                                                      32'h0000_0000, 32'h0},
  parameter logic [NUM_SLAVES-1:0][31:0]  SLV_MASK = {{(NUM_SLAVES-4){32'h0}},
                                                      32'h0000_0FFF, 32'h0000_0FFF,
                                                      32'h0000_1FFF, 32'h0}
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic [31:0]            haddr,
  input  htrans_e                htrans,
  output logic [NUM_SLAVES-1:0]  hsel,
  input  ahb_s2m_t               s_i [NUM_SLAVES],
  output ahb_s2m_t               bus_o
);

  localparam int unsigned IW = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;

  logic          hit;
  logic [IW-1:0] sel_idx;
  logic          dph_valid;   // a real slave owns the data phase
  logic [IW-1:0] dph_idx;
  logic          def_err;     // default slave owns the data phase of a transfer
  logic          def_second;  // second cycle of the default slave's ERROR

  always_comb begin
    hsel    = '0;
    hit     = 1'b0;
    sel_idx = '0;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      if (SLV_EN[i] && ((haddr & ~SLV_MASK[i]) == SLV_BASE[i]) && !hit) begin
        hsel[i] = 1'b1;
        hit     = 1'b1;
        sel_idx = IW'(i);
      end
    end
  end

  // bus HREADY, fed back to the data-phase registers
  logic hready;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dph_valid  <= 1'b0;
      dph_idx    <= '0;
      def_err    <= 1'b0;
      def_second <= 1'b0;
    end else begin
      if (hready) begin
        dph_valid  <= hit;
        dph_idx    <= sel_idx;
        def_err    <= !hit && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
        def_second <= 1'b0;
      end else if (def_err) begin
        def_second <= 1'b1;
      end
    end
  end

  always_comb begin
    if (def_err) begin
      bus_o.hrdata    = '0;
      bus_o.hresp     = HRESP_ERROR;
      bus_o.hreadyout = def_second;
    end else if (dph_valid) begin
      bus_o = s_i[dph_idx];
    end else begin
      bus_o = AHB_S2M_OKAY;
    end
  end

  assign hready = bus_o.hreadyout;

endmodule
