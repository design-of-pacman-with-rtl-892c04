// pacman_ahb_master: Pacman's AHB master interface. It performs the
// transfers the prefetch buffer asks for: INCR8 and INCR4 read bursts of
// microcode and SINGLE word reads or writes for load and store
// instructions.
//
// A command is accepted when cmd_ready is high (no transfer in progress).
// The master then requests the bus (HBUSREQ) until its last address phase
// has been accepted, drives NONSEQ for the first beat and SEQ for the rest
// with the address rising by 4, and holds the write data for a write's data
// phase. Each read beat is returned on rvalid/rdata as its data phase
// completes; done pulses with the last data phase, and err goes with done
// if any beat ended in an ERROR response. After an ERROR the remaining beats
// of a burst are cancelled (IDLE is driven in the second ERROR cycle).
//
// The single/4-beat/8-beat transfer set follows the document; the command
// interface and the cancel-on-error policy are this design's choices. Bursts
// must not cross a 1 KB boundary; the prefetch buffer guarantees that by
// starting them aligned.
module pacman_ahb_master
  import ahb_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  // command from the prefetch buffer
  input  logic        cmd_valid,
  input  logic [31:0] cmd_addr,
  input  logic [3:0]  cmd_beats,   // 1, 4 or 8
  input  logic        cmd_write,   // single beats only
  input  logic [31:0] cmd_wdata,
  output logic        cmd_ready,
  output logic        rvalid,
  output logic [31:0] rdata,
  output logic        done,
  output logic        err,
  // AHB
  output ahb_m2s_t    m_o,
  input  ahb_s2m_t    m_i,
  output logic        hbusreq,
  input  logic        hgrant
);

  logic        owned;
  logic        busy, write_q, dph, first, abort, err_seen;
  logic [31:0] addr_q, wdata_q;
  logic [3:0]  addr_left, data_left, beats_q;
  logic        drive_addr;

  logic        hready;

  assign hready     = m_i.hreadyout;
  assign drive_addr = busy && owned && addr_left != 0 && !abort;

  always_ff @(posedge hclk) begin
    if (!hresetn)    owned <= 1'b0;
    else if (hready) owned <= hgrant;
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      busy <= 1'b0; write_q <= 1'b0; dph <= 1'b0; first <= 1'b0; abort <= 1'b0;
      err_seen <= 1'b0; addr_q <= '0; wdata_q <= '0; addr_left <= '0; data_left <= '0;
      beats_q <= '0;
    end else begin
      if (!busy) begin
        if (cmd_valid) begin
          busy      <= 1'b1;
          write_q   <= cmd_write;
          addr_q    <= cmd_addr;
          wdata_q   <= cmd_wdata;
          addr_left <= cmd_beats;
          data_left <= cmd_beats;
          beats_q   <= cmd_beats;
          first     <= 1'b1;
          abort     <= 1'b0;
          err_seen  <= 1'b0;
        end
      end else begin
        // first cycle of a two-cycle ERROR: cancel the rest of the burst
        if (dph && !hready && m_i.hresp == HRESP_ERROR) abort <= 1'b1;
        if (hready) begin
          if (drive_addr) begin
            addr_q    <= addr_q + 32'd4;
            addr_left <= addr_left - 4'd1;
            first     <= 1'b0;
          end
          dph <= drive_addr;
          if (dph) begin
            if (m_i.hresp == HRESP_ERROR) err_seen <= 1'b1;
            data_left <= data_left - 4'd1;
            if (data_left == 4'd1 || abort || m_i.hresp == HRESP_ERROR) begin
              busy <= 1'b0;
              dph  <= 1'b0;
            end
          end
        end
      end
    end
  end

  assign cmd_ready = !busy;
  assign rvalid    = busy && dph && hready && !write_q && m_i.hresp != HRESP_ERROR;
  assign rdata     = m_i.hrdata;
  assign done      = busy && dph && hready &&
                     (data_left == 4'd1 || abort || m_i.hresp == HRESP_ERROR);
  assign err       = done && (err_seen || m_i.hresp == HRESP_ERROR);
  assign hbusreq   = busy && addr_left != 0 && !abort;

  always_comb begin
    m_o        = AHB_M2S_IDLE;
    m_o.haddr  = addr_q;
    m_o.hwrite = write_q;
    m_o.hwdata = wdata_q;
    m_o.hburst = (beats_q == 4'd8) ? HBURST_INCR8 :
                 (beats_q == 4'd4) ? HBURST_INCR4 : HBURST_SINGLE;
    if (drive_addr) m_o.htrans = first ? HTRANS_NONSEQ : HTRANS_SEQ;
  end

endmodule
