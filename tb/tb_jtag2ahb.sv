// tb_jtag2ahb: drives the JtagtoAHB bridge through its JTAG pins with the
// host model (tb_jtag_drv) and checks the AHB side against the memory
// model, with random wait states and a randomly delayed grant (the
// testbench registers the grant on HREADY and passes the bridge's address
// phase only while it owns the bus). Checks: IDCODE after TAP reset and
// after an IR scan, the one-bit BYPASS register, random word writes landing
// in memory, random reads returning memory data in the next command scan,
// the busy flag, the error flag after an access to the error region and its
// clearing on the next good access, and that a scan with the valid bit
// clear starts no transfer.
module tb_jtag2ahb;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic tck, tms, tdi, trst_n, tdo, hbusreq, hgrant, owned;
  ahb_m2s_t mo, si; ahb_s2m_t so;
  int checks = 0, failures = 0;

  jtag2ahb dut (.hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo, .m_o(mo), .m_i(so), .hbusreq, .hgrant);
  tb_jtag_drv #(.TCK_HALF(40)) jd (.tck, .tms, .tdi, .trst_n, .tdo);
  tb_ahb_mem #(.BYTES(8192), .MAX_WAIT(3), .ERR_LO(32'h1F00), .ERR_HI(32'h1FFF)) mem
    (.hclk, .hresetn, .hsel(1'b1), .s_i(si), .hready(so.hreadyout), .s_o(so));
  always #5 hclk = ~hclk;

  always_ff @(posedge hclk) begin
    if (!hresetn) owned <= 1'b0;
    else if (so.hreadyout) owned <= hgrant;
    hgrant <= hbusreq && ($urandom % 4 != 0);
  end
  always_comb begin
    si = owned ? mo : AHB_M2S_IDLE;
    si.hwdata = mo.hwdata;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] o;
    logic [31:0] d;
    int n0;
    for (int i = 0; i < 8192; i += 4) mem.poke32(i, $urandom);
    repeat (3) @(posedge hclk); hresetn = 1;
    jd.reset_tap();
    jd.scan_dr('0, 32, o);
    chk(o[31:0] == 32'h149511C3, $sformatf("IDCODE after reset %h", o[31:0]));
    jd.scan_ir(4'b1111, 4, o);
    jd.scan_dr(128'h5, 4, o);
    chk(o[3:0] == 4'b1010, $sformatf("BYPASS delays by one bit %b", o[3:0]));
    jd.scan_ir(4'b0001, 4, o);
    jd.scan_dr('0, 32, o);
    chk(o[31:0] == 32'h149511C3, "IDCODE instruction");
    jd.scan_ir(4'b1000, 4, o);
    for (int k = 0; k < 25; k++) begin
      automatic logic [31:0] a = 32'($urandom % 7936) & ~32'h3;
      automatic logic [31:0] w = $urandom;
      jd.ahb_write(a, w);
      jd.scan_dr('0, 66, o);
      chk(o[33:32] == 2'b00, "write finished without error");
      chk(mem.peek32(a) == w, $sformatf("write %h", a));
      a = 32'($urandom % 7936) & ~32'h3;
      jd.ahb_read(a, d);
      chk(d == mem.peek32(a), $sformatf("read %h: %h/%h", a, d, mem.peek32(a)));
    end
    jd.ahb_read(32'h1F40, d);
    jd.scan_dr('0, 66, o);
    chk(o[33] == 1'b1, "error flag after error-region read");
    jd.ahb_write(32'h1F44, 32'hDEAD);
    jd.scan_dr('0, 66, o);
    chk(o[33] == 1'b1, "error flag after error-region write");
    jd.ahb_read(32'h0010, d);
    jd.scan_dr('0, 66, o);
    chk(o[33] == 1'b0 && o[31:0] == mem.peek32(32'h10), "error flag cleared by a good access");
    n0 = mem.n_reads + mem.n_writes;
    jd.scan_dr({62'h0, 1'b0, 1'b1, 32'h20, 32'h55}, 66, o);
    jd.scan_dr('0, 66, o);
    chk(mem.n_reads + mem.n_writes == n0 && mem.peek32(32'h20) != 32'h55, "valid bit clear: no transfer");
    // busy: hold the grant off and look at the status right after the update
    force hgrant = 1'b0;
    jd.ahb_write(32'h0100, 32'h11);
    jd.scan_dr('0, 66, o);
    chk(o[32] == 1'b1, "busy while the bus is not granted");
    release hgrant;
    repeat (20) @(posedge hclk);
    jd.scan_dr('0, 66, o);
    chk(o[32] == 1'b0 && mem.peek32(32'h100) == 32'h11, "write completes after grant");
    chk(mem.proto_errors == 0, "AHB rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
