// tb_ahb_decoder: checks address decoding with the subsystem map (slave 1
// 0x0000-0x1FFF, slave 2 0x2000-0x2FFF, slave 3 0x3000-0x3FFF), that the
// data-phase multiplexer returns the selected slave's data and HREADYOUT
// (including wait states), and the default slave's two-cycle ERROR for an
// unmapped NONSEQ transfer and zero-wait OKAY for IDLE.
module tb_ahb_decoder;
  import ahb_pkg::*;
  localparam int NS = 16;
  logic hclk = 0, hresetn = 0;
  logic [31:0] haddr; htrans_e htrans;
  logic [NS-1:0] hsel;
  ahb_s2m_t s [NS];
  ahb_s2m_t bus;
  int checks = 0, failures = 0;

  ahb_decoder #(.NUM_SLAVES(NS)) dut (.hclk, .hresetn, .haddr, .htrans, .hsel, .s_i(s), .bus_o(bus));
  always #5 hclk = ~hclk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one address phase, then look at the data phase
  task automatic xfer(input logic [31:0] a, input int exp_slave);
    @(negedge hclk); haddr = a; htrans = HTRANS_NONSEQ; #1;
    if (exp_slave > 0) chk(hsel == NS'(1 << exp_slave), $sformatf("hsel for %h", a));
    else chk(hsel == '0, $sformatf("no hsel for %h", a));
    @(negedge hclk); htrans = HTRANS_IDLE; #1;
    if (exp_slave > 0) begin
      chk(bus.hrdata == 32'hA000_0000 + exp_slave && bus.hresp == HRESP_OKAY, $sformatf("data of slave %0d", exp_slave));
      chk(bus.hreadyout == s[exp_slave].hreadyout, "hready follows slave");
      while (!bus.hreadyout) @(negedge hclk);
    end else begin
      chk(!bus.hreadyout && bus.hresp == HRESP_ERROR, "default slave ERROR cycle 1");
      @(negedge hclk); #1;
      chk(bus.hreadyout && bus.hresp == HRESP_ERROR, "default slave ERROR cycle 2");
    end
  endtask

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) begin
      s[i].hrdata = 32'hA000_0000 + i; s[i].hreadyout = 1; s[i].hresp = HRESP_OKAY;
    end
    haddr = 0; htrans = HTRANS_IDLE;
    repeat (2) @(posedge hclk); #1 hresetn = 1;
    xfer(32'h0000_0000, 1); xfer(32'h0000_1FFC, 1); xfer(32'h0000_2000, 2);
    xfer(32'h0000_22C0, 2); xfer(32'h0000_2FFC, 2); xfer(32'h0000_3000, 3);
    xfer(32'h0000_3FFC, 3); xfer(32'h0000_4000, 0); xfer(32'h8000_0000, 0);
    // wait states from slave 1
    s[1].hreadyout = 0;
    fork
      begin repeat (3) @(posedge hclk); s[1].hreadyout = 1; end
      xfer(32'h0000_0100, 1);
    join
    for (int t = 0; t < 200; t++) begin
      logic [31:0] a = $urandom % 32'h5000;
      xfer(a, a < 32'h2000 ? 1 : a < 32'h3000 ? 2 : a < 32'h4000 ? 3 : 0);
    end
    // IDLE to an unmapped address: OKAY, no wait
    @(negedge hclk); haddr = 32'h9000_0000; htrans = HTRANS_IDLE;
    @(negedge hclk); #1;
    chk(bus.hreadyout && bus.hresp == HRESP_OKAY, "IDLE gets OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
