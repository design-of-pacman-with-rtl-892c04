// tb_pacman_ahb_master: checks Pacman's AHB master against the memory model
// with random wait states and a randomly withheld bus grant. The testbench
// plays the arbiter: the grant is registered on HREADY into an ownership
// flag and the master's address phase reaches the memory only while it owns
// the bus. Random SINGLE/INCR4/INCR8 reads must return the memory contents
// in order with one rvalid per beat and one done; single writes must land in
// memory; a read from the error region must end with done+err and cancel
// the rest of the burst. The memory model counts burst-rule violations
// (address step, HBURST change, 1 KB crossing).
module tb_pacman_ahb_master;
  import ahb_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic cmd_valid, cmd_write, cmd_ready, rvalid, done, err, hbusreq, hgrant, owned;
  logic [31:0] cmd_addr, cmd_wdata, rdata; logic [3:0] cmd_beats;
  ahb_m2s_t mo, si; ahb_s2m_t so;
  int checks = 0, failures = 0;
  int n_rv, n_done, n_err;
  logic [31:0] got [$];

  pacman_ahb_master dut (.hclk, .hresetn, .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata,
    .cmd_ready, .rvalid, .rdata, .done, .err, .m_o(mo), .m_i(so), .hbusreq, .hgrant);
  tb_ahb_mem #(.BYTES(8192), .MAX_WAIT(3), .ERR_LO(32'h1F00), .ERR_HI(32'h1FFF)) mem
    (.hclk, .hresetn, .hsel(1'b1), .s_i(si), .hready(so.hreadyout), .s_o(so));
  always #5 hclk = ~hclk;

  always_ff @(posedge hclk) begin
    if (!hresetn) owned <= 1'b0;
    else if (so.hreadyout) owned <= hgrant;
  end
  always_comb begin
    si = owned ? mo : AHB_M2S_IDLE;
    si.hwdata = mo.hwdata;
  end
  always @(posedge hclk) begin
    hgrant <= hbusreq && ($urandom % 3 != 0);
    if (rvalid) begin got.push_back(rdata); n_rv++; end
    if (done) n_done++;
    if (err) n_err++;
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [31:0] a, input int beats, input logic wr, input logic [31:0] wd);
    int t = 0;
    got.delete(); n_rv = 0; n_done = 0; n_err = 0;
    @(negedge hclk);
    while (!cmd_ready) @(negedge hclk);
    cmd_valid = 1; cmd_addr = a; cmd_beats = 4'(beats); cmd_write = wr; cmd_wdata = wd;
    @(negedge hclk); cmd_valid = 0;
    while (n_done == 0 && t < 500) begin @(negedge hclk); t++; end
    repeat (2) @(negedge hclk);
  endtask

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cmd_valid = 0; cmd_addr = 0; cmd_beats = 1; cmd_write = 0; cmd_wdata = 0;
    for (int i = 0; i < 8192; i += 4) mem.poke32(i, $urandom);
    repeat (3) @(posedge hclk); hresetn = 1;
    for (int k = 0; k < 300; k++) begin
      automatic int sel = $urandom % 4;
      automatic int beats = sel == 0 ? 1 : sel == 1 ? 4 : 8;
      automatic logic [31:0] a = (32'($urandom % 7936)) & ~32'(beats * 4 - 1);
      if (sel == 3) begin
        automatic logic [31:0] wd = $urandom;
        a = 32'($urandom % 7936) & ~32'h3;
        run(a, 1, 1'b1, wd);
        chk(n_done == 1 && n_err == 0 && n_rv == 0, "write done");
        chk(mem.peek32(a) == wd, $sformatf("write %h", a));
      end else begin
        run(a, beats, 1'b0, 0);
        chk(n_done == 1 && n_err == 0 && n_rv == beats, $sformatf("read %0d beats at %h: rv=%0d done=%0d", beats, a, n_rv, n_done));
        for (int b = 0; b < beats && b < got.size(); b++)
          chk(got[b] == mem.peek32(a + 4 * b), $sformatf("beat %0d at %h", b, a));
      end
    end
    // error on the first beat and in the middle of a burst
    run(32'h1F00, 8, 1'b0, 0);
    chk(n_done == 1 && n_err == 1 && n_rv == 0, "INCR8 into error region");
    run(32'h1EF0, 8, 1'b0, 0);
    chk(n_done == 1 && n_err == 1 && n_rv <= 4, $sformatf("INCR8 crossing into error region rv=%0d", n_rv));
    run(32'h1F10, 1, 1'b1, 32'h1234);
    chk(n_done == 1 && n_err == 1, "write error");
    run(32'h0040, 4, 1'b0, 0);
    chk(n_done == 1 && n_err == 0 && n_rv == 4, "read after error");
    chk(mem.proto_errors == 0, "burst rules");
    chk(mem.n_incr8 > 50 && mem.n_incr4 > 50 && mem.n_single > 50, "all burst types used");
    $display("single=%0d incr4=%0d incr8=%0d", mem.n_single, mem.n_incr4, mem.n_incr8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
