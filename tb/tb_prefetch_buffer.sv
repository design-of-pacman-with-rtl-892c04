// tb_prefetch_buffer: checks the prefetch buffer (with the AHB master and
// the memory model, random wait states) from the execution unit's side.
// The testbench walks a byte cursor through memory: every cycle with bytes
// available it compares the peeked bytes with memory at the cursor and
// consumes a random 0..5 of them. It randomly jumps (redirect) to
// unaligned targets, restarts with sop, stops, and issues single-word loads
// and stores, which must complete with correct data while the stream stays
// intact. Finally a fetch from the error region must raise pf_err. The
// memory model checks the burst rules; INCR8, INCR4 and SINGLE must all be
// used.
module tb_prefetch_buffer;
  import ahb_pkg::*;
  import pacman_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic sop, redirect, stop, pf_err, mem_valid, mem_done, mem_err;
  logic [31:0] target, mem_rdata;
  logic [5:0] avail; logic [39:0] peek; logic [2:0] consume;
  mem_req_t mem_req;
  logic cmd_valid, cmd_write, cmd_ready, rvalid, mdone, merr, hbusreq;
  logic [31:0] cmd_addr, cmd_wdata, rdata; logic [3:0] cmd_beats;
  ahb_m2s_t mm; ahb_s2m_t ms;
  int checks = 0, failures = 0, n_bytes = 0, n_redir = 0, n_ld = 0, n_st = 0;

  prefetch_buffer dut (.hclk, .hresetn, .sop, .redirect, .target, .stop, .avail, .peek, .consume,
    .pf_err, .mem_valid, .mem_req, .mem_done, .mem_rdata, .mem_err, .cmd_valid, .cmd_addr,
    .cmd_beats, .cmd_write, .cmd_wdata, .cmd_ready, .rvalid, .rdata, .done(mdone), .err(merr));
  pacman_ahb_master u_m (.hclk, .hresetn, .cmd_valid, .cmd_addr, .cmd_beats, .cmd_write, .cmd_wdata,
    .cmd_ready, .rvalid, .rdata, .done(mdone), .err(merr), .m_o(mm), .m_i(ms), .hbusreq, .hgrant(1'b1));
  tb_ahb_mem #(.BYTES(8192), .MAX_WAIT(2), .ERR_LO(32'h1F00), .ERR_HI(32'h1FFF)) mem
    (.hclk, .hresetn, .hsel(1'b1), .s_i(mm), .hready(ms.hreadyout), .s_o(ms));
  always #5 hclk = ~hclk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] cur;
    int bad = 0;
    sop = 0; redirect = 0; stop = 0; target = 0; consume = 0; mem_valid = 0; mem_req = '0;
    for (int i = 0; i < 8192; i += 4) mem.poke32(i, $urandom);
    repeat (3) @(posedge hclk); hresetn = 1;
    @(negedge hclk);
    cur = 32'h123; sop = 1; target = cur; @(negedge hclk); sop = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      automatic int r = $urandom % 100;
      consume = 0;
      if (r < 2) begin
        // jump
        cur = 32'($urandom % 7000); redirect = 1; target = cur; n_redir++;
        @(negedge hclk); redirect = 0; continue;
      end
      if (r == 2) begin
        // END then a new start
        stop = 1; @(negedge hclk); stop = 0;
        repeat ($urandom % 5) @(negedge hclk);
        cur = 32'($urandom % 7000); sop = 1; target = cur;
        @(negedge hclk); sop = 0; continue;
      end
      if (r < 6) begin
        // load or store, the stream is not consumed meanwhile
        automatic logic wr = $urandom % 2;
        automatic logic [31:0] a = 32'h1000 + 4 * ($urandom % 256), wd = $urandom;
        automatic int t = 0;
        mem_valid = 1; mem_req.write = wr; mem_req.addr = a; mem_req.wdata = wd;
        while (!mem_done && t < 200) begin @(negedge hclk); t++; end
        chk(mem_done && !mem_err, "data transfer done");
        if (wr) begin @(negedge hclk); chk(mem.peek32(a) == wd, $sformatf("store %h", a)); n_st++; end
        else begin chk(mem_rdata == mem.peek32(a), $sformatf("load %h", a)); n_ld++; end
        mem_valid = 0;
        @(negedge hclk); continue;
      end
      if (avail > 0) begin
        automatic int n = avail > 5 ? 5 : int'(avail);
        automatic logic ok = 1;
        for (int b = 0; b < n; b++) if (peek[8*b +: 8] != mem.mem[cur + b]) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          if (bad++ < 5) $display("FAIL stream at %h avail %0d peek %h", cur, avail, peek);
        end
        consume = 3'($urandom % (n + 1));
        cur += consume; n_bytes += consume;
      end
      @(negedge hclk);
      if (cur > 7900) begin
        cur = 32'($urandom % 1000); redirect = 1; target = cur; consume = 0;
        @(negedge hclk); redirect = 0;
      end
    end
    consume = 0;
    chk(!pf_err, "no fetch error so far");
    redirect = 1; target = 32'h1EF3; @(negedge hclk); redirect = 0;
    repeat (100) @(negedge hclk);
    chk(pf_err, "fetch error raised");
    chk(mem.proto_errors == 0, "AHB rules");
    chk(mem.n_incr8 > 0 && mem.n_incr4 > 0 && mem.n_single > 0, "all burst types used");
    $display("bytes=%0d redirects=%0d loads=%0d stores=%0d single=%0d incr4=%0d incr8=%0d",
      n_bytes, n_redir, n_ld, n_st, mem.n_single, mem.n_incr4, mem.n_incr8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
