// tb_ahb_arbiter: checks the 16-master arbiter against a cycle model. Random
// bus requests, locks and HREADY; each cycle the grant must be one-hot, stay
// with a requesting or locking owner, otherwise move to the lowest-numbered
// requester; HMASTER/HMASTLOCK must follow the grant on HREADY, and the
// address/control must come from HMASTER and the write data from the
// previous address-phase owner.
module tb_ahb_arbiter;
  import ahb_pkg::*;
  localparam int N = 16;
  logic hclk = 0, hresetn = 0;
  ahb_m2s_t m [N];
  logic [N-1:0] req, lock, grant;
  logic hready, mlock;
  logic [3:0] hmaster;
  ahb_m2s_t bus;
  int checks = 0, failures = 0;
  int g_ref, hm_ref, hmd_ref, changes = 0;
  logic ml_ref;

  ahb_arbiter #(.NUM_MASTERS(N)) dut (.hclk, .hresetn, .m_i(m), .hbusreq(req), .hlock(lock),
    .hready, .hgrant(grant), .hmaster, .hmastlock(mlock), .bus_o(bus));

  always #5 hclk = ~hclk;

  initial begin
    #2000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      m[i] = AHB_M2S_IDLE; m[i].haddr = 32'h1000 * i; m[i].hwdata = 32'hD000_0000 + i;
    end
    req = '0; lock = '0; hready = 1;
    g_ref = 0; hm_ref = 0; hmd_ref = 0; ml_ref = 0;
    repeat (2) @(posedge hclk); #1 hresetn = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge hclk);
      // requests persist for a while, a few masters active
      for (int i = 0; i < N; i++) begin
        if (($urandom % 6) == 0) req[i] = (i < 4 || i == 9) ? $urandom % 2 : 0;
        lock[i] = req[i] && (($urandom % 8) == 0);
      end
      hready = ($urandom % 4) != 0;
      #1;
      checks++;
      if (grant !== N'(1 << g_ref) || hmaster !== 4'(hm_ref) || mlock !== ml_ref ||
          bus.haddr !== m[hm_ref].haddr || bus.hwdata !== m[hmd_ref].hwdata) begin
        failures++;
        $display("FAIL t=%0d grant=%h (ref %0d) hmaster=%0d (ref %0d) lock=%0d", t, grant, g_ref, hmaster, hm_ref, mlock);
      end
      @(posedge hclk);
      if (hready) begin
        int ng = g_ref;
        if (!req[g_ref] && !lock[g_ref] && req != 0) begin
          for (int i = N - 1; i >= 0; i--) if (req[i]) ng = i;
        end
        if (ng != g_ref) changes++;
        hmd_ref = hm_ref;
        ml_ref  = lock[g_ref];
        hm_ref  = g_ref;
        g_ref   = ng;
      end
    end
    checks++;
    if (changes < 20) begin failures++; $display("FAIL only %0d grant changes", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
