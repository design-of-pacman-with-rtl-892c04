// tb_jtag_tap: checks the TAP controller: after reset the IDCODE register is
// selected and shifts out 0x149511C3; Capture-IR shifts out binary ..01;
// BYPASS delays TDI by one bit; five TCK cycles with TMS high return to
// Test-Logic-Reset (IDCODE again); nTRST resets the TAP; the user
// instruction routes the user register to TDO and pulses capture, shift
// and update. Finally a 2000-cycle random walk of TMS/TDI is compared,
// after every TCK cycle, with a reference model of the IEEE 1149.1 state
// diagram and of the instruction register (shifted in Shift-IR, loaded in
// Update-IR, reset to IDCODE in Test-Logic-Reset).
module tb_jtag_tap;
  logic hclk = 0, hresetn = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic sel, cap, shf, upd, tdib;
  logic [127:0] o;
  int checks = 0, failures = 0, n_cap = 0, n_shift = 0, n_upd = 0;

  jtag_tap dut (.hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo, .user_sel(sel),
    .user_capture(cap), .user_shift(shf), .user_update(upd), .tdi_bit(tdib), .user_tdo(1'b1));
  tb_jtag_drv #(.TCK_HALF(40)) host (.tck, .tms, .tdi, .trst_n, .tdo);
  always #5 hclk = ~hclk;
  always @(posedge hclk) begin n_cap += int'(cap); n_shift += int'(shf); n_upd += int'(upd); end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s (o=%h)", what, o); end
  endtask

  initial begin
    #10000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge hclk); hresetn = 1;
    host.reset_tap();
    host.scan_dr('0, 32, o);       chk(o[31:0] == 32'h149511C3, "IDCODE after reset");
    host.scan_ir(128'hF, 4, o);    chk(o[1:0] == 2'b01, "Capture-IR 01");
    host.scan_dr(128'hA5, 9, o);   chk(o[8:0] == {8'hA5, 1'b0}, "BYPASS one-bit delay");
    host.reset_tap();
    host.scan_dr('0, 32, o);       chk(o[31:0] == 32'h149511C3, "IDCODE after TMS reset");
    host.scan_ir(128'hF, 4, o);
    host.trst_n = 0; #200; host.trst_n = 1; #200;
    host.reset_tap();
    host.scan_dr('0, 32, o);       chk(o[31:0] == 32'h149511C3, "IDCODE after nTRST");
    host.scan_ir(128'h8, 4, o);
    chk(sel, "user instruction selected");
    n_cap = 0; n_shift = 0; n_upd = 0;
    host.scan_dr('0, 10, o);
    chk(o[9:0] == 10'h3FF, "user register on TDO");
    chk(n_cap == 1 && n_shift == 10 && n_upd == 1, $sformatf("user pulses %0d %0d %0d", n_cap, n_shift, n_upd));
    // random walk against the reference state diagram (0 = Test-Logic-Reset,
    // 1 = Run-Test/Idle, 2..8 DR column, 9..15 IR column)
    host.reset_tap();
    begin
      int st = 1, bad = 0, nst = 0;
      logic [3:0] ir_sh = 0, ir = 4'b0001;
      bit seen [16];
      for (int k = 0; k < 2000; k++) begin
        automatic logic m = ($urandom % 3 == 0), b = 1'($urandom), x;
        if (st == 11) ir_sh = {b, ir_sh[3:1]};
        if (st == 10) ir_sh = 4'b0001;
        host.clk(m, b, x);
        case (st)
          0:  st = m ? 0 : 1;
          1:  st = m ? 2 : 1;
          2:  st = m ? 9 : 3;
          3:  st = m ? 5 : 4;
          4:  st = m ? 5 : 4;
          5:  st = m ? 8 : 6;
          6:  st = m ? 7 : 6;
          7:  st = m ? 8 : 4;
          8:  st = m ? 2 : 1;
          9:  st = m ? 0 : 10;
          10: st = m ? 12 : 11;
          11: st = m ? 12 : 11;
          12: st = m ? 15 : 13;
          13: st = m ? 14 : 13;
          14: st = m ? 15 : 11;
          15: st = m ? 2 : 1;
          default: ;
        endcase
        if (st == 0) ir = 4'b0001;
        seen[st] = 1;
        #1;
        checks++;
        if (int'(dut.state) != st || (st != 0 && st != 15 && dut.ir != ir)) begin
          failures++;
          if (bad++ < 5) $display("FAIL walk %0d: state %0d expected %0d ir %b expected %b", k, dut.state, st, dut.ir, ir);
        end
        if (st == 15) ir = ir_sh;
      end
      for (int i = 0; i < 16; i++) nst += int'(seen[i]);
      chk(nst == 16, $sformatf("walk visited %0d of 16 states", nst));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
