// tb_debug_session: replays the bring-up debug session of the subsystem at
// its default size, entirely through the JTAG pins: read the JTAG ID, load
// a routine into SRAM from address 0, enable interrupt line 0 with config
// value 0x9 (routed to vector 1, whose base address is 0), set break point
// 1 to 0x10 and break point 2 to 0x14, raise the interrupt through the
// System Register at 0x3000 and start the controller at 0x2224.
//
// The routine counts the accumulator from 1 to 3 in a loop whose first
// instruction is at 0x10 and whose test is at 0x14, so the core must halt
// at 0x10, then (after Clear BP = 0) at 0x14, then at 0x10 again on the
// second pass. Writing 0 to both break point registers then lets it run to
// END. At every halt the PC (0x2230), R1..R3, the accumulator and the flag
// are read and compared with values worked out by hand.
//
// The single-step part writes 0x1 to the single step register, raises the
// interrupt again and writes 0x3 once per step: the PC must follow the
// routine instruction by instruction (including the taken jump back to
// 0x10) with SStep_ack set after each step; writing 0 lets the rest run.
module tb_debug_session;
  import pacman_pkg::*;
  import tb_asm_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic [3:0] gpo;
  logic err;
  int checks = 0, failures = 0;
  logic [127:0] o;
  logic [31:0] d;
  byte_q_t prog;

  soc_top dut (.hclk, .hresetn, .tck, .tms, .tdi, .trst_n, .tdo, .event_i(4'h0), .gpo_o(gpo), .error_o(err));
  tb_jtag_drv #(.TCK_HALF(40)) host (.tck, .tms, .tdi, .trst_n, .tdo);
  always #5 hclk = ~hclk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s (d=%h)", what, d); end
  endtask
  task automatic rd(input logic [31:0] a); host.ahb_read(a, d); endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] v); host.ahb_write(a, v); endtask
  task automatic expect_halt(input logic [31:0] pc, input logic [31:0] acc, input logic [31:0] r3, input string what);
    int n = 0;
    do begin rd(32'h22C0); n++; end while (d[1] != 1'b1 && n < 50);
    chk(d[1], {what, ": halted"});
    rd(32'h2230); chk(d == pc, {what, ": PC"});
    rd(32'h2234); chk(d == acc, {what, ": accumulator"});
    rd(32'h2244); chk(d == 32'd3, {what, ": R1"});
    rd(32'h2248); chk(d == 32'h3000, {what, ": R2"});
    rd(32'h224C); chk(d == r3, {what, ": R3"});
  endtask

  initial begin
    #80000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // PC sequence of a single-stepped run (instruction start addresses)
  localparam logic [31:0] STEP_PC [18] = '{
    32'h00, 32'h05, 32'h0A, 32'h0B, 32'h0C, 32'h0D, 32'h0E, 32'h0F,
    32'h10, 32'h11, 32'h12, 32'h13, 32'h14, 32'h15, 32'h10, 32'h11, 32'h12, 32'h13};

  initial begin
    opi(prog, OP_MOVI, 1, 32'd3);      // 0x00 R1 = 3
    opi(prog, OP_MOVI, 2, 32'h3000);   // 0x05 R2 = System Register
    op1(prog, OP_CLR);                 // 0x0A acc = 0
    repeat (5) op1(prog, OP_NOP);      // 0x0B..0x0F
    op1(prog, OP_ADDI, 0);             // 0x10 loop: acc += 1   (break point 1)
    op1(prog, OP_MOVT, 3);             // 0x11 R3 = acc
    op1(prog, OP_NOP);                 // 0x12
    op1(prog, OP_NOP);                 // 0x13
    op1(prog, OP_LT, 1);               // 0x14 flag = acc < 3   (break point 2)
    opj(prog, OP_JUMPC, -1);           // 0x15 -> 0x10 while acc < 3
    op1(prog, OP_CLR);                 // 0x17
    op1(prog, OP_ST, 2);               // 0x18 clear interrupt line 0
    op1(prog, OP_SETB, 4);             // 0x19 GPO0 = 1
    op1(prog, OP_END);                 // 0x1A

    repeat (4) @(posedge hclk); hresetn = 1;
    host.reset_tap();
    host.scan_dr('0, 32, o); d = o[31:0];
    chk(o[31:0] == 32'h149511C3, "JTAG ID");
    host.scan_ir(128'h8, 4, o);
    for (int i = 0; i < prog.size(); i += 4) begin
      automatic logic [31:0] w = '0;
      for (int b = 0; b < 4; b++) if (i + b < prog.size()) w[8*b +: 8] = prog[i + b];
      wr(i, w);
    end
    rd(32'h0010); chk(d[7:0] == {OP_ADDI, 3'd0}, "microcode readback");

    // -------- break point session --------
    wr(32'h2000, 32'h9);               // interrupt 0: enable, vector 1
    wr(32'h2204, 32'h0);               // vector 1 base address
    wr(32'h22EC, 32'h10);              // break point 1
    wr(32'h22F4, 32'h14);              // break point 2
    wr(32'h3000, 32'h1);               // raise interrupt 0
    wr(32'h2224, 32'h1);               // start
    expect_halt(32'h10, 32'd0, 32'd0, "first hit of break point 1");
    wr(32'h22F0, 32'h0);
    expect_halt(32'h14, 32'd1, 32'd1, "break point 2");
    rd(32'h2238); chk(d == 0, "flag before LT");
    wr(32'h22F0, 32'h0);
    expect_halt(32'h10, 32'd1, 32'd1, "break point 1 again in the loop");
    rd(32'h2238); chk(d == 1, "flag after LT (1 < 3)");
    wr(32'h22EC, 32'h0);               // disable both break points
    wr(32'h22F4, 32'h0);
    wr(32'h22F0, 32'h0);
    repeat (3) rd(32'h2220);
    chk(d[0] == 1'b0 && d[4] == 1'b0, "routine finished without error");
    rd(32'h224C); chk(d == 32'd3, "R3 = 3 after the loop");
    rd(32'h3000); chk(d == 0, "routine cleared its interrupt");
    chk(gpo[0] == 1'b1, "GPO0 set");

    // -------- single step session --------
    wr(32'h22F8, 32'h1);               // enter single step
    wr(32'h3000, 32'h1);               // raise interrupt 0 again
    for (int s = 0; s < 18; s++) begin
      rd(32'h2230);
      chk(d == STEP_PC[s], $sformatf("step %0d: PC %h expected %h", s, d, STEP_PC[s]));
      wr(32'h22F8, 32'h3);             // one step
      rd(32'h22F8);
      chk(d[2] == 1'b1, $sformatf("step %0d: SStep_ack", s));
    end
    rd(32'h224C); chk(d == 32'd2, "R3 after two loop passes");
    wr(32'h22F8, 32'h0);               // leave single step
    repeat (3) rd(32'h2220);
    chk(d[0] == 1'b0 && d[4] == 1'b0, "single-stepped routine finished");
    rd(32'h224C); chk(d == 32'd3, "R3 = 3");
    chk(!err, "no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
