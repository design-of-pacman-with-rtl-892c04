// tb_jtag_drv: testbench-only JTAG host model. Drives TCK/TMS/TDI with a
// TCK period of TCK_HALF*2 time units, samples TDO on the rising TCK edge,
// and provides TAP reset, IR scan and DR scan (up to 128 bits, LSB first)
// tasks. Each scan starts and ends in Run-Test/Idle. Not synthesizable.
module tb_jtag_drv #(
  parameter int TCK_HALF = 40
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  output logic trst_n,
  input  logic tdo
);

  initial begin tck = 0; tms = 1; tdi = 0; trst_n = 1; end

  task automatic clk(input logic m, input logic d, output logic o);
    tms = m; tdi = d;
    #(TCK_HALF); tck = 1; o = tdo;
    #(TCK_HALF); tck = 0;
  endtask

  task automatic reset_tap();
    logic o;
    for (int i = 0; i < 5; i++) clk(1, 0, o);
    clk(0, 0, o);                        // Run-Test/Idle
  endtask

  task automatic shift(input logic [127:0] din, input int len, output logic [127:0] dout);
    logic o;
    dout = '0;
    clk(0, 0, o);                        // to Capture
    clk(0, 0, o);                        // capture, to Shift
    for (int i = 0; i < len; i++) begin  // Shift, last bit with TMS = 1 (Exit1)
      clk(i == len - 1, din[i], o);
      dout[i] = o;
    end
    clk(1, 0, o);                        // Update
    clk(0, 0, o);                        // Run-Test/Idle
  endtask

  task automatic scan_ir(input logic [127:0] din, input int len, output logic [127:0] dout);
    logic o;
    clk(1, 0, o);                        // Select-DR
    clk(1, 0, o);                        // Select-IR
    shift(din, len, dout);
  endtask

  task automatic scan_dr(input logic [127:0] din, input int len, output logic [127:0] dout);
    logic o;
    clk(1, 0, o);                        // Select-DR
    shift(din, len, dout);
  endtask

  // JtagtoAHB helpers (user instruction 4'b1000, 66-bit command register)
  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
    logic [127:0] o;
    scan_dr({62'h0, 1'b1, 1'b1, a, d}, 66, o);
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    logic [127:0] o;
    scan_dr({62'h0, 1'b1, 1'b0, a, 32'h0}, 66, o);
    scan_dr('0, 66, o);
    d = o[31:0];
  endtask
endmodule
