// tb_ahb_mem: testbench-only AHB slave memory model. BYTES of little-endian
// memory; each data phase takes a random 0..MAX_WAIT wait states; addresses
// in [ERR_LO, ERR_HI] answer with the two-cycle ERROR response. It checks
// the burst rules a master must keep: SEQ beats follow the previous address
// by 4, HBURST does not change inside a burst and no burst crosses a 1 KB
// boundary; violations are counted in proto_errors. It also counts
// transfers by HBURST type. Not synthesizable.
module tb_ahb_mem
  import ahb_pkg::*;
#(
  parameter int unsigned BYTES    = 8192,
  parameter int unsigned MAX_WAIT = 2,
  parameter logic [31:0] ERR_LO   = 32'hFFFF_0000,
  parameter logic [31:0] ERR_HI   = 32'hFFFF_FFFF
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_m2s_t s_i,
  input  logic     hready,
  output ahb_s2m_t s_o
);

  logic [7:0] mem [BYTES];

  int unsigned proto_errors = 0;
  int unsigned n_single = 0, n_incr4 = 0, n_incr8 = 0, n_reads = 0, n_writes = 0;

  logic        dph, dph_wr, dph_err;
  logic [31:0] dph_addr, prev_addr;
  hburst_e     prev_burst;
  logic [31:0] burst_start;
  int          wait_left;
  logic        err_second;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dph <= 1'b0; wait_left <= 0; err_second <= 1'b0;
    end else begin
      // complete the data phase
      if (dph && s_o.hreadyout) begin
        if (dph_wr && !dph_err) begin
          for (int b = 0; b < 4; b++) mem[(dph_addr & ~32'h3) + b] <= s_i.hwdata[8*b +: 8];
        end
      end
      if (dph && !s_o.hreadyout) begin
        if (dph_err) err_second <= 1'b1;
        else wait_left <= wait_left - 1;
      end
      if (hready) begin
        err_second <= 1'b0;
        dph <= hsel && s_i.htrans[1];
        if (hsel && s_i.htrans[1]) begin
          dph_addr  <= s_i.haddr;
          dph_wr    <= s_i.hwrite;
          dph_err   <= s_i.haddr >= ERR_LO && s_i.haddr <= ERR_HI;
          wait_left <= $urandom_range(MAX_WAIT, 0);
          if (s_i.hwrite) n_writes <= n_writes + 1; else n_reads <= n_reads + 1;
          if (s_i.htrans == HTRANS_NONSEQ) begin
            burst_start <= s_i.haddr;
            case (s_i.hburst)
              HBURST_SINGLE: n_single <= n_single + 1;
              HBURST_INCR4:  n_incr4  <= n_incr4 + 1;
              HBURST_INCR8:  n_incr8  <= n_incr8 + 1;
              default: ;
            endcase
          end else begin
            if (s_i.haddr != prev_addr + 4) proto_errors <= proto_errors + 1;
            if (s_i.hburst != prev_burst) proto_errors <= proto_errors + 1;
            if (s_i.haddr[31:10] != burst_start[31:10]) proto_errors <= proto_errors + 1;
          end
          prev_addr  <= s_i.haddr;
          prev_burst <= s_i.hburst;
        end
      end
    end
  end

  always_comb begin
    s_o = AHB_S2M_OKAY;
    if (dph) begin
      if (dph_err) begin
        s_o.hresp     = HRESP_ERROR;
        s_o.hreadyout = err_second;
      end else begin
        s_o.hreadyout = (wait_left == 0);
        for (int b = 0; b < 4; b++) s_o.hrdata[8*b +: 8] = mem[((dph_addr & ~32'h3) + b) % BYTES];
      end
    end
  end

  function automatic logic [31:0] peek32(input logic [31:0] a);
    for (int b = 0; b < 4; b++) peek32[8*b +: 8] = mem[(a + b) % BYTES];
  endfunction

  task automatic poke8(input logic [31:0] a, input logic [7:0] d);
    mem[a % BYTES] = d;
  endtask

  task automatic poke32(input logic [31:0] a, input logic [31:0] d);
    for (int b = 0; b < 4; b++) mem[(a + b) % BYTES] = d[8*b +: 8];
  endtask

  task automatic clear();
    for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;
  endtask

endmodule
