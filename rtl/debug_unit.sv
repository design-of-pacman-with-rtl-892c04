// debug_unit: Pacman's run-control debug logic: halt mode, two hardware
// address break points and single stepping. It decides, for the instruction
// at the PC, whether the execution unit may issue it.
//
// Registers (byte offsets in Pacman's window, reached through pacman_regs):
//   0x2C0 Halt mode      [0] Halt_bit (R/W)  [1] Halted (RO)
//   0x2EC Break point 1  address, reset 0xFFFFFFFF (R/W)
//   0x2F0 Clear BP       [0] Clear Break Point Enable (R/W, set on a hit)
//   0x2F4 Break point 2  address, reset 0xFFFFFFFF (R/W)
//   0x2F8 Single step    [0] SStep_en  [1] SStep_go (R/W)  [2] SStep_ack (RO)
// stop is high while Halt_bit is set, while a break point holds the core,
// when the PC equals an armed break point address, and in single-step mode
// until SStep_go is written. A break point hit sets Clear BP[0]; writing it
// back to 0 releases the core, which then executes the instruction at the
// break point address once without matching it again (a loop that returns
// there halts again). A break point register holding 0xFFFFFFFF or
// 0x00000000 never matches. In single-step mode each write with SStep_go = 1
// lets exactly one instruction issue and SStep_ack is set when it has; the
// next write of SStep_go clears SStep_ack. Halted is set while the core sits
// at an instruction boundary and stop holds it. Control is exercised only at
// instruction boundaries: an instruction that has issued (including its bus
// transfer) is completed first.
//
// Following the document: the halt, break point 1/2 and single-step
// addresses, the Halt_bit/Halted positions, the 0xFFFFFFFF reset value,
// the Clear Break Point Enable bit, the SStep_en/go/ack fields and the
// halt, break point and single-step behaviour. This design's choices: the
// SStep_ack bit position, treating 0x00000000 as
// "disabled", acting only at instruction boundaries (the document halts
// "immediately"), the one-shot skip after a release and the ack handshake.
module debug_unit
  import pacman_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  // register bus from pacman_regs
  input  logic        reg_we,
  input  logic [11:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        reg_hit,
  // execution unit
  input  logic [31:0] pc,
  input  logic        at_boundary,  // a whole instruction is ready at pc
  input  logic        issue,        // it was issued this cycle
  output logic        stop
);

  logic        halt_bit, halted, clr_bp_en, bp_skip;
  logic        sstep_en, sstep_go, sstep_ack, sstep_pend;
  logic [31:0] bp1, bp2;
  logic        bp_match;

  function automatic logic bp_armed(input logic [31:0] a);
    return a != 32'hFFFF_FFFF && a != 32'h0;
  endfunction

  assign bp_match = (bp_armed(bp1) && pc == bp1) || (bp_armed(bp2) && pc == bp2);
  assign stop     = halt_bit || clr_bp_en || (bp_match && !bp_skip) || (sstep_en && !sstep_pend);

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      halt_bit <= 1'b0; halted <= 1'b0; clr_bp_en <= 1'b0; bp_skip <= 1'b0;
      sstep_en <= 1'b0; sstep_go <= 1'b0; sstep_ack <= 1'b0; sstep_pend <= 1'b0;
      bp1 <= 32'hFFFF_FFFF; bp2 <= 32'hFFFF_FFFF;
    end else begin
      halted <= at_boundary && stop;
      // break point hit at a boundary
      if (at_boundary && bp_match && !bp_skip && !clr_bp_en) clr_bp_en <= 1'b1;
      if (issue) begin
        bp_skip <= 1'b0;
        if (sstep_pend) begin
          sstep_pend <= 1'b0;
          sstep_ack  <= 1'b1;
        end
      end
      if (reg_we) begin
        unique case (reg_addr)
          REG_HALT: halt_bit <= reg_wdata[0];
          REG_BP1:  bp1 <= reg_wdata;
          REG_BP2:  bp2 <= reg_wdata;
          REG_CLR_BP: begin
            clr_bp_en <= reg_wdata[0];
            if (clr_bp_en && !reg_wdata[0]) bp_skip <= 1'b1;
          end
          REG_SSTEP: begin
            sstep_en <= reg_wdata[0];
            sstep_go <= reg_wdata[1];
            if (reg_wdata[0] && reg_wdata[1]) begin
              sstep_pend <= 1'b1;
              sstep_ack  <= 1'b0;
            end
            if (!reg_wdata[0]) sstep_pend <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    reg_hit   = 1'b1;
    reg_rdata = '0;
    unique case (reg_addr)
      REG_HALT:   reg_rdata = {30'h0, halted, halt_bit};
      REG_BP1:    reg_rdata = bp1;
      REG_BP2:    reg_rdata = bp2;
      REG_CLR_BP: reg_rdata = {31'h0, clr_bp_en};
      REG_SSTEP:  reg_rdata = {29'h0, sstep_ack, sstep_go, sstep_en};
      default:    reg_hit = 1'b0;
    endcase
  end

endmodule
