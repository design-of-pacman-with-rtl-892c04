// jtag_tap: IEEE 1149.1 Test Access Port controller with instruction
// register, IDCODE and BYPASS data registers, and a hook for one user data
// register (used by jtag2ahb).
//
// The TAP runs in the AHB clock domain: TCK, TMS, TDI and nTRST pass through
// two-flop synchronisers and TCK edges are detected from the samples, so HCLK
// must be at least eight times faster than TCK (TDO reaches the pin about
// four HCLK cycles after the TCK falling edge). On each TCK rising edge the
// 16-state controller advances by TMS, the Capture states load their
// register and the Shift states shift TDI in at the top and out at bit 0;
// Update-IR latches the new instruction and Update-DR pulses user_update on
// the TCK falling edge. TDO changes on the TCK falling edge. Five TCK cycles
// with TMS high, or nTRST low, reach Test-Logic-Reset, which selects IDCODE.
// Capture-IR loads binary 01 into the low IR bits.
//
// The state machine, the IDCODE and BYPASS instructions, Capture-IR = ..01
// and the IDCODE value (0x149511C3, the ID the debugger reads back) follow
// the document; the IR length, the instruction codes, the user instruction
// and sampling TCK with HCLK are this design's choices. EXTEST/INTEST are not
// included (there is no boundary-scan register).
module jtag_tap #(
  parameter int unsigned  IR_LEN   = 4,
  parameter logic [31:0]  IDCODE   = 32'h149511C3,
  parameter logic [IR_LEN-1:0] IR_IDCODE = IR_LEN'(4'b0001),
  parameter logic [IR_LEN-1:0] IR_USER   = IR_LEN'(4'b1000),
  parameter logic [IR_LEN-1:0] IR_BYPASS = {IR_LEN{1'b1}}
) (
  input  logic hclk,
  input  logic hresetn,
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo,
  // user data register hook
  output logic user_sel,      // IR holds IR_USER
  output logic user_capture,  // one-HCLK pulse: load the user register
  output logic user_shift,    // one-HCLK pulse: shift user register, tdi_bit in
  output logic user_update,   // one-HCLK pulse: Update-DR
  output logic tdi_bit,       // synchronised TDI
  input  logic user_tdo       // bit 0 of the user register
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s, trst_s;
  logic       tck_rise, tck_fall;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      tck_s  <= '0;
      tms_s  <= '1;
      tdi_s  <= '0;
      trst_s <= '0;
    end else begin
      tck_s  <= {tck_s[1:0], tck};
      tms_s  <= {tms_s[0], tms};
      tdi_s  <= {tdi_s[0], tdi};
      trst_s <= {trst_s[0], trst_n};
    end
  end

  assign tck_rise = tck_s[1] && !tck_s[2];
  assign tck_fall = !tck_s[1] && tck_s[2];
  assign tdi_bit  = tdi_s[1];

  tap_state_e state, state_n;
  logic [IR_LEN-1:0] ir, ir_sh;
  logic [31:0]       id_sh;
  logic              bypass_q;

  always_comb begin
    unique case (state)
      TLR:    state_n = tms_s[1] ? TLR    : RTI;
      RTI:    state_n = tms_s[1] ? SEL_DR : RTI;
      SEL_DR: state_n = tms_s[1] ? SEL_IR : CAP_DR;
      CAP_DR: state_n = tms_s[1] ? EX1_DR : SH_DR;
      SH_DR:  state_n = tms_s[1] ? EX1_DR : SH_DR;
      EX1_DR: state_n = tms_s[1] ? UPD_DR : PAU_DR;
      PAU_DR: state_n = tms_s[1] ? EX2_DR : PAU_DR;
      EX2_DR: state_n = tms_s[1] ? UPD_DR : SH_DR;
      UPD_DR: state_n = tms_s[1] ? SEL_DR : RTI;
      SEL_IR: state_n = tms_s[1] ? TLR    : CAP_IR;
      CAP_IR: state_n = tms_s[1] ? EX1_IR : SH_IR;
      SH_IR:  state_n = tms_s[1] ? EX1_IR : SH_IR;
      EX1_IR: state_n = tms_s[1] ? UPD_IR : PAU_IR;
      PAU_IR: state_n = tms_s[1] ? EX2_IR : PAU_IR;
      EX2_IR: state_n = tms_s[1] ? UPD_IR : SH_IR;
      UPD_IR: state_n = tms_s[1] ? SEL_DR : RTI;
      default: state_n = TLR;
    endcase
  end

  always_ff @(posedge hclk) begin
    if (!hresetn || !trst_s[1]) begin
      state    <= TLR;
      ir       <= IR_IDCODE;
      ir_sh    <= '0;
      id_sh    <= '0;
      bypass_q <= 1'b0;
      tdo      <= 1'b0;
    end else begin
      if (tck_rise) begin
        state <= state_n;
        unique case (state)
          CAP_IR: ir_sh <= IR_LEN'(2'b01);
          SH_IR:  ir_sh <= {tdi_bit, ir_sh[IR_LEN-1:1]};
          CAP_DR: begin
            id_sh    <= IDCODE;
            bypass_q <= 1'b0;
          end
          SH_DR: begin
            id_sh    <= {tdi_bit, id_sh[31:1]};
            bypass_q <= tdi_bit;
          end
          default: ;
        endcase
      end
      if (tck_fall) begin
        if (state == TLR) ir <= IR_IDCODE;
        if (state == UPD_IR) ir <= ir_sh;
        if (state == SH_IR) tdo <= ir_sh[0];
        else if (state == SH_DR) begin
          if (ir == IR_IDCODE)    tdo <= id_sh[0];
          else if (ir == IR_USER) tdo <= user_tdo;
          else                    tdo <= bypass_q;
        end
      end
    end
  end

  assign user_sel     = (ir == IR_USER);
  assign user_capture = tck_rise && state == CAP_DR && user_sel;
  assign user_shift   = tck_rise && state == SH_DR  && user_sel;
  assign user_update  = tck_fall && state == UPD_DR && user_sel;

endmodule
