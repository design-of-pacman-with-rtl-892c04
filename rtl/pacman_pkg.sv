// pacman_pkg: constants and types shared by the Pacman controller blocks.
//
// Instructions are one byte: opcode in bits [7:3], operand in bits [2:0].
// MOVI, LDI and STI are followed by a 32-bit little-endian immediate
// (5 bytes in all), JUMP and JUMPC by a signed 8-bit offset (2 bytes); all
// other instructions are 1 byte. The instruction list, the field split and
// the lengths follow the Pacman instruction set; the numeric opcode values
// are this design's own (the list is numbered in order from NOP = 0).
//
// The register offsets are byte offsets inside Pacman's 4 KB slave window
// (0x2000-0x2FFF in the subsystem). PC (0x230), halt (0x2C0), break point 1
// (0x2EC), clear-break-point (0x2F0), break point 2 (0x2F4) and single step
// (0x2F8) are the published addresses; the others are this design's choice.
package pacman_pkg;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_END   = 5'd1,
    OP_SETB  = 5'd2,
    OP_WAIT  = 5'd3,
    OP_LD    = 5'd4,
    OP_ST    = 5'd5,
    OP_SUBA  = 5'd6,
    OP_MOVI  = 5'd7,
    OP_STI   = 5'd8,
    OP_LDI   = 5'd9,
    OP_JUMP  = 5'd10,
    OP_JUMPC = 5'd11,
    OP_ADD   = 5'd12,
    OP_SUB   = 5'd13,
    OP_AND   = 5'd14,
    OP_OR    = 5'd15,
    OP_XOR   = 5'd16,
    OP_GT    = 5'd17,
    OP_LT    = 5'd18,
    OP_EQ    = 5'd19,
    OP_EQZ   = 5'd20,
    OP_LS    = 5'd21,
    OP_RS    = 5'd22,
    OP_MOVF  = 5'd23,
    OP_MOVT  = 5'd24,
    OP_CLR   = 5'd25,
    OP_ADDI  = 5'd26,
    OP_SUBI  = 5'd27
  } opcode_e;

  // Instruction length in bytes, from the opcode.
  function automatic logic [2:0] instr_len(input logic [4:0] op);
    unique case (op)
      OP_MOVI, OP_LDI, OP_STI: instr_len = 3'd5;
      OP_JUMP, OP_JUMPC:       instr_len = 3'd2;
      default:                 instr_len = 3'd1;
    endcase
  endfunction

  // Error causes reported in the debug (error) register.
  typedef enum logic [1:0] {
    ERR_NONE     = 2'd0,
    ERR_OPCODE   = 2'd1,  // undefined opcode executed
    ERR_PREFETCH = 2'd2,  // bus error while fetching microcode
    ERR_LDST     = 2'd3   // bus error on a load or store
  } err_cause_e;

  // Slave register offsets (byte offsets, 12 bits).
  localparam logic [11:0] REG_IRQ_CFG  = 12'h000; // +4*n, n = 0..127: [3] enable, [2:0] route
  localparam logic [11:0] REG_BASE     = 12'h200; // +4*v, v = 0..7: vector base address
  localparam logic [11:0] REG_STATUS   = 12'h220;
  localparam logic [11:0] REG_CTRL     = 12'h224; // [0] start, [1] fixed priority, [2] soft reset
  localparam logic [11:0] REG_ERR      = 12'h228; // [1:0] cause
  localparam logic [11:0] REG_ERR_PC   = 12'h22C;
  localparam logic [11:0] REG_PC       = 12'h230;
  localparam logic [11:0] REG_ACC      = 12'h234;
  localparam logic [11:0] REG_FLAG     = 12'h238;
  localparam logic [11:0] REG_GPO      = 12'h23C;
  localparam logic [11:0] REG_GPR      = 12'h240; // +4*n, n = 0..7: R0..R7
  localparam logic [11:0] REG_HALT     = 12'h2C0;
  localparam logic [11:0] REG_BP1      = 12'h2EC;
  localparam logic [11:0] REG_CLR_BP   = 12'h2F0;
  localparam logic [11:0] REG_BP2      = 12'h2F4;
  localparam logic [11:0] REG_SSTEP    = 12'h2F8;

  // Register/status view of the execution unit, read back through the slave.
  typedef struct packed {
    logic [31:0]      pc;
    logic [31:0]      acc;
    logic             flag;
    logic [7:0][31:0] gpr;
  } core_state_t;

  // Request from the execution unit to the prefetch buffer for a 1-beat
  // data transfer (LD, ST, LDI, STI).
  typedef struct packed {
    logic        write;
    logic [31:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

endpackage
