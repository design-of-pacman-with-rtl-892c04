// exec_unit: Pacman's execution unit. It runs the microcode of the vector
// chosen by the priority resolver, from its base address up to END.
//
// State: a 32-bit accumulator, eight 32-bit registers R0..R7, a one-bit
// condition (carry) flag, the PC (byte address), and the general purpose
// outputs. Instructions are taken from the prefetch buffer's byte stream,
// one per cycle once all of their bytes are buffered.
//
// The controller is the five-state FSM of the design:
//   S_IDLE  waits for start; start loads the PC and starts the prefetcher.
//   S_BUSY  waits until the buffer holds the whole next instruction.
//   S_FETCH issues instructions; a jump goes back to S_BUSY (buffer
//           flushed), LD/ST/LDI/STI go to S_WAIT, an empty buffer to S_BUSY.
//   S_WAIT  waits for the data transfer, then S_FETCH or S_BUSY.
//   S_ERROR entered on an undefined opcode, a fetch bus error or a load/
//           store bus error; left only by reset (the soft reset bit).
// END pulses done and returns to S_IDLE. WAIT n holds in S_FETCH until
// event input n[1:0] is 1. The debug unit's stop keeps an instruction from
// issuing (halt, break point, single step).
//
// Operand field op[2:0]: Rn for the register instructions; for MOVI, LDI
// and STI 0 names the accumulator and 1..7 name R1..R7; ADDI/SUBI add or
// subtract 2**n; SETB writes op[2] to GPO op[1:0]. JUMP/JUMPC target =
// (PC with bits [1:0] cleared) + 4 * signed 8-bit offset.
//
// The states and their transitions, the instruction list and semantics,
// instruction lengths and the opcode/operand split follow the document.
// Opcode values, the MOVI/LDI/STI register selection, the offset scale,
// the flag rules (ADD/ADDI set it to the carry, SUB/SUBA/SUBI to the
// borrow, comparisons are unsigned, LS/RS rotate through the flag by one
// bit) and SETB/WAIT operand use are this design's choices.
module exec_unit
  import pacman_pkg::*;
#(
  parameter int unsigned NUM_GPO = 4,
  parameter int unsigned NUM_EVT = 4
) (
  input  logic               hclk,
  input  logic               hresetn,
  // priority resolver
  input  logic               start,
  input  logic [31:0]        base_addr,
  output logic               done,
  output logic               busy,
  // prefetch buffer
  output logic               pf_sop,
  output logic               pf_redirect,
  output logic [31:0]        pf_target,
  output logic               pf_stop,
  input  logic [5:0]         avail,
  input  logic [39:0]        peek,
  output logic [2:0]         consume,
  input  logic               pf_err,
  output logic               mem_valid,
  output mem_req_t           mem_req,
  input  logic               mem_done,
  input  logic [31:0]        mem_rdata,
  input  logic               mem_err,
  // debug
  input  logic               stop,
  output logic               at_boundary,
  output logic               issue,
  // pins and status
  input  logic [NUM_EVT-1:0] event_i,
  output logic [NUM_GPO-1:0] gpo_o,
  output logic               error_o,
  output err_cause_e         err_cause,
  output logic [31:0]        err_pc,
  output core_state_t        core
);

  typedef enum logic [2:0] {S_IDLE, S_BUSY, S_FETCH, S_WAIT, S_ERROR} ex_state_e;
  ex_state_e st;

  logic [31:0]      pc, acc;
  logic             flag;
  logic [7:0][31:0] gpr;
  logic [2:0]       ld_dest;   // destination of a pending load: 0 = acc, n = Rn

  // ---------------- decode ----------------
  logic [4:0]  opc;
  logic [2:0]  opr;
  logic [2:0]  len;
  logic [31:0] imm;
  logic [7:0]  off;
  logic [31:0] rn, jtarget;
  logic        valid_op, full, evt_ok;

  assign opc      = peek[7:3];
  assign opr      = peek[2:0];
  assign len      = instr_len(opc);
  assign imm      = peek[39:8];
  assign off      = peek[15:8];
  assign rn       = gpr[opr];
  assign jtarget  = {pc[31:2], 2'b00} + {{22{off[7]}}, off, 2'b00};
  assign valid_op = opc <= 5'(OP_SUBI);
  assign full     = avail >= 6'(len);
  assign evt_ok   = event_i[32'(opr[1:0]) % NUM_EVT];

  assign at_boundary = (st == S_FETCH) && full && !pf_err;
  assign issue       = at_boundary && !stop && valid_op && !(opc == 5'(OP_WAIT) && !evt_ok);

  // ---------------- ALU ----------------
  logic [32:0] sum;
  always_comb begin
    unique case (opc)
      5'(OP_ADD):  sum = {1'b0, acc} + {1'b0, rn};
      5'(OP_ADDI): sum = {1'b0, acc} + (33'd1 << opr);
      5'(OP_SUB):  sum = {1'b0, acc} - {1'b0, rn};
      5'(OP_SUBI): sum = {1'b0, acc} - (33'd1 << opr);
      5'(OP_SUBA): sum = {1'b0, rn} - {1'b0, acc};
      default:     sum = '0;
    endcase
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      st <= S_IDLE; pc <= '0; acc <= '0; flag <= 1'b0; gpr <= '0; ld_dest <= '0;
      gpo_o <= '0; err_cause <= ERR_NONE; err_pc <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          pc <= base_addr;
          st <= S_BUSY;
        end
        S_BUSY: begin
          if (pf_err) begin
            st <= S_ERROR; err_cause <= ERR_PREFETCH; err_pc <= pc;
          end else if (full) st <= S_FETCH;
        end
        S_FETCH: begin
          if (pf_err) begin
            st <= S_ERROR; err_cause <= ERR_PREFETCH; err_pc <= pc;
          end else if (!full) begin
            st <= S_BUSY;
          end else if (!stop && !valid_op) begin
            st <= S_ERROR; err_cause <= ERR_OPCODE; err_pc <= pc;
          end else if (issue) begin
            pc <= pc + 32'(len);
            unique case (opc)
              5'(OP_END):   st <= S_IDLE;
              5'(OP_SETB):  gpo_o[32'(opr[1:0]) % NUM_GPO] <= opr[2];
              5'(OP_LD):    begin ld_dest <= 3'd0; st <= S_WAIT; end
              5'(OP_LDI):   begin ld_dest <= opr;  st <= S_WAIT; end
              5'(OP_ST), 5'(OP_STI): st <= S_WAIT;
              5'(OP_MOVI):  if (opr == 3'd0) acc <= imm; else gpr[opr] <= imm;
              5'(OP_JUMP):  begin pc <= jtarget; st <= S_BUSY; end
              5'(OP_JUMPC): if (flag) begin pc <= jtarget; st <= S_BUSY; end
              5'(OP_ADD), 5'(OP_ADDI): begin acc <= sum[31:0]; flag <= sum[32]; end
              5'(OP_SUB), 5'(OP_SUBI), 5'(OP_SUBA): begin acc <= sum[31:0]; flag <= sum[32]; end
              5'(OP_AND):   acc <= acc & rn;
              5'(OP_OR):    acc <= acc | rn;
              5'(OP_XOR):   acc <= acc ^ rn;
              5'(OP_GT):    flag <= acc > rn;
              5'(OP_LT):    flag <= acc < rn;
              5'(OP_EQ):    flag <= acc == rn;
              5'(OP_EQZ):   flag <= acc == 32'd0;
              5'(OP_LS):    {flag, acc} <= {acc, flag};
              5'(OP_RS):    {acc, flag} <= {flag, acc};
              5'(OP_MOVF):  acc <= rn;
              5'(OP_MOVT):  gpr[opr] <= acc;
              5'(OP_CLR):   acc <= '0;
              default: ;  // NOP, WAIT
            endcase
          end
        end
        S_WAIT: if (mem_done) begin
          if (mem_err) begin
            st <= S_ERROR; err_cause <= ERR_LDST; err_pc <= pc;
          end else begin
            if (!mem_req.write) begin
              if (ld_dest == 3'd0) acc <= mem_rdata;
              else                 gpr[ld_dest] <= mem_rdata;
            end
            st <= full ? S_FETCH : S_BUSY;
          end
        end
        S_ERROR: ;
        default: st <= S_ERROR;
      endcase
    end
  end

  // data transfer request, held while in S_WAIT
  mem_req_t req_q;
  always_ff @(posedge hclk) begin
    if (!hresetn) req_q <= '0;
    else if (issue) begin
      unique case (opc)
        5'(OP_LD):  req_q <= '{write: 1'b0, addr: rn, wdata: '0};
        5'(OP_ST):  req_q <= '{write: 1'b1, addr: rn, wdata: acc};
        5'(OP_LDI): req_q <= '{write: 1'b0, addr: imm, wdata: '0};
        5'(OP_STI): req_q <= '{write: 1'b1, addr: imm, wdata: (opr == 3'd0) ? acc : gpr[opr]};
        default: ;
      endcase
    end
  end
  assign mem_req   = req_q;
  assign mem_valid = (st == S_WAIT);

  logic jump_taken;
  assign jump_taken  = issue && (opc == 5'(OP_JUMP) || (opc == 5'(OP_JUMPC) && flag));
  assign pf_sop      = (st == S_IDLE) && start;
  assign pf_redirect = jump_taken;
  assign pf_target   = pf_sop ? base_addr : jtarget;
  assign pf_stop     = issue && opc == 5'(OP_END);
  assign consume     = (issue && !jump_taken) ? len : 3'd0;
  assign done        = pf_stop;
  assign busy        = (st != S_IDLE);
  assign error_o     = (st == S_ERROR);

  assign core.pc   = pc;
  assign core.acc  = acc;
  assign core.flag = flag;
  assign core.gpr  = gpr;

endmodule
