// tb_asm_pkg: testbench-only helpers that assemble Pacman microcode into a
// byte queue. Encoding: opcode in bits [7:3], operand in [2:0]; MOVI, LDI,
// STI carry a 32-bit little-endian immediate, JUMP/JUMPC a signed 8-bit
// word offset relative to the word holding the jump opcode.
package tb_asm_pkg;
  import pacman_pkg::*;

  typedef logic [7:0] byte_q_t [$];

  function automatic void op1(ref byte_q_t q, input opcode_e op, input int opr = 0);
    q.push_back({op, 3'(opr)});
  endfunction

  function automatic void opi(ref byte_q_t q, input opcode_e op, input int opr, input logic [31:0] v);
    q.push_back({op, 3'(opr)});
    for (int b = 0; b < 4; b++) q.push_back(v[8*b +: 8]);
  endfunction

  function automatic void opj(ref byte_q_t q, input opcode_e op, input int off_words);
    q.push_back({op, 3'b000});
    q.push_back(8'(off_words));
  endfunction

  // pad with NOPs up to a byte address (relative to the program start)
  function automatic void align(ref byte_q_t q, input int addr);
    while (q.size() < addr) q.push_back({OP_NOP, 3'b000});
  endfunction
endpackage
