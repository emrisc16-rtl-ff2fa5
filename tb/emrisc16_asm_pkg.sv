// emrisc16_asm_pkg: instruction encoders for EmRISC16 testbenches.
//
// Each function returns one 32-bit instruction word: opcode [31:26],
// rd [25:22], ra [21:18], rb [17:14], immediate [15:0], address [17:0].
// Words are stored in memory most significant byte first.
package emrisc16_asm_pkg;

  function automatic logic [31:0] r3(input logic [5:0] op, input int rd, input int ra, input int rb);
    return {op, 4'(rd), 4'(ra), 4'(rb), 14'd0};
  endfunction

  function automatic logic [31:0] ri(input logic [5:0] op, input int rd, input int ra, input logic [15:0] imm);
    return {op, 4'(rd), 4'(ra), 2'd0, imm};
  endfunction

  // Memory and I/O: op rd, addr(ra). Also acall (ra = 0) and beqz/bnez (rd = 0).
  function automatic logic [31:0] ma(input logic [5:0] op, input int rd, input int ra, input logic [17:0] addr);
    return {op, 4'(rd), 4'(ra), addr};
  endfunction

  function automatic logic [31:0] op_only(input logic [5:0] op);
    return {op, 26'd0};
  endfunction

endpackage
