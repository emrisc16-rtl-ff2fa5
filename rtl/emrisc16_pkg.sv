// emrisc16_pkg: shared opcodes, field positions and control encodings of the
// EmRISC16 core.
//
// Every instruction is one 32-bit word, fetched most significant byte first.
// Fields sit at fixed positions: opcode [31:26], rd [25:22], ra [21:18],
// rb [17:14], 16-bit immediate [15:0], 18-bit address [17:0]. The opcode
// numbers are those of the instruction set tables; the field positions follow
// the instruction format drawings and the worked hex listing of a small
// program. The enums for the next-PC source and the register write source are
// this implementation's own encodings.
package emrisc16_pkg;

  typedef enum logic [5:0] {
    OP_NOP   = 6'h00, OP_HALT  = 6'h01, OP_REI   = 6'h03, OP_DI    = 6'h04,
    OP_EI    = 6'h05, OP_TRAP  = 6'h06, OP_RFE   = 6'h07,
    OP_JA    = 6'h08, OP_JR    = 6'h09, OP_ACALL = 6'h0E, OP_RCALL = 6'h0F,
    OP_LBU   = 6'h10, OP_LBS   = 6'h11, OP_LW    = 6'h12, OP_IOR   = 6'h13,
    OP_SBL   = 6'h14, OP_SBH   = 6'h15, OP_SW    = 6'h16, OP_IOW   = 6'h17,
    OP_BEQZ  = 6'h18, OP_BNEZ  = 6'h19,
    OP_ADD   = 6'h20, OP_ADDI  = 6'h21, OP_ADDC  = 6'h22, OP_ADDCI = 6'h23,
    OP_SUB   = 6'h24, OP_SUBI  = 6'h25, OP_SUBC  = 6'h26, OP_SUBCI = 6'h27,
    OP_AND   = 6'h28, OP_ANDI  = 6'h29, OP_OR    = 6'h2A, OP_ORI   = 6'h2B,
    OP_XOR   = 6'h2C, OP_XORI  = 6'h2D,
    OP_LSL   = 6'h30, OP_LSLI  = 6'h31, OP_LSR   = 6'h32, OP_LSRI  = 6'h33,
    OP_ASR   = 6'h36, OP_ASRI  = 6'h37,
    OP_SLT   = 6'h38, OP_SLE   = 6'h39, OP_SGT   = 6'h3A, OP_SGE   = 6'h3B,
    OP_SEQ   = 6'h3C, OP_SNE   = 6'h3D
  } opcode_e;

  // Next-PC sources, in the input order of the PC multiplexer.
  typedef enum logic [2:0] {
    PCSRC_INC    = 3'd0,  // PC + 1
    PCSRC_DEC    = 3'd1,  // address field of the instruction
    PCSRC_REG    = 3'd2,  // register ra shifted left by two
    PCSRC_INTPC  = 3'd3,  // saved interrupt PC
    PCSRC_IADDRA = 3'd4,  // interrupt A vector
    PCSRC_IADDRB = 3'd5   // interrupt B vector
  } pcsrc_e;

  // Value written into rd.
  typedef enum logic [1:0] {
    WSRC_ALU   = 2'd0,
    WSRC_SHIFT = 2'd1,
    WSRC_MEM   = 2'd2,
    WSRC_PC    = 2'd3
  } wsrc_e;

  // Instruction classes used by several units.
  function automatic logic is_store(logic [5:0] op);
    return op inside {OP_SBL, OP_SBH, OP_SW, OP_IOW};
  endfunction

  function automatic logic is_shift(logic [5:0] op);
    return op[5:3] == 3'b110;
  endfunction

endpackage
