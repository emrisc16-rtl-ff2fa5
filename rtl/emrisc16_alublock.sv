// emrisc16_alublock: the EmRISC16 ALU block.
//
// Three units side by side, as in the document: the branch check tells the
// control unit whether beqz/bnez should jump (it tests register ra for zero
// and the opcode for a branch); the shifter shifts ra by an amount taken from
// the low four bits of rb or of the immediate, chosen by opcode bit 0; the ALU
// computes arithmetic, boolean and comparison results. Opcode bit 1 selects a
// right shift and bit 2 an arithmetic one. Purely combinational.
module emrisc16_alublock
  import emrisc16_pkg::*;
(
  input  logic [5:0]  op,
  input  logic [15:0] ra,
  input  logic [15:0] rb,
  input  logic [15:0] immed,
  output logic [15:0] alu_out,
  output logic [15:0] shift_out,
  output logic        br_true
);

  logic [15:0] shft;

  // Branch check (U97).
  always_comb begin
    unique case (op)
      OP_BEQZ: br_true = (ra == 16'd0);
      OP_BNEZ: br_true = (ra != 16'd0);
      default: br_true = 1'b0;
    endcase
  end

  // Shift amount multiplexer (U99).
  assign shft = op[0] ? immed : rb;

  emrisc16_shifter u_shifter (
    .s_in  (ra),
    .num   (shft[3:0]),
    .arith (op[2]),
    .right (op[1]),
    .s_out (shift_out)
  );

  emrisc16_alu u_alu (
    .op    (op),
    .ra    (ra),
    .rb    (rb),
    .immed (immed),
    .out   (alu_out)
  );

endmodule
