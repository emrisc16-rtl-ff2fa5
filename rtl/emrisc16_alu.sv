// emrisc16_alu: arithmetic, boolean and comparison unit of the EmRISC16.
//
// Structure as in the document's ALU schematic: a decoder turns the opcode
// into a subtract flag, an immediate select and a 3-bit output select. The
// second operand B is rb or the 16-bit immediate; for subtraction it is
// inverted and the carry-in set, so one 16-bit adder does both. The zero flag
// (EQ) is the NOR of the sum bits and the sign flag (NEG) is sum bit 15. An
// eight-way output multiplexer picks 0, 1, A&B, A|B, A^B, the sum, the carry
// out (as a 16-bit 0 or 1) or the constant 0xFFFF for an opcode the unit does
// not implement.
//
//   add/addi/sub/subi       -> sum
//   addc/addci/subc/subci   -> carry out of the same addition (for subtract
//                              this is 1 when no borrow occurs)
//   and/or/xor (+ imm)      -> boolean result
//   slt sle sgt sge seq sne -> 1 or 0 from NEG and EQ of ra - rb
//
// The comparisons use NEG = bit 15 of ra - rb, as the schematic draws it;
// this is a signed compare that is correct while ra - rb does not overflow.
// Purely combinational.
module emrisc16_alu
  import emrisc16_pkg::*;
(
  input  logic [5:0]  op,
  input  logic [15:0] ra,
  input  logic [15:0] rb,
  input  logic [15:0] immed,
  output logic [15:0] out
);

  typedef enum logic [2:0] {
    OSEL_ZERO = 3'd0, OSEL_ONE = 3'd1, OSEL_AND = 3'd2, OSEL_OR  = 3'd3,
    OSEL_XOR  = 3'd4, OSEL_SUM = 3'd5, OSEL_CY  = 3'd6, OSEL_ERR = 3'd7
  } osel_e;

  logic        sub, immed_sel, neg, eq;
  osel_e       out_sel;
  logic [15:0] b, b_in, s;
  logic        cy;

  assign b    = immed_sel ? immed : rb;
  assign b_in = b ^ {16{sub}};
  assign {cy, s} = {1'b0, ra} + {1'b0, b_in} + 17'(sub);
  assign eq   = ~|s;
  assign neg  = s[15];

  // Opcode decoder (U17 in the schematic). The operand controls depend on
  // the opcode only and are kept apart from the output select, which also
  // looks at the flags of the adder they steer.
  always_comb begin
    sub       = 1'b0;
    immed_sel = 1'b0;
    if (op[5:3] == 3'b100) begin            // add/sub family 0x20..0x27
      sub       = op[2];
      immed_sel = op[0];
    end else if (op[5:3] == 3'b101) begin   // boolean family 0x28..0x2F
      immed_sel = op[0];
    end else if (op[5:3] == 3'b111) begin   // comparisons 0x38..0x3F
      sub = 1'b1;
    end
  end

  always_comb begin
    out_sel = OSEL_ERR;
    if (op[5:3] == 3'b100) begin
      out_sel = op[1] ? OSEL_CY : OSEL_SUM;
    end else if (op[5:3] == 3'b101) begin
      unique case (op[2:1])
        2'b00:   out_sel = OSEL_AND;
        2'b01:   out_sel = OSEL_OR;
        2'b10:   out_sel = OSEL_XOR;
        default: out_sel = OSEL_ERR;
      endcase
    end else if (op[5:3] == 3'b111) begin
      unique case (op[2:0])
        3'b000:  out_sel = neg               ? OSEL_ONE : OSEL_ZERO;  // slt
        3'b001:  out_sel = (neg || eq)       ? OSEL_ONE : OSEL_ZERO;  // sle
        3'b010:  out_sel = (!neg && !eq)     ? OSEL_ONE : OSEL_ZERO;  // sgt
        3'b011:  out_sel = !neg              ? OSEL_ONE : OSEL_ZERO;  // sge
        3'b100:  out_sel = eq                ? OSEL_ONE : OSEL_ZERO;  // seq
        3'b101:  out_sel = !eq               ? OSEL_ONE : OSEL_ZERO;  // sne
        default: out_sel = OSEL_ERR;
      endcase
    end
  end

  always_comb begin
    unique case (out_sel)
      OSEL_ZERO: out = 16'h0000;
      OSEL_ONE:  out = 16'h0001;
      OSEL_AND:  out = ra & b;
      OSEL_OR:   out = ra | b;
      OSEL_XOR:  out = ra ^ b;
      OSEL_SUM:  out = s;
      OSEL_CY:   out = {15'd0, cy};
      default:   out = 16'hFFFF;
    endcase
  end

endmodule
