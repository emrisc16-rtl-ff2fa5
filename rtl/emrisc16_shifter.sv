// emrisc16_shifter: barrel shifter of the EmRISC16 ALU block.
//
// Shifts s_in by 0 to 15 places. right selects the direction and arith the
// kind: an arithmetic right shift copies bit 15 into the vacated places, a
// logical one fills them with zeros. A left shift always fills with zeros,
// whether or not arith is set (no arithmetic-left instruction exists). In the
// ALU block right is opcode bit 1 and arith opcode bit 2, which is how the
// document's schematic wires them. Purely combinational.
module emrisc16_shifter (
  input  logic [15:0] s_in,
  input  logic [3:0]  num,
  input  logic        arith,
  input  logic        right,
  output logic [15:0] s_out
);

  always_comb begin
    if (!right)     s_out = s_in << num;
    else if (arith) s_out = 16'($signed(s_in) >>> num);
    else            s_out = s_in >> num;
  end

endmodule
