// emrisc16_pcunit: Program Counter Unit.
//
// Holds the 18-bit PC, which always addresses the next byte to fetch, and the
// 18-bit INTPC, which keeps the PC across an interrupt or trap. A six-way
// multiplexer chooses what the PC loads: PC + 1, the instruction's address
// field, a register value shifted left by two, INTPC, or one of the two
// interrupt vectors (0x10 for A, 0x20 for B). INTPC loads the current PC.
// All of this follows the document.
//
// Timing: pc_wr and intpc_wr load at the rising edge. rst (active high,
// asynchronous) clears both registers, so execution starts at address 0.
module emrisc16_pcunit
  import emrisc16_pkg::*;
#(
  parameter logic [17:0] IADDRA = 18'h00010,
  parameter logic [17:0] IADDRB = 18'h00020
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [17:0] dec_addr,
  input  logic [17:0] reg_addr,
  input  pcsrc_e      pcsrc_sel,
  input  logic        pc_wr,
  input  logic        intpc_wr,
  output logic [17:0] pc_bus,
  output logic [17:0] intpc
);

  logic [17:0] pc_in;

  always_comb begin
    unique case (pcsrc_sel)
      PCSRC_INC:    pc_in = pc_bus + 18'd1;
      PCSRC_DEC:    pc_in = dec_addr;
      PCSRC_REG:    pc_in = reg_addr;
      PCSRC_INTPC:  pc_in = intpc;
      PCSRC_IADDRA: pc_in = IADDRA;
      PCSRC_IADDRB: pc_in = IADDRB;
      default:      pc_in = pc_bus + 18'd1;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pc_bus <= '0;
      intpc  <= '0;
    end else begin
      if (pc_wr)    pc_bus <= pc_in;
      if (intpc_wr) intpc  <= pc_bus;
    end
  end

endmodule
