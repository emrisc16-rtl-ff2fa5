// emrisc16_core: the EmRISC16 processor core.
//
// A 16-bit, non-pipelined von Neumann RISC core with an 18-bit byte address
// bus and an 8-bit data bus. Six units are wired as in the document's core
// schematic: the Fetch and Decode Unit collects the four bytes of a 32-bit
// instruction; the register file supplies ra and rb (rd for stores); the ALU
// block computes arithmetic, shift and branch results; the Memory and I/O Unit
// forms displacement addresses and converts bytes; the Program Counter Unit
// holds PC and INTPC; the Processor Control Unit sequences it all. A small
// multiplexer chooses what is written to rd: the ALU result, the shifter
// result, the loaded byte, or the return address PC >> 2 for acall/rcall
// (jr and rcall shift a register left by two to form an 18-bit address, so
// the two match).
//
// Interface and timing are those of the bus: the core drives addr_bus and
// pulses rd_n or wr_n low for one or more whole clock cycles; data_bus_in is
// sampled at the rising edge that ends an RD_ cycle; data_bus_out is valid
// while dbout_n is low. Each instruction takes 9 to 12 cycles (see
// emrisc16_control). rst is active high. Two immediate assertions check
// the bus rules at every clock edge (this design's addition).
module emrisc16_core
  import emrisc16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        irqa,
  input  logic        irqb,
  output logic        rd_n,
  output logic        wr_n,
  output logic        dbout_n,
  output logic [17:0] addr_bus,
  input  logic [7:0]  data_bus_in,
  output logic [7:0]  data_bus_out,
  output logic        eib,
  output logic        halted,
  output logic        int_entry
);

  logic [5:0]  op;
  logic [3:0]  dest, sel_a, sel_b;
  logic [15:0] immed, a_out, b_out, alu_out, shift_out, dest_mem, wr_data;
  logic [17:0] dec_addr, reg_addr, pc_bus;
  logic        ir_wr, pc_wr, intpc_wr, reg_wr, addr_sel, br_true;
  logic [1:0]  ir_sel;
  pcsrc_e      pcsrc_sel;
  wsrc_e       wsrc;

  emrisc16_fdu u_fdu (
    .clk, .rst,
    .data_in (data_bus_in),
    .ir_wr, .ir_sel,
    .op, .dest,
    .ra      (sel_a),
    .rb      (sel_b),
    .immed,
    .addr    (dec_addr)
  );

  // Register write source select.
  always_comb begin
    unique case (wsrc)
      WSRC_ALU:   wr_data = alu_out;
      WSRC_SHIFT: wr_data = shift_out;
      WSRC_MEM:   wr_data = dest_mem;
      default:    wr_data = pc_bus[17:2];
    endcase
  end

  emrisc16_regfile u_regfile (
    .clk,
    .wr_en    (reg_wr),
    .sel_dest (dest),
    .wr_data,
    .sel_a, .sel_b,
    .a_out, .b_out,
    .reg_addr
  );

  emrisc16_alublock u_alublock (
    .op,
    .ra        (a_out),
    .rb        (b_out),
    .immed,
    .alu_out, .shift_out, .br_true
  );

  emrisc16_pcunit u_pcunit (
    .clk, .rst,
    .dec_addr, .reg_addr, .pcsrc_sel, .pc_wr, .intpc_wr,
    .pc_bus,
    .intpc ()
  );

  emrisc16_memio u_memio (
    .op, .pc_bus, .dec_addr,
    .rega (a_out),
    .regb (b_out),
    .addr_sel, .data_bus_in, .addr_bus, .data_bus_out, .dest_mem
  );

  emrisc16_control u_control (
    .clk, .rst, .op, .br_true, .irqa, .irqb,
    .ir_wr, .ir_sel, .pc_wr, .pcsrc_sel, .intpc_wr, .reg_wr, .wsrc,
    .addr_sel, .rd_n, .wr_n, .dbout_n, .eib, .halted, .int_entry
  );

  // Bus rules every device on the bus may rely on: never a read and a write
  // at once, and the data bus is driven whenever WR_ is low.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      // nothing to check while reset holds the core
    end else begin
      a_rd_wr: assert (rd_n || wr_n)
        else $error("RD_ and WR_ low together");
      a_wr_data: assert (wr_n || !dbout_n)
        else $error("WR_ low without the data bus driven");
    end
  end

endmodule
