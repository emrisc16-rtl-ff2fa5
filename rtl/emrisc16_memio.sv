// emrisc16_memio: Memory and I/O Unit.
//
// Forms the displacement address of a load, store, ior or iow (the 18-bit
// address field plus register ra, zero-extended), and chooses whether the
// address bus shows that sum or the PC (addr_sel = 1 for the sum). It also
// converts between the 16-bit registers and the 8-bit data bus: a store puts
// the low byte of the store register on the bus for sbl, sw and iow and the
// high byte for sbh; a load widens the byte on the bus to 16 bits, with sign
// extension for lbs and zero fill for lbu, lw and ior. The adder, the mux and
// the two converters follow the document. Only an 8-bit bus exists, so a
// word access moves a single byte; zero-extending ior and sending the low
// byte on sw are this implementation's choices. Purely combinational.
module emrisc16_memio
  import emrisc16_pkg::*;
(
  input  logic [5:0]  op,
  input  logic [17:0] pc_bus,
  input  logic [17:0] dec_addr,
  input  logic [15:0] rega,
  input  logic [15:0] regb,
  input  logic        addr_sel,
  input  logic [7:0]  data_bus_in,
  output logic [17:0] addr_bus,
  output logic [7:0]  data_bus_out,
  output logic [15:0] dest_mem
);

  logic [17:0] addr_sum;

  assign addr_sum     = dec_addr + {2'b00, rega};
  assign addr_bus     = addr_sel ? addr_sum : pc_bus;
  assign data_bus_out = (op == OP_SBH) ? regb[15:8] : regb[7:0];
  assign dest_mem     = (op == OP_LBS) ? {{8{data_bus_in[7]}}, data_bus_in}
                                       : {8'h00, data_bus_in};

endmodule
