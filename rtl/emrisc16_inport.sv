// emrisc16_inport: 8-bit input port of the EmRISC16 microcontroller.
//
// A write cycle to the port's address (ce and wr both high at a rising clock
// edge) samples the input pins into a holding register; a read cycle to the
// address (ce and rd high) places the held value on dout, and dout_en tells
// the data-bus multiplexer to take it. Software therefore strobes the port
// with a store and then loads it, which is how the document's program uses
// it. Registering the pins on a write is what that program implies; the
// clocked register and the active-high strobes are this design's choices.
// rst clears the register.
module emrisc16_inport (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       rd,
  input  logic       wr,
  input  logic [7:0] din,
  output logic [7:0] dout,
  output logic       dout_en
);

  logic [7:0] held;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           held <= '0;
    else if (ce && wr) held <= din;
  end

  assign dout    = held;
  assign dout_en = ce && rd;

endmodule
