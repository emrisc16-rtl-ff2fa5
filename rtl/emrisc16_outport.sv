// emrisc16_outport: 8-bit output port of the EmRISC16 microcontroller.
//
// Holds the last byte written to the port's address and drives it on dout
// (the LED / 7-segment pins on the document's board). A write happens at the
// rising clock edge where ce and wr are both high. The clocked register and
// active-high strobes are this design's choices; rst clears the port.
module emrisc16_outport (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       wr,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)           dout <= '0;
    else if (ce && wr) dout <= din;
  end

endmodule
