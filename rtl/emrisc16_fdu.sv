// emrisc16_fdu: Fetch and Decode Unit.
//
// An instruction arrives one byte at a time from 8-bit memory, most
// significant byte first. A 2-to-4 decoder enabled by ir_wr picks which of
// four 8-bit instruction registers takes data_in at the clock edge; ir_sel = 0
// is bits [31:24], 3 is bits [7:0]. The four registers are then re-wired into
// the operand buses: op [31:26], dest (rd) [25:22], ra [21:18], rb [17:14],
// immed [15:0] and addr [17:0]. This much follows the document.
//
// Own choice: for the store-type instructions (sbl, sbh, sw, iow) the register
// whose byte goes out is named in the rd field, so rb then carries rd, letting
// the register file's second read port supply the store data.
//
// Timing: registers load on the rising edge; all outputs are combinational
// from them. rst (active high, asynchronous) clears the registers.
module emrisc16_fdu
  import emrisc16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  data_in,
  input  logic        ir_wr,
  input  logic [1:0]  ir_sel,
  output logic [5:0]  op,
  output logic [3:0]  dest,
  output logic [3:0]  ra,
  output logic [3:0]  rb,
  output logic [15:0] immed,
  output logic [17:0] addr
);

  logic [3:0][7:0] ir_q;  // ir_q[3] is the first byte fetched
  logic [31:0]     iw;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ir_q <= '0;
    end else if (ir_wr) begin
      ir_q[2'd3 - ir_sel] <= data_in;
    end
  end

  assign iw    = ir_q;
  assign op    = iw[31:26];
  assign dest  = iw[25:22];
  assign ra    = iw[21:18];
  assign rb    = is_store(iw[31:26]) ? iw[25:22] : iw[17:14];
  assign immed = iw[15:0];
  assign addr  = iw[17:0];

endmodule
