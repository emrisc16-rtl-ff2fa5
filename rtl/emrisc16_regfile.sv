// emrisc16_regfile: the sixteen 16-bit general purpose registers.
//
// Two registers are read and one written in the same cycle. As in the
// document's FPGA design the contents are kept twice, in two banks of small
// RAM with one write port each: bank A serves read port A, bank B serves read
// port B, and every write goes to both banks. A read of r0 returns zero
// through a multiplexer, whatever was written to it. reg_addr is the A port
// value shifted left by two, the 18-bit target of jr and rcall.
//
// Timing: reads are combinational (asynchronous RAM read); the write happens
// at the rising edge when wr_en is high. The banks are not reset, as RAM is
// not; a testbench must write a register before it reads it. WIDTH and NREGS
// default to the document's 16 and 16.
module emrisc16_regfile #(
  parameter int WIDTH = 16,
  parameter int NREGS = 16,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    sel_dest,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    sel_a,
  input  logic [AW-1:0]    sel_b,
  output logic [WIDTH-1:0] a_out,
  output logic [WIDTH-1:0] b_out,
  output logic [WIDTH+1:0] reg_addr
);

  logic [WIDTH-1:0] bank_a [NREGS];
  logic [WIDTH-1:0] bank_b [NREGS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      bank_a[sel_dest] <= wr_data;
      bank_b[sel_dest] <= wr_data;
    end
  end

  assign a_out    = (sel_a == '0) ? '0 : bank_a[sel_a];
  assign b_out    = (sel_b == '0) ? '0 : bank_b[sel_b];
  assign reg_addr = {a_out, 2'b00};

endmodule
