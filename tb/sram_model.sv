// sram_model: behavioural model of a byte-wide asynchronous SRAM (128 KB by
// default) for simulation only. Reads are combinational while ce_n and oe_n
// are low; a write happens at a rising edge of clk where ce_n and we_n are
// low. Sampling writes on the system clock is a simplification of the real
// part's write-pulse timing, adequate for a bus whose strobes last whole
// clock cycles. The testbench may load and inspect mem directly.
module sram_model #(
  parameter int AW = 17
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic [AW-1:0] a,
  input  logic [7:0]    d_wr,
  output logic [7:0]    d_rd,
  output logic          d_rd_en
);
  logic [7:0] mem [1 << AW];

  assign d_rd_en = !ce_n && !oe_n && we_n;
  assign d_rd    = mem[a];

  always @(posedge clk)
    if (!ce_n && !we_n) mem[a] <= d_wr;
endmodule
