// tb_emrisc16_example: a short worked example program from the instruction-set
// description, run on the EmRISC16 core.
//
// What it does: the program disables interrupts, jumps over the vector area,
// calls a subroutine that sets r1 = 1, loads the byte constant 2 from memory
// into r2, adds them into r3 and returns through r15; the main line then
// halts. The testbench assembles this program with its own encoders into a
// byte memory that answers combinationally while RD_ is low (no writes are
// expected), runs the core from reset and checks:
//   - r1, r2, r3 and the return address the call left in r15 (PC >> 2);
//   - that halt is reached after exactly the sum of the instruction cycle
//     counts (di 9, ja 9, acall 10, addi 9, lbu 10, add 9, jr 9, halt 9 = 74);
//   - that the core stays halted and never writes memory.
// Interface: instantiates emrisc16_core; register values are read from the
// register file by hierarchical reference. Timing: 10 ns clock, watchdog of
// 2000 cycles. The program and its addresses (vectors skipped, code at 0x30,
// subroutine at 0x38, constant at 0x48) follow the document's example; the
// checks and the encoders are this testbench's own.
module tb_emrisc16_example;
  import emrisc16_pkg::*;
  import emrisc16_asm_pkg::*;

  logic        clk = 0, rst = 1, irqa = 0, irqb = 0;
  logic        rd_n, wr_n, dbout_n, eib, halted, int_entry;
  logic [17:0] addr_bus;
  logic [7:0]  data_bus_in, data_bus_out;
  logic [7:0]  mem [256];
  int checks = 0, failures = 0;
  int cycles = 0, writes = 0;

  emrisc16_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  assign data_bus_in = (!rd_n && addr_bus < 18'd256) ? mem[addr_bus[7:0]] : 8'h00;

  always @(posedge clk) if (!rst && !wr_n) writes++;

  task automatic put(input logic [17:0] a, input logic [31:0] w);
    for (int i = 0; i < 4; i++) mem[8'(a + 18'(i))] = w[31 - 8*i -: 8];
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    put(18'h00, op_only(OP_DI));
    put(18'h04, ma(OP_JA, 0, 0, 18'h30));
    put(18'h30, ma(OP_ACALL, 15, 0, 18'h38));
    put(18'h34, op_only(OP_HALT));
    put(18'h38, ri(OP_ADDI, 1, 0, 16'd1));
    put(18'h3C, ma(OP_LBU, 2, 0, 18'h48));
    put(18'h40, r3(OP_ADD, 3, 1, 2));
    put(18'h44, r3(OP_JR, 0, 15, 0));
    mem[8'h48] = 8'h02;

    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (!halted && cycles < 500) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check("cycles from reset to halt", cycles, 74);
    check("r1", dut.u_regfile.bank_a[1], 16'd1);
    check("r2", dut.u_regfile.bank_a[2], 16'd2);
    check("r3", dut.u_regfile.bank_a[3], 16'd3);
    check("r15 return address", dut.u_regfile.bank_a[15], 16'h000D);
    check("EIB off after di", eib, 0);
    repeat (50) @(posedge clk);
    #1;
    check("still halted", halted, 1);
    check("no memory writes", writes, 0);
    check("no interrupt entry", int_entry, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
