// tb_emrisc16_core: end-to-end instruction test of the EmRISC16 core.
//
// The testbench assembles a program into a 256 KB byte memory attached to the
// core's bus (the memory answers combinationally while RD_ is low and writes
// at a clock edge where WR_ is low), runs it until halt and compares the
// results it stored with values computed here. The program covers:
//   - every ALU, compare and shift instruction, register and immediate forms,
//     on random operands, each result stored with sbh/sbl;
//   - r0 reading as zero after a write to it;
//   - lbu, lbs, lw, ior, iow, displacement addresses above 64 KB;
//   - acall/jr and rcall/jr, with the return address the call leaves in rd;
//   - a counted loop with bnez, and beqz both ways;
//   - interrupt A (handler ends with rei), interrupt B (handler ends with rfe,
//     so interrupts stay off until the next ei), trap, and halt.
// The program asks for interrupts by storing to 0x3FFF0 / 0x3FFF1, which
// makes the testbench pulse IRQA / IRQB. Every instruction's cycle count,
// measured between fetch starts, is checked against the instruction table.
// Bus rules are checked each cycle: RD_ and WR_ never low together, DBOUT_
// low whenever WR_ is low.
module tb_emrisc16_core;
  import emrisc16_pkg::*;
  import emrisc16_asm_pkg::*;

  localparam logic [17:0] RES = 18'h02000;   // result area
  localparam logic [17:0] SUB1 = 18'h01800, SUB2 = 18'h01880;

  logic        clk = 0, rst = 1, irqa = 0, irqb = 0;
  logic        rd_n, wr_n, dbout_n, eib, halted, int_entry;
  logic [17:0] addr_bus;
  logic [7:0]  data_bus_in, data_bus_out;
  logic [7:0]  mem [1 << 18];
  logic [17:0] pc_asm;
  logic [15:0] expv [$];
  int checks = 0, failures = 0;
  int n_irqa = 0, n_irqb = 0, n_timed = 0;

  emrisc16_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // ---------------- memory and interrupt requests ----------------
  assign data_bus_in = !rd_n ? mem[addr_bus] : 8'h00;

  always @(posedge clk) begin
    if (!rst) begin
      if (!rd_n && !wr_n) begin failures++; $display("FAIL RD_ and WR_ both low"); end
      if (!wr_n && dbout_n) begin failures++; $display("FAIL WR_ low without DBOUT_"); end
    end
    if (!wr_n) begin
      mem[addr_bus] <= data_bus_out;
      if (addr_bus == 18'h3FFF0) fork begin repeat (3) @(posedge clk); irqa <= 1; repeat (2) @(posedge clk); irqa <= 0; end join_none
      if (addr_bus == 18'h3FFF1) fork begin repeat (3) @(posedge clk); irqb <= 1; repeat (2) @(posedge clk); irqb <= 0; end join_none
    end
  end

  // ---------------- assembler helpers ----------------
  task automatic emit(input logic [31:0] w);
    {mem[pc_asm], mem[pc_asm + 1], mem[pc_asm + 2], mem[pc_asm + 3]} = w;
    pc_asm += 4;
  endtask

  // store r<reg> as the next 16-bit result and remember what it should be
  task automatic emit_result(input int r, input logic [15:0] e);
    logic [17:0] a;
    a = RES + 18'(2 * expv.size());
    emit(ma(OP_SBH, r, 0, a));
    emit(ma(OP_SBL, r, 0, a + 1));
    expv.push_back(e);
  endtask

  function automatic logic [15:0] ref_alu(input logic [5:0] o, input logic [15:0] a, input logic [15:0] b);
    int x, y;
    logic [15:0] d;
    x = a; y = b;
    d = a - b;
    case (o)
      OP_ADD, OP_ADDI:   return 16'(x + y);
      OP_ADDC, OP_ADDCI: return 16'((x + y) >> 16);
      OP_SUB, OP_SUBI:   return 16'(x - y);
      OP_SUBC, OP_SUBCI: return (x >= y) ? 16'd1 : 16'd0;
      OP_AND, OP_ANDI:   return a & b;
      OP_OR, OP_ORI:     return a | b;
      OP_XOR, OP_XORI:   return a ^ b;
      OP_LSL, OP_LSLI:   return a << b[3:0];
      OP_LSR, OP_LSRI:   return a >> b[3:0];
      OP_ASR, OP_ASRI:   return 16'($signed(a) >>> b[3:0]);
      OP_SLT:            return 16'(d[15]);
      OP_SLE:            return 16'(d[15] || d == 0);
      OP_SGT:            return 16'(!d[15] && d != 0);
      OP_SGE:            return 16'(!d[15]);
      OP_SEQ:            return 16'(a == b);
      OP_SNE:            return 16'(a != b);
      default:           return 16'hFFFF;
    endcase
  endfunction

  // cycles per instruction from the instruction table
  function automatic int table_cycles(input logic [5:0] o);
    case (o)
      OP_TRAP, OP_ACALL, OP_RCALL, OP_LBU, OP_LBS, OP_LW: return 10;
      OP_SBL, OP_SBH, OP_SW: return 11;
      OP_IOR, OP_IOW: return 12;
      default: return 9;
    endcase
  endfunction

  // ---------------- cycle counting ----------------
  int cyc = 0, last_start = -1, ints_since = 0;
  logic [5:0] last_op;
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (int_entry) ints_since++;
      if (dut.u_control.state == 2'd0 && dut.u_control.step == 3'd0) begin
        if (last_start >= 0) begin
          checks++; n_timed++;
          if (cyc - last_start - 3 * ints_since != table_cycles(last_op)) begin
            failures++;
            $display("FAIL op %h took %0d cycles", last_op, cyc - last_start - 3 * ints_since);
          end
        end
        last_start = cyc;
        ints_since = 0;
      end
      if (dut.u_control.state == 2'd1) last_op = dut.op;
    end
  end

  // ---------------- the program ----------------
  initial begin
    logic [5:0] ops [] = '{OP_ADD, OP_ADDI, OP_ADDC, OP_ADDCI, OP_SUB, OP_SUBI, OP_SUBC, OP_SUBCI,
                           OP_AND, OP_ANDI, OP_OR, OP_ORI, OP_XOR, OP_XORI, OP_LSL, OP_LSLI,
                           OP_LSR, OP_LSRI, OP_ASR, OP_ASRI, OP_SLT, OP_SLE, OP_SGT, OP_SGE,
                           OP_SEQ, OP_SNE, 6'h2E};
    logic [15:0] a, b;
    logic [17:0] loop_at, wait_at, ret1, ret2;

    foreach (mem[i]) mem[i] = 8'h00;
    pc_asm = 0;
    emit(ma(OP_JA, 0, 0, 18'h100));
    // interrupt A handler: r13++ ; rei
    pc_asm = 18'h10;
    emit(ri(OP_ADDI, 13, 13, 16'd1));
    emit(op_only(OP_REI));
    // interrupt B handler: r12++ ; rfe
    pc_asm = 18'h20;
    emit(ri(OP_ADDI, 12, 12, 16'd1));
    emit(op_only(OP_RFE));
    // subroutines
    pc_asm = SUB1;
    emit(ri(OP_ADDI, 7, 0, 16'd77));
    emit(r3(OP_JR, 0, 15, 0));
    pc_asm = SUB2;
    emit(ri(OP_ADDI, 9, 0, 16'd99));
    emit(r3(OP_JR, 0, 14, 0));

    pc_asm = 18'h100;
    // ALU, compare and shift instructions
    for (int k = 0; k < 3; k++) begin
      foreach (ops[i]) begin
        a = 16'($urandom); b = 16'($urandom);
        if (k == 1) begin a = 16'($urandom_range(0, 50)); b = 16'($urandom_range(0, 50)); end
        if (k == 2) b = a;
        emit(ri(OP_ADDI, 1, 0, a));
        emit(ri(OP_ADDI, 2, 0, b));
        if (ops[i][0] && ops[i][5:3] != 3'b111) emit(ri(ops[i], 3, 1, b));
        else                                     emit(r3(ops[i], 3, 1, 2));
        emit_result(3, ref_alu(ops[i], a, b));
      end
    end
    // r0 stays zero
    emit(ri(OP_ADDI, 0, 0, 16'h5555));
    emit(r3(OP_OR, 3, 0, 0));
    emit_result(3, 16'h0000);
    // loads, with displacement above 64 KB
    mem[18'h3000] = 8'h85;
    mem[18'h20010] = 8'h5A;
    emit(ri(OP_ADDI, 5, 0, 16'h0100));
    emit(ma(OP_LBU, 4, 5, 18'h2F00)); emit_result(4, 16'h0085);
    emit(ma(OP_LBS, 4, 5, 18'h2F00)); emit_result(4, 16'hFF85);
    emit(ma(OP_LW, 4, 5, 18'h2F00));  emit_result(4, 16'h0085);
    emit(ri(OP_ADDI, 6, 0, 16'h0010));
    emit(ma(OP_LBU, 4, 6, 18'h20000)); emit_result(4, 16'h005A);
    emit(ri(OP_ADDI, 6, 0, 16'hFFFF));
    emit(ma(OP_LBU, 4, 6, 18'h10011)); emit_result(4, 16'h005A);   // 0x10011 + 0xFFFF
    // ior / iow and sw
    emit(ri(OP_ADDI, 1, 0, 16'hBEEF));
    emit(ma(OP_IOW, 1, 0, 18'h3F000));
    emit(ma(OP_IOR, 4, 0, 18'h3F000)); emit_result(4, 16'h00EF);
    emit(ma(OP_SW, 1, 0, 18'h3F001));
    emit(ma(OP_LBU, 4, 0, 18'h3F001)); emit_result(4, 16'h00EF);
    emit(ma(OP_SBH, 1, 0, 18'h3F002));
    emit(ma(OP_LBU, 4, 0, 18'h3F002)); emit_result(4, 16'h00BE);
    // calls
    emit(ma(OP_ACALL, 15, 0, SUB1));
    ret1 = pc_asm;
    emit_result(7, 16'd77);
    emit_result(15, 16'(ret1 >> 2));
    emit(ri(OP_ADDI, 8, 0, 16'(SUB2 >> 2)));
    emit(r3(OP_RCALL, 14, 8, 0));
    ret2 = pc_asm;
    emit_result(9, 16'd99);
    emit_result(14, 16'(ret2 >> 2));
    // counted loop: r11 = 2 * 5
    emit(ri(OP_ADDI, 10, 0, 16'd5));
    emit(r3(OP_ADD, 11, 0, 0));
    loop_at = pc_asm;
    emit(ri(OP_SUBI, 10, 10, 16'd1));
    emit(ri(OP_ADDI, 11, 11, 16'd2));
    emit(ma(OP_BNEZ, 0, 10, loop_at));
    emit_result(11, 16'd10);
    // beqz not taken then taken
    emit(ma(OP_BEQZ, 0, 11, 18'h3FF00));          // r11 != 0: falls through
    emit(ma(OP_BEQZ, 0, 0, pc_asm + 8));           // taken, skips the next
    emit(ri(OP_ADDI, 11, 0, 16'd1234));            // skipped
    emit_result(11, 16'd10);
    // interrupts
    emit(r3(OP_ADD, 13, 0, 0));
    emit(r3(OP_ADD, 12, 0, 0));
    emit(op_only(OP_EI));
    emit(ma(OP_SBL, 0, 0, 18'h3FFF0));             // ask for IRQA
    wait_at = pc_asm;
    emit(ma(OP_BEQZ, 0, 13, wait_at));
    emit_result(13, 16'd1);
    emit(ma(OP_SBL, 0, 0, 18'h3FFF1));             // ask for IRQB
    wait_at = pc_asm;
    emit(ma(OP_BEQZ, 0, 12, wait_at));
    emit_result(12, 16'd1);
    // rfe left interrupts off: a new IRQA stays pending until ei
    emit(ma(OP_SBL, 0, 0, 18'h3FFF0));
    for (int i = 0; i < 6; i++) emit(op_only(OP_NOP));
    emit_result(13, 16'd1);
    emit(op_only(OP_EI));
    emit(op_only(OP_NOP));
    emit_result(13, 16'd2);
    // trap enters through vector A
    emit(op_only(OP_TRAP));
    emit_result(13, 16'd3);
    emit(op_only(OP_HALT));
    check("program fits below the subroutines", 32'(pc_asm < SUB1), 1);

    repeat (3) @(posedge clk);
    rst = 0;
    wait (halted);
    repeat (20) @(posedge clk);
    check("still halted", 32'(halted), 1);
    foreach (expv[i])
      check($sformatf("result %0d", i), 32'({mem[RES + 18'(2 * i)], mem[RES + 18'(2 * i + 1)]}), 32'(expv[i]));
    check("instructions timed", 32'(n_timed > 200), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
