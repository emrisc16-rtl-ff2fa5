// tb_emrisc16_control: self-checking test of the Processor Control Unit.
//
// The testbench plays the rest of the core: it presents an opcode and a
// branch condition and records, cycle by cycle, the controls and strobes the
// unit produces from one fetch start to the next. It checks the published
// cycle count of every instruction class (9, 10, 11 or 12 cycles), the RD_
// pattern of the 8-cycle fetch, when RD_, WR_ and DBOUT_ fall in loads,
// stores, ior and iow, the register and PC writes of calls, jumps, branches,
// trap, rei and rfe, the enable-interrupts bit, halt, and interrupt entry:
// three cycles in place of a fetch, vector A before B, and no entry while
// interrupts are disabled.
module tb_emrisc16_control;
  import emrisc16_pkg::*;

  logic       clk = 0, rst = 1;
  logic [5:0] op;
  logic       br_true, irqa, irqb;
  logic       ir_wr, pc_wr, intpc_wr, reg_wr, addr_sel, rd_n, wr_n, dbout_n;
  logic       eib, halted, int_entry;
  logic [1:0] ir_sel;
  pcsrc_e     pcsrc_sel;
  wsrc_e      wsrc;
  int checks = 0, failures = 0;

  emrisc16_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // One record per cycle, index 1 = first fetch cycle.
  typedef struct packed {
    logic ir_wr; logic [1:0] ir_sel; logic pc_wr; logic [2:0] pcsrc;
    logic intpc_wr; logic reg_wr; logic [1:0] wsrc; logic addr_sel;
    logic rd; logic wr; logic dbout; logic int_entry;
  } rec_t;
  rec_t log_q [64];
  int   ncyc;

  function automatic rec_t sample();
    rec_t r;
    r.ir_wr = ir_wr; r.ir_sel = ir_sel; r.pc_wr = pc_wr; r.pcsrc = pcsrc_sel;
    r.intpc_wr = intpc_wr; r.reg_wr = reg_wr; r.wsrc = wsrc; r.addr_sel = addr_sel;
    r.rd = !rd_n; r.wr = !wr_n; r.dbout = !dbout_n; r.int_entry = int_entry;
    return r;
  endfunction

  // Called in the middle of a first fetch cycle; returns in the middle of
  // the next one.
  task automatic run(input logic [5:0] o, input logic br);
    op = o; br_true = br;
    ncyc = 1;
    log_q[1] = sample();
    forever begin
      @(negedge clk);
      if (ir_wr && ir_sel == 2'd0) break;
      ncyc++;
      log_q[ncyc] = sample();
      if (ncyc == 60) break;
    end
  endtask

  task automatic check_fetch(input string n);
    for (int c = 1; c <= 8; c++) begin
      check({n, " fetch rd"}, 32'(log_q[c].rd), 32'(c % 2));
      check({n, " fetch ir_wr"}, 32'(log_q[c].ir_wr), 32'(c % 2));
      if (c % 2 == 1) check({n, " fetch byte"}, 32'(log_q[c].ir_sel), 32'((c - 1) / 2));
      check({n, " fetch pc+1"}, 32'(log_q[c].pc_wr && log_q[c].pcsrc == PCSRC_INC), 32'(1 - c % 2));
      check({n, " fetch addr"}, 32'(log_q[c].addr_sel), 0);
      check({n, " fetch wr"}, 32'(log_q[c].wr), 0);
    end
  endtask

  initial begin
    op = OP_NOP; br_true = 0; irqa = 0; irqb = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1;   // still in the first fetch cycle
    check("reset eib", 32'(eib), 0);

    // ALU and shift instructions: 9 cycles, register write in cycle 9
    run(OP_ADD, 0);
    check("add cycles", ncyc, 9); check_fetch("add");
    check("add reg_wr", 32'(log_q[9].reg_wr), 1);
    check("add wsrc", 32'(log_q[9].wsrc), 32'(WSRC_ALU));
    run(OP_ASRI, 0);
    check("asri cycles", ncyc, 9);
    check("asri wsrc", 32'(log_q[9].wsrc), 32'(WSRC_SHIFT));
    run(OP_SGE, 0);
    check("sge cycles", ncyc, 9);
    check("sge wsrc", 32'(log_q[9].wsrc), 32'(WSRC_ALU));
    run(OP_NOP, 0);
    check("nop cycles", ncyc, 9);
    check("nop no write", 32'(log_q[9].reg_wr | log_q[9].pc_wr), 0);

    // loads: address in 9, RD_ and write in 10
    for (int k = 0; k < 3; k++) begin
      run(k == 0 ? OP_LBU : k == 1 ? OP_LBS : OP_LW, 0);
      check("load cycles", ncyc, 10); check_fetch("load");
      check("load c9 addr", 32'(log_q[9].addr_sel), 1);
      check("load c9 rd", 32'(log_q[9].rd), 0);
      check("load c10 addr", 32'(log_q[10].addr_sel), 1);
      check("load c10 rd", 32'(log_q[10].rd), 1);
      check("load c10 write", 32'(log_q[10].reg_wr && log_q[10].wsrc == WSRC_MEM), 1);
    end
    // stores: address+data 9..11, WR_ only in 10
    for (int k = 0; k < 3; k++) begin
      run(k == 0 ? OP_SBL : k == 1 ? OP_SBH : OP_SW, 0);
      check("store cycles", ncyc, 11);
      for (int c = 9; c <= 11; c++) begin
        check("store addr", 32'(log_q[c].addr_sel), 1);
        check("store dbout", 32'(log_q[c].dbout), 1);
        check("store wr", 32'(log_q[c].wr), 32'(c == 10));
        check("store no reg", 32'(log_q[c].reg_wr), 0);
      end
    end
    // ior: RD_ 10..12, data taken in 12
    run(OP_IOR, 0);
    check("ior cycles", ncyc, 12);
    for (int c = 9; c <= 12; c++) begin
      check("ior addr", 32'(log_q[c].addr_sel), 1);
      check("ior rd", 32'(log_q[c].rd), 32'(c >= 10));
      check("ior write", 32'(log_q[c].reg_wr), 32'(c == 12));
    end
    // iow: data 9..12, WR_ only in 12
    run(OP_IOW, 0);
    check("iow cycles", ncyc, 12);
    for (int c = 9; c <= 12; c++) begin
      check("iow addr", 32'(log_q[c].addr_sel), 1);
      check("iow dbout", 32'(log_q[c].dbout), 1);
      check("iow wr", 32'(log_q[c].wr), 32'(c == 12));
    end

    // jumps and branches
    run(OP_JA, 0);
    check("ja cycles", ncyc, 9);
    check("ja pc", 32'(log_q[9].pc_wr && log_q[9].pcsrc == PCSRC_DEC), 1);
    run(OP_JR, 0);
    check("jr pc", 32'(log_q[9].pc_wr && log_q[9].pcsrc == PCSRC_REG), 1);
    run(OP_BEQZ, 1);
    check("taken branch", 32'(log_q[9].pc_wr && log_q[9].pcsrc == PCSRC_DEC), 1);
    check("branch cycles", ncyc, 9);
    run(OP_BNEZ, 0);
    check("untaken branch", 32'(log_q[9].pc_wr), 0);
    run(OP_ACALL, 0);
    check("acall cycles", ncyc, 10);
    check("acall link", 32'(log_q[9].reg_wr && log_q[9].wsrc == WSRC_PC), 1);
    check("acall jump", 32'(log_q[10].pc_wr && log_q[10].pcsrc == PCSRC_DEC), 1);
    run(OP_RCALL, 0);
    check("rcall cycles", ncyc, 10);
    check("rcall jump", 32'(log_q[10].pc_wr && log_q[10].pcsrc == PCSRC_REG), 1);

    // system control
    run(OP_EI, 0);
    check("ei cycles", ncyc, 9);
    check("ei", 32'(eib), 1);
    run(OP_TRAP, 0);
    check("trap cycles", ncyc, 10);
    check("trap intpc", 32'(log_q[9].intpc_wr), 1);
    check("trap vector", 32'(log_q[10].pc_wr && log_q[10].pcsrc == PCSRC_IADDRA), 1);
    check("trap eib", 32'(eib), 0);
    run(OP_REI, 0);
    check("rei cycles", ncyc, 9);
    check("rei pc", 32'(log_q[9].pc_wr && log_q[9].pcsrc == PCSRC_INTPC), 1);
    check("rei eib", 32'(eib), 1);
    run(OP_DI, 0);
    check("di eib", 32'(eib), 0);
    run(OP_RFE, 0);
    check("rfe pc", 32'(log_q[9].pc_wr && log_q[9].pcsrc == PCSRC_INTPC), 1);
    check("rfe eib", 32'(eib), 0);

    // an interrupt while disabled stays pending and is not taken
    irqa = 1; repeat (2) @(negedge clk); irqa = 0;
    run(OP_ADD, 0);   // this call starts mid-instruction; realign
    run(OP_ADD, 0);
    check("masked irq", ncyc, 9);
    // enabling takes the pending interrupt at the next boundary
    run(OP_EI, 0);
    check("irq A entry cycles", ncyc, 12);
    check("irq A no strobes", 32'({log_q[10].rd, log_q[11].rd, log_q[12].rd}), 0);
    check("irq A eib off", 32'(eib), 0);
    check("irq A intpc", 32'(log_q[11].intpc_wr), 1);
    check("irq A vector", 32'(log_q[12].pc_wr && log_q[12].pcsrc == PCSRC_IADDRA), 1);
    check("irq A entry flag", 32'(log_q[12].int_entry), 1);

    // both at once: A first, B after the handler's rei
    irqa = 1; irqb = 1; repeat (2) @(negedge clk); irqa = 0; irqb = 0;
    repeat (4) @(negedge clk);
    run(OP_NOP, 0);   // realign to a fetch start
    run(OP_REI, 0);
    check("A before B", 32'(log_q[12].pcsrc), 32'(PCSRC_IADDRA));
    run(OP_REI, 0);
    check("then B", 32'(log_q[12].pc_wr && log_q[12].pcsrc == PCSRC_IADDRB), 1);
    run(OP_REI, 0);
    check("latches cleared", ncyc, 9);

    // halt stops the core until an enabled interrupt
    run(OP_HALT, 0);
    check("halt stops", ncyc, 60);
    check("halted", 32'(halted), 1);
    irqb = 1; repeat (2) @(negedge clk); irqb = 0;
    repeat (8) @(negedge clk);
    check("woken", 32'(halted), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
