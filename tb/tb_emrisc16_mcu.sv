// tb_emrisc16_mcu: end-to-end test of the EmRISC16 microcontroller.
//
// The microcontroller runs, at its default (and only) size, a program that
// does in small what the demonstration system does: it lights "0" on the
// 7-segment output through a table lookup, writes an Ethernet-chip register
// with ior/iow byte accesses, computes an IP header checksum with the
// end-around carry idiom (addc), takes interrupts A and B, strobes and reads
// the input port, adds a byte read from the Ethernet chip to the port value
// and shows the sum, traps, and halts. Off-chip parts are testbench models: a
// 128 KB SRAM and a 16-byte register window standing in for the Ethernet
// chip. A store to SRAM address 0x1FFF0 asks the testbench for an IRQA pulse,
// 0x1FFF2 for IRQA and IRQB together.
//
// Checked: the program's results in SRAM and on LED; the checksum against a
// reference computed here; the order of the Ethernet register writes; pin
// timing (RD_ low exactly three cycles for ior, WR_ low one cycle with the
// data bus driven for every write, a cycle with both strobes high after each
// SRAM store); decoder chip enables; that RD_ and WR_ are never low together.
// Each mechanism the design has is counted and must occur at least once:
// fetch, load, store, ior, iow, taken and untaken branch, call, interrupt A,
// interrupt B, an interrupt held off while disabled, both interrupts pending
// at once, trap, halt, input-port strobe and read, output-port write.
module tb_emrisc16_mcu;
  import emrisc16_pkg::*;
  import emrisc16_asm_pkg::*;

  // memory map of the program
  localparam logic [17:0] POUT = 18'h30000, PIN = 18'h28000;
  localparam logic [17:0] RXTX0 = 18'h20000, PPPTR = 18'h2000A, PPD0 = 18'h2000C;
  localparam logic [17:0] FLAGA = 18'h1000, FLAGB = 18'h1001, PRIO = 18'h1002;
  localparam logic [17:0] MASKED = 18'h1003, AFTER_EI = 18'h1004, AFTER_TRAP = 18'h1005;
  localparam logic [17:0] LEDTAB = 18'h1100, HDR = 18'h1200;
  localparam logic [17:0] LED_SUB = 18'h40, CSUM_SUB = 18'h80;

  logic        clk = 0, rst = 1, irqa = 0, irqb = 0;
  logic        rd_n, wr_n, d_oe, srce_n, netce_n, ucrst;
  logic [16:0] a;
  logic [7:0]  d_in, d_out, pin, led;
  logic [7:0]  sram_d, net_d;
  logic        sram_en;
  logic [7:0]  net_reg [16];
  logic [7:0]  net_log [$];
  logic [17:0] pc_asm;
  logic [7:0]  hdr [20];
  logic [7:0]  led_hist [$];
  int checks = 0, failures = 0;

  emrisc16_mcu dut (.*);

  sram_model #(.AW(17)) u_sram (
    .clk, .ce_n(srce_n), .oe_n(rd_n), .we_n(wr_n), .a, .d_wr(d_out),
    .d_rd(sram_d), .d_rd_en(sram_en)
  );

  always #55 clk = ~clk;   // about 9 MHz

  initial begin
    repeat (20000) @(posedge clk);
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

  // Ethernet chip stand-in: 16 byte registers on A[3:0].
  assign net_d = net_reg[a[3:0]];
  assign d_in  = sram_en ? sram_d : (!netce_n && !rd_n) ? net_d : 8'h00;
  always @(posedge clk)
    if (!netce_n && !wr_n) begin
      net_reg[a[3:0]] <= d_out;
      net_log.push_back(8'(a[3:0]));
      net_log.push_back(d_out);
    end

  // ---------------- pin-level checks and mechanism counters ----------------
  int n_fetch = 0, n_load = 0, n_store = 0, n_ior = 0, n_iow = 0, n_br_t = 0, n_br_n = 0;
  int n_call = 0, n_inta = 0, n_intb = 0, n_masked = 0, n_both = 0, n_trap = 0, n_halt = 0;
  int n_pin_wr = 0, n_pin_rd = 0, n_led = 0;
  int rd_run = 0;
  logic prev_wr = 0, prev_store_wr = 0, prev_oe = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (!rd_n && !wr_n) begin failures++; $display("FAIL RD_ and WR_ low together"); end
      if (!wr_n && !(d_oe && prev_oe)) begin
        failures++; $display("FAIL data bus not driven through the write");
      end
      // ior: RD_ low for exactly three cycles on the Ethernet chip
      if (!rd_n && !netce_n) rd_run++;
      else if (rd_run != 0) begin
        checks++;
        if (rd_run != 3) begin failures++; $display("FAIL ior RD_ run %0d", rd_run); end
        rd_run = 0;
      end
      // a cycle with both strobes high after an SRAM store
      if (prev_store_wr) begin
        checks++;
        if (!rd_n || !wr_n) begin failures++; $display("FAIL no recovery cycle after a store"); end
      end
      prev_store_wr = !wr_n && !srce_n;
      prev_oe = d_oe;
      // counters, from the pins where they show
      if (!rd_n && !srce_n && dut.u_core.u_control.state == 2'd0) n_fetch++;
      if (!wr_n && !netce_n) n_iow++;
      if (!wr_n && dut.u_inport.ce) n_pin_wr++;
      if (!rd_n && dut.u_inport.ce) n_pin_rd++;
      if (!wr_n && dut.u_outport.ce) begin n_led++; led_hist.push_back(d_out); end
      if (dut.u_core.int_entry) begin
        if (dut.u_core.u_control.irqa_l) n_inta++; else n_intb++;
        if (dut.u_core.u_control.irqa_l && dut.u_core.u_control.irqb_l) n_both++;
      end
      if (dut.u_core.u_control.irqa_l && !dut.u_core.eib) n_masked++;
      if (dut.u_core.u_control.state == 2'd1 && dut.u_core.u_control.step == 3'd0) begin
        case (dut.u_core.op)
          OP_LBU, OP_LBS, OP_LW: n_load++;
          OP_SBL, OP_SBH, OP_SW: n_store++;
          OP_IOR: n_ior++;
          OP_ACALL, OP_RCALL: n_call++;
          OP_TRAP: n_trap++;
          OP_HALT: n_halt++;
          OP_BEQZ, OP_BNEZ: if (dut.u_core.br_true) n_br_t++; else n_br_n++;
          default: ;
        endcase
      end
    end
  end

  // IRQ requests from the program
  always @(posedge clk)
    if (!wr_n && !srce_n && (a == 17'h1FFF0 || a == 17'h1FFF2)) begin
      automatic logic both = (a == 17'h1FFF2);
      fork begin
        repeat (2) @(posedge clk);
        irqa <= 1; irqb <= both;
        repeat (3) @(posedge clk);
        irqa <= 0; irqb <= 0;
      end join_none
    end

  // ---------------- program loader ----------------
  task automatic emit(input logic [31:0] w);
    {u_sram.mem[17'(pc_asm)], u_sram.mem[17'(pc_asm + 1)], u_sram.mem[17'(pc_asm + 2)], u_sram.mem[17'(pc_asm + 3)]} = w;
    pc_asm += 4;
  endtask

  // reference IP checksum: one's complement of the one's-complement sum
  function automatic logic [15:0] ref_csum();
    int unsigned s = 0;
    for (int i = 0; i < 20; i += 2) s += (i == 10) ? 0 : {hdr[i], hdr[i + 1]};
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  initial begin
    logic [7:0] seg [12] = '{8'h77, 8'h12, 8'h5D, 8'h5B, 8'h3A, 8'h6B, 8'h6F, 8'h52, 8'h7F, 8'h7B, 8'h7E, 8'h2F};
    logic [17:0] loop_at;
    logic [15:0] cs;

    foreach (u_sram.mem[i]) u_sram.mem[i] = 8'h00;
    foreach (net_reg[i]) net_reg[i] = 8'h00;
    net_reg[0] = 8'h04;              // first received byte
    pin = 8'h28;                      // PIN[7:3] = 5, PIN[2:0] grounded
    foreach (seg[i]) u_sram.mem[17'(LEDTAB) + 17'(i)] = seg[i];
    // an IPv4 header with random fields and a zero checksum field
    foreach (hdr[i]) hdr[i] = 8'($urandom);
    hdr[0] = 8'h45; hdr[10] = 0; hdr[11] = 0;
    foreach (hdr[i]) u_sram.mem[17'(HDR) + 17'(i)] = hdr[i];

    pc_asm = 0;
    emit(op_only(OP_DI));
    emit(ma(OP_JA, 0, 0, 18'h100));
    pc_asm = 18'h10;                                  // interrupt A / trap
    emit(ma(OP_SBL, 0, 0, FLAGA));
    emit(op_only(OP_REI));
    pc_asm = 18'h20;                                  // interrupt B
    emit(ma(OP_LBU, 11, 0, FLAGA));
    emit(ma(OP_SBL, 11, 0, PRIO));
    emit(ma(OP_SBL, 0, 0, FLAGB));
    emit(op_only(OP_REI));
    pc_asm = LED_SUB;                                 // show digit r2
    emit(ri(OP_ANDI, 2, 2, 16'h000F));
    emit(ma(OP_LBU, 3, 2, LEDTAB));
    emit(ma(OP_SBL, 3, 0, POUT));
    emit(r3(OP_JR, 0, 15, 0));
    pc_asm = CSUM_SUB;                                // checksum of header at r1
    emit(r3(OP_ADD, 2, 0, 0));
    emit(ri(OP_ADDI, 3, 0, 16'd10));
    emit(r3(OP_ADD, 7, 1, 0));
    loop_at = pc_asm;
    emit(ma(OP_LBU, 5, 7, 18'h0));
    emit(ma(OP_LBU, 6, 7, 18'h1));
    emit(ri(OP_LSLI, 5, 5, 16'd8));
    emit(r3(OP_OR, 5, 5, 6));
    emit(r3(OP_ADDC, 6, 2, 5));
    emit(r3(OP_ADD, 2, 2, 5));
    emit(r3(OP_ADD, 2, 2, 6));
    emit(ri(OP_ADDI, 7, 7, 16'd2));
    emit(ri(OP_SUBI, 3, 3, 16'd1));
    emit(ma(OP_BNEZ, 0, 3, loop_at));
    emit(ri(OP_XORI, 2, 2, 16'hFFFF));
    emit(ma(OP_SBH, 2, 1, 18'd10));
    emit(ma(OP_SBL, 2, 1, 18'd11));
    emit(r3(OP_JR, 0, 15, 0));

    pc_asm = 18'h100;
    emit(r3(OP_ADD, 2, 0, 0));
    emit(ma(OP_ACALL, 15, 0, LED_SUB));               // show 0
    emit(ri(OP_ADDI, 1, 0, 16'd1));                   // write 0x0114 to PPPtr, 0x0055 to PPD0
    emit(ri(OP_ADDI, 2, 0, 16'h0114));
    emit(ma(OP_IOW, 2, 0, PPPTR));
    emit(ri(OP_LSRI, 2, 2, 16'd8));
    emit(ma(OP_IOW, 2, 1, PPPTR));
    emit(ri(OP_ADDI, 3, 0, 16'h0055));
    emit(ma(OP_IOW, 3, 0, PPD0));
    emit(ri(OP_LSRI, 3, 3, 16'd8));
    emit(ma(OP_IOW, 3, 1, PPD0));
    emit(ri(OP_ADDI, 1, 0, 16'(HDR)));
    emit(ma(OP_ACALL, 15, 0, CSUM_SUB));
    emit(ri(OP_ADDI, 1, 0, 16'h00FF));
    emit(ma(OP_SBL, 1, 0, FLAGA));
    emit(ma(OP_SBL, 1, 0, FLAGB));
    emit(ma(OP_SBL, 1, 0, PRIO));
    emit(ma(OP_SBL, 0, 0, 18'h1FFF0));               // IRQA while disabled
    for (int i = 0; i < 6; i++) emit(op_only(OP_NOP));
    emit(ma(OP_LBU, 4, 0, FLAGA));
    emit(ma(OP_SBL, 4, 0, MASKED));
    emit(op_only(OP_EI));                             // pending IRQA taken now
    emit(ma(OP_LBU, 4, 0, FLAGA));
    emit(ma(OP_SBL, 4, 0, AFTER_EI));
    emit(ma(OP_SBL, 1, 0, FLAGA));
    emit(ma(OP_SBL, 0, 0, 18'h1FFF2));               // IRQA and IRQB together
    loop_at = pc_asm;
    emit(ma(OP_LBU, 4, 0, FLAGB));
    emit(ma(OP_BNEZ, 0, 4, loop_at));
    emit(ma(OP_SBL, 0, 0, PIN));                      // sample the input port
    emit(ma(OP_LBU, 3, 0, PIN));
    emit(ri(OP_LSRI, 3, 3, 16'd3));
    emit(ma(OP_IOR, 2, 0, RXTX0));
    emit(r3(OP_ADD, 2, 2, 3));
    emit(ma(OP_ACALL, 15, 0, LED_SUB));               // show 4 + 5
    emit(ma(OP_SBL, 1, 0, FLAGA));
    emit(op_only(OP_TRAP));
    emit(ma(OP_LBU, 4, 0, FLAGA));
    emit(ma(OP_SBL, 4, 0, AFTER_TRAP));
    emit(op_only(OP_HALT));

    repeat (3) @(posedge clk);
    rst = 0;
    wait (dut.u_core.halted);
    repeat (10) @(posedge clk);

    check("ucrst", 32'(ucrst), 1);
    cs = ref_csum();
    check("checksum high", 32'(u_sram.mem[17'(HDR) + 10]), 32'(cs[15:8]));
    check("checksum low", 32'(u_sram.mem[17'(HDR) + 11]), 32'(cs[7:0]));
    check("masked irq not taken", 32'(u_sram.mem[17'(MASKED)]), 32'hFF);
    check("pending irq taken after ei", 32'(u_sram.mem[17'(AFTER_EI)]), 0);
    check("A before B", 32'(u_sram.mem[17'(PRIO)]), 0);
    check("B handled", 32'(u_sram.mem[17'(FLAGB)]), 0);
    check("trap ran handler", 32'(u_sram.mem[17'(AFTER_TRAP)]), 0);
    check("led writes", 32'(led_hist.size()), 2);
    if (led_hist.size() == 2) begin
      check("first digit 0", 32'(led_hist[0]), 32'h77);
      check("then digit 9", 32'(led_hist[1]), 32'h7B);
    end
    check("LED pins", 32'(led), 32'h7B);
    check("net writes", 32'(net_log.size()), 8);
    if (net_log.size() == 8) begin
      check("PPPtr low", 32'({net_log[0], net_log[1]}), 32'h0A14);
      check("PPPtr high", 32'({net_log[2], net_log[3]}), 32'h0B01);
      check("PPD0 low", 32'({net_log[4], net_log[5]}), 32'h0C55);
      check("PPD0 high", 32'({net_log[6], net_log[7]}), 32'h0D00);
    end
    $display("mechanisms: fetch=%0d load=%0d store=%0d ior=%0d iow=%0d branch_taken=%0d branch_not=%0d call=%0d intA=%0d intB=%0d masked=%0d both=%0d trap=%0d halt=%0d pin_wr=%0d pin_rd=%0d led=%0d",
             n_fetch, n_load, n_store, n_ior, n_iow, n_br_t, n_br_n, n_call, n_inta, n_intb, n_masked, n_both, n_trap, n_halt, n_pin_wr, n_pin_rd, n_led);
    check("fetch seen", 32'(n_fetch > 0), 1);
    check("load seen", 32'(n_load > 0), 1);
    check("store seen", 32'(n_store > 0), 1);
    check("ior seen", 32'(n_ior > 0), 1);
    check("iow seen", 32'(n_iow > 0), 1);
    check("taken branch seen", 32'(n_br_t > 0), 1);
    check("untaken branch seen", 32'(n_br_n > 0), 1);
    check("call seen", 32'(n_call > 0), 1);
    check("interrupt A seen", 32'(n_inta > 0), 1);
    check("interrupt B seen", 32'(n_intb > 0), 1);
    check("masked interrupt seen", 32'(n_masked > 0), 1);
    check("both pending seen", 32'(n_both > 0), 1);
    check("trap seen", 32'(n_trap > 0), 1);
    check("halt seen", 32'(n_halt > 0), 1);
    check("input strobe seen", 32'(n_pin_wr > 0), 1);
    check("input read seen", 32'(n_pin_rd > 0), 1);
    check("output write seen", 32'(n_led > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
