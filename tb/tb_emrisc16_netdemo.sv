// tb_emrisc16_netdemo: the network part of the demonstration workload, run
// on the EmRISC16 microcontroller at its default (and only) size.
//
// What it does: a program in SRAM builds a 42-byte ARP request (broadcast,
// sender 08:00:BE:EF:BE:EF / 192.168.0.2, target 192.168.0.1) with byte
// stores and a copy subroutine. It hands the request to the Ethernet chip:
//   - it issues a transmit command and the frame length with iow, low byte
//     first;
//   - it polls the chip's bus-status register through the PacketPage
//     pointer and data ports with ior, until the chip says it is ready;
//   - it streams the frame into the data port.
// The program then polls the receive-event register until a frame is
// waiting and reads the status, the length and the frame into SRAM with ior.
// If the frame is IPv4/UDP to port 5000, the program adds the first data
// byte to the input port value and shows the sum on the output port, then
// halts. Anything else shows 0xEE.
//
// The Ethernet chip is a behavioural model inside this testbench. It covers
// only the transmit and receive paths of its 8-bit I/O-mode interface:
//   - 16-bit registers at even offsets, each read or written as a low byte
//     (even address) and a high byte (odd address): data port 0x0,
//     transmit command 0x4, transmit length 0x6, PacketPage pointer 0xA,
//     PacketPage data 0xC;
//   - PacketPage 0x0138 bus status: bit 8 "ready for transmit" is set from
//     the third poll on;
//   - PacketPage 0x0124 receive event: bit 8 "frame received" is set once a
//     reply frame is waiting;
//   - data-port reads return the receive stream one byte per read strobe:
//     status low, status high, length low, length high, then the frame.
// The reply, a UDP frame with a random first data byte, is queued when the
// transmitted frame is complete. The register offsets and the PacketPage
// numbers follow the demonstration system. The byte order of the receive
// stream and the ready delay are this model's own choices.
//
// Checked: the transmitted frame byte by byte, the command and length
// registers, that the ready poll looped, the received frame in SRAM, the
// sum on the output port, and halt. Timing checks:
//   - the streaming loop (lbu, iow, addi, sge, beqz) writes one byte every
//     49 clock cycles;
//   - every ior holds RD_ low for three cycles.
// Watchdog: 200000 cycles.
module tb_emrisc16_netdemo;
  import emrisc16_pkg::*;
  import emrisc16_asm_pkg::*;

  localparam logic [17:0] POUT = 18'h30000, PIN = 18'h28000;
  localparam logic [17:0] RXTX0 = 18'h20000, TXCMD = 18'h20004, TXLEN = 18'h20006;
  localparam logic [17:0] PPPTR = 18'h2000A, PPD0 = 18'h2000C;
  localparam logic [17:0] MYHW = 18'h1000, MYIP = 18'h1006, HISIP = 18'h100A;
  localparam logic [17:0] FRAME = 18'h2000, RXBUF = 18'h3000;
  localparam logic [17:0] MAIN = 18'h100, MEMCPY = 18'h400, NETSEND = 18'h500;
  localparam logic [17:0] NETRECV = 18'h600, BAD = 18'h7F0;
  localparam int TXLEN_B = 42, RXLEN_B = 46;

  logic        clk = 0, rst = 1, irqa = 0, irqb = 0;
  logic        rd_n, wr_n, d_oe, srce_n, netce_n, ucrst;
  logic [16:0] a;
  logic [7:0]  d_in, d_out, pin, led;
  logic [7:0]  sram_d, net_d;
  logic        sram_en;
  logic [17:0] pc_asm;
  int checks = 0, failures = 0;

  emrisc16_mcu dut (.*);

  sram_model #(.AW(17)) u_sram (
    .clk, .ce_n(srce_n), .oe_n(rd_n), .we_n(wr_n), .a, .d_wr(d_out),
    .d_rd(sram_d), .d_rd_en(sram_en)
  );

  always #55 clk = ~clk;   // about 9 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: pc %0h, %0d bytes sent, %0d ready polls, %0d bytes received",
             dut.u_core.u_pcunit.pc_bus, tx_frame.size(), bid_polls, rx_idx);
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

  // ---------------- Ethernet chip model ----------------
  logic [15:0] txcmd = 0, txlen = 0, ppptr = 0;
  logic [7:0]  tx_frame [$];
  logic [7:0]  rx_stream [$];
  logic [7:0]  rx_frame [RXLEN_B];
  int          rx_idx = 0, bid_polls = 0;
  logic        rx_ready = 0, in_rd = 0;
  logic [3:0]  rd_off = 0;
  logic [15:0] pp_data;

  always_comb begin
    case (ppptr)
      16'h0138: pp_data = (bid_polls >= 2) ? 16'h0100 : 16'h0000;
      16'h0124: pp_data = rx_ready ? 16'h0100 : 16'h0000;
      default:  pp_data = 16'h0000;
    endcase
    case (a[3:0])
      4'h0, 4'h1: net_d = (rx_idx < rx_stream.size()) ? rx_stream[rx_idx] : 8'h00;
      4'hC:       net_d = pp_data[7:0];
      4'hD:       net_d = pp_data[15:8];
      default:    net_d = 8'h00;
    endcase
  end

  assign d_in = sram_en ? sram_d : (!netce_n && !rd_n) ? net_d : 8'h00;

  int tx_write_at [$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (!netce_n && !wr_n) begin
      case (a[3:0])
        4'h0, 4'h1: begin tx_frame.push_back(d_out); tx_write_at.push_back(cyc); end
        4'h4: txcmd[7:0]  <= d_out;
        4'h5: txcmd[15:8] <= d_out;
        4'h6: txlen[7:0]  <= d_out;
        4'h7: txlen[15:8] <= d_out;
        4'hA: ppptr[7:0]  <= d_out;
        4'hB: ppptr[15:8] <= d_out;
        default: ;
      endcase
    end
    // a read strobe to the chip ends: count a status poll or step the
    // receive stream (the address has already moved on, so use the latched one)
    if (!rd_n && !netce_n) begin
      in_rd = 1;
      rd_off = a[3:0];
    end else if (in_rd) begin
      in_rd = 0;
      if (rd_off == 4'hD && ppptr == 16'h0138) bid_polls++;
      if (rd_off <= 4'h1) rx_idx++;
    end
    if (!rx_ready && tx_frame.size() == TXLEN_B) rx_ready <= 1;
  end

  // ---------------- pin checks ----------------
  int rd_run = 0, n_ior = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (!rd_n && !netce_n) rd_run++;
      else if (rd_run != 0) begin
        n_ior++;
        if (rd_run != 3) begin failures++; $display("FAIL ior RD_ run %0d", rd_run); end
        rd_run = 0;
      end
    end
  end

  // ---------------- program ----------------
  task automatic emit(input logic [31:0] w);
    {u_sram.mem[17'(pc_asm)], u_sram.mem[17'(pc_asm + 1)], u_sram.mem[17'(pc_asm + 2)], u_sram.mem[17'(pc_asm + 3)]} = w;
    pc_asm += 4;
  endtask

  // store the 16-bit value in r2 big-endian at addr
  task automatic emit_st16(input logic [15:0] v, input logic [17:0] addr);
    emit(ri(OP_ADDI, 2, 0, v));
    emit(ma(OP_SBH, 2, 0, addr));
    emit(ma(OP_SBL, 2, 0, addr + 1));
  endtask

  // copy r3 bytes from src to dst through the copy subroutine
  task automatic emit_copy(input logic [17:0] src, input logic [17:0] dst, input int n);
    emit(ri(OP_ADDI, 1, 0, 16'(src)));
    emit(ri(OP_ADDI, 2, 0, 16'(dst)));
    emit(ri(OP_ADDI, 3, 0, 16'(n)));
    emit(ma(OP_ACALL, 15, 0, MEMCPY));
  endtask

  task automatic load_program();
    logic [17:0] lp;
    pc_asm = 18'h0;
    emit(op_only(OP_DI));
    emit(ma(OP_JA, 0, 0, MAIN));

    // copy: r1 source, r2 destination, r3 count (at least 1)
    pc_asm = MEMCPY;
    lp = pc_asm;
    emit(ma(OP_LBU, 4, 1, 18'h0));
    emit(ma(OP_SBL, 4, 2, 18'h0));
    emit(ri(OP_ADDI, 1, 1, 16'd1));
    emit(ri(OP_ADDI, 2, 2, 16'd1));
    emit(ri(OP_SUBI, 3, 3, 16'd1));
    emit(ma(OP_BNEZ, 0, 3, lp));
    emit(r3(OP_JR, 0, 15, 0));

    // send: r1 = length of the frame at FRAME
    pc_asm = NETSEND;
    emit(r3(OP_ADD, 12, 1, 0));
    emit(ri(OP_ADDI, 1, 0, 16'd1));
    emit(ri(OP_ADDI, 2, 0, 16'h00C0));
    emit(ma(OP_IOW, 2, 0, TXCMD));
    emit(ri(OP_LSRI, 2, 2, 16'd8));
    emit(ma(OP_IOW, 2, 1, TXCMD));
    emit(ma(OP_IOW, 12, 0, TXLEN));
    emit(ri(OP_LSRI, 13, 12, 16'd8));
    emit(ma(OP_IOW, 13, 1, TXLEN));
    emit(ri(OP_ADDI, 2, 0, 16'h0138));
    emit(ma(OP_IOW, 2, 0, PPPTR));
    emit(ri(OP_LSRI, 2, 2, 16'd8));
    emit(ma(OP_IOW, 2, 1, PPPTR));
    lp = pc_asm;
    emit(ma(OP_IOR, 3, 1, PPD0));
    emit(ri(OP_ANDI, 3, 3, 16'd1));
    emit(ma(OP_BEQZ, 0, 3, lp));
    emit(r3(OP_ADD, 13, 0, 0));
    lp = pc_asm;
    emit(ma(OP_LBU, 2, 13, FRAME));
    emit(ma(OP_IOW, 2, 0, RXTX0));
    emit(ri(OP_ADDI, 13, 13, 16'd1));
    emit(r3(OP_SGE, 4, 13, 12));
    emit(ma(OP_BEQZ, 0, 4, lp));
    emit(r3(OP_JR, 0, 15, 0));

    // receive: wait for a frame, copy it to RXBUF, r1 = its length
    pc_asm = NETRECV;
    emit(ri(OP_ADDI, 1, 0, 16'd1));
    emit(ri(OP_ADDI, 2, 0, 16'h0124));
    emit(ma(OP_IOW, 2, 0, PPPTR));
    emit(ri(OP_LSRI, 2, 2, 16'd8));
    emit(ma(OP_IOW, 2, 1, PPPTR));
    lp = pc_asm;
    emit(ma(OP_IOR, 3, 1, PPD0));
    emit(ri(OP_ANDI, 3, 3, 16'd1));
    emit(ma(OP_BEQZ, 0, 3, lp));
    emit(ma(OP_IOR, 4, 0, RXTX0));          // status, low then high
    emit(ma(OP_IOR, 4, 1, RXTX0));
    emit(ma(OP_IOR, 12, 0, RXTX0));         // length
    emit(ma(OP_IOR, 3, 1, RXTX0));
    emit(ri(OP_LSLI, 3, 3, 16'd8));
    emit(r3(OP_OR, 12, 12, 3));
    emit(r3(OP_ADD, 13, 0, 0));
    lp = pc_asm;
    emit(ma(OP_IOR, 2, 0, RXTX0));
    emit(ma(OP_SBL, 2, 13, RXBUF));
    emit(ri(OP_ADDI, 13, 13, 16'd1));
    emit(r3(OP_SGE, 4, 13, 12));
    emit(ma(OP_BEQZ, 0, 4, lp));
    emit(r3(OP_ADD, 1, 12, 0));
    emit(r3(OP_JR, 0, 15, 0));

    // not the expected frame
    pc_asm = BAD;
    emit(ri(OP_ADDI, 4, 0, 16'h00EE));
    emit(ma(OP_SBL, 4, 0, POUT));
    emit(op_only(OP_HALT));

    // main: build and send the ARP request, then serve one UDP frame
    pc_asm = MAIN;
    emit(ri(OP_ADDI, 5, 0, 16'h00FF));       // broadcast destination
    emit(ri(OP_ADDI, 1, 0, 16'd6));
    lp = pc_asm;
    emit(ri(OP_SUBI, 1, 1, 16'd1));
    emit(ma(OP_SBL, 5, 1, FRAME));
    emit(ma(OP_BNEZ, 0, 1, lp));
    emit_copy(MYHW, FRAME + 6, 6);           // source MAC
    emit_st16(16'h0806, FRAME + 12);         // type ARP
    emit_st16(16'h0001, FRAME + 14);         // hardware type Ethernet
    emit_st16(16'h0800, FRAME + 16);         // protocol IPv4
    emit_st16(16'h0604, FRAME + 18);         // address lengths
    emit_st16(16'h0001, FRAME + 20);         // request
    emit_copy(MYHW, FRAME + 22, 10);         // sender MAC and IP
    emit(ri(OP_ADDI, 1, 0, 16'd6));          // target MAC unknown: zeros
    lp = pc_asm;
    emit(ri(OP_SUBI, 1, 1, 16'd1));
    emit(ma(OP_SBL, 0, 1, FRAME + 32));
    emit(ma(OP_BNEZ, 0, 1, lp));
    emit_copy(HISIP, FRAME + 38, 4);         // target IP
    emit(ri(OP_ADDI, 1, 0, 16'(TXLEN_B)));
    emit(ma(OP_ACALL, 15, 0, NETSEND));
    emit(ma(OP_ACALL, 15, 0, NETRECV));
    // IPv4?
    emit(ma(OP_LBU, 2, 0, RXBUF + 12));
    emit(ma(OP_LBU, 3, 0, RXBUF + 13));
    emit(ri(OP_LSLI, 2, 2, 16'd8));
    emit(r3(OP_OR, 2, 2, 3));
    emit(ri(OP_SUBI, 2, 2, 16'h0800));
    emit(ma(OP_BNEZ, 0, 2, BAD));
    // UDP?
    emit(ma(OP_LBU, 2, 0, RXBUF + 23));
    emit(ri(OP_SUBI, 2, 2, 16'h0011));
    emit(ma(OP_BNEZ, 0, 2, BAD));
    // port 5000?
    emit(ma(OP_LBU, 2, 0, RXBUF + 36));
    emit(ma(OP_LBU, 3, 0, RXBUF + 37));
    emit(ri(OP_LSLI, 2, 2, 16'd8));
    emit(r3(OP_OR, 2, 2, 3));
    emit(ri(OP_SUBI, 2, 2, 16'd5000));
    emit(ma(OP_BNEZ, 0, 2, BAD));
    // first data byte + input port -> output port
    emit(ma(OP_SBL, 0, 0, PIN));
    emit(ma(OP_LBU, 4, 0, PIN));
    emit(ma(OP_LBU, 5, 0, RXBUF + 42));
    emit(r3(OP_ADD, 4, 4, 5));
    emit(ma(OP_SBL, 4, 0, POUT));
    emit(op_only(OP_HALT));
  endtask

  // ---------------- reference frames ----------------
  logic [7:0] exp_tx [TXLEN_B];
  logic [7:0] myhw [6] = '{8'h08, 8'h00, 8'hBE, 8'hEF, 8'hBE, 8'hEF};
  logic [7:0] myip [4] = '{8'd192, 8'd168, 8'd0, 8'd2};
  logic [7:0] hisip [4] = '{8'd192, 8'd168, 8'd0, 8'd1};

  task automatic build_frames();
    int k = 0;
    for (int i = 0; i < 6; i++) exp_tx[k++] = 8'hFF;
    foreach (myhw[i]) exp_tx[k++] = myhw[i];
    exp_tx[k++] = 8'h08; exp_tx[k++] = 8'h06;
    exp_tx[k++] = 8'h00; exp_tx[k++] = 8'h01;
    exp_tx[k++] = 8'h08; exp_tx[k++] = 8'h00;
    exp_tx[k++] = 8'h06; exp_tx[k++] = 8'h04;
    exp_tx[k++] = 8'h00; exp_tx[k++] = 8'h01;
    foreach (myhw[i]) exp_tx[k++] = myhw[i];
    foreach (myip[i]) exp_tx[k++] = myip[i];
    for (int i = 0; i < 6; i++) exp_tx[k++] = 8'h00;
    foreach (hisip[i]) exp_tx[k++] = hisip[i];

    // reply: Ethernet + IPv4 + UDP headers to port 5000 and 4 data bytes
    foreach (rx_frame[i]) rx_frame[i] = 8'($urandom);
    foreach (myhw[i]) rx_frame[i] = myhw[i];
    rx_frame[12] = 8'h08; rx_frame[13] = 8'h00;
    rx_frame[14] = 8'h45;
    rx_frame[23] = 8'h11;
    rx_frame[36] = 8'h13; rx_frame[37] = 8'h88;   // 5000
    rx_stream.push_back(8'h04); rx_stream.push_back(8'h01);  // status
    rx_stream.push_back(8'(RXLEN_B)); rx_stream.push_back(8'h00);
    foreach (rx_frame[i]) rx_stream.push_back(rx_frame[i]);
  endtask

  initial begin
    int gap_bad = 0;
    foreach (u_sram.mem[i]) u_sram.mem[i] = 8'h00;
    foreach (myhw[i]) u_sram.mem[17'(MYHW) + 17'(i)] = myhw[i];
    foreach (myip[i]) u_sram.mem[17'(MYIP) + 17'(i)] = myip[i];
    foreach (hisip[i]) u_sram.mem[17'(HISIP) + 17'(i)] = hisip[i];
    pin = {5'($urandom), 3'b000};     // PIN[2:0] grounded on the board
    build_frames();
    load_program();

    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (dut.u_core.halted);
    repeat (2) @(posedge clk);
    #1;

    check("transmit command", txcmd, 16'h00C0);
    check("transmit length", txlen, TXLEN_B);
    check("transmitted byte count", tx_frame.size(), TXLEN_B);
    for (int i = 0; i < TXLEN_B && i < tx_frame.size(); i++)
      check($sformatf("tx byte %0d", i), tx_frame[i], exp_tx[i]);
    checks++;
    if (bid_polls < 3) begin failures++; $display("FAIL ready poll ran %0d times", bid_polls); end
    for (int i = 1; i < tx_write_at.size(); i++)
      if (tx_write_at[i] - tx_write_at[i - 1] != 49) gap_bad++;
    check("cycles per streamed byte (49)", gap_bad, 0);
    check("receive stream consumed", rx_idx, rx_stream.size());
    for (int i = 0; i < RXLEN_B; i++)
      check($sformatf("rx byte %0d in SRAM", i), u_sram.mem[17'(RXBUF) + 17'(i)], rx_frame[i]);
    check("output port = input port + first UDP byte", led, 8'(pin + rx_frame[42]));
    check("halted", dut.u_core.halted, 1);
    checks++;
    if (n_ior < RXLEN_B + 4 + 3) begin failures++; $display("FAIL only %0d ior", n_ior); end
    $display("netdemo: %0d ready polls, %0d ior, %0d cycles", bid_polls, n_ior, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
