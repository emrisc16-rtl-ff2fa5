// emrisc16_mcu: EmRISC16 microcontroller, the design placed on the FPGA.
//
// The processor core plus the on-chip parts of the document's demonstration
// system: an 8-bit input port, an 8-bit output port (driving the LED /
// 7-segment pins) and address decoding. The memory map is
//   0x00000-0x1FFFF  external 128 KB SRAM   (srce_n low)
//   0x20000-0x2000E  external Ethernet chip (netce_n low, uses A[3:0])
//   0x28000          input port             (store to sample PIN, load to read)
//   0x30000          output port            (store to write LED)
// Decoding looks only at address bits 17..15, so each device also appears at
// the other addresses of its range; that partial decode is this design's
// reading of the gate-level decoder, which takes those three address lines.
// Only A[16:0] leave the chip, as on the board. The bidirectional data pins are
// split into d_in, d_out and an output enable d_oe (high while the core drives
// the bus); a read of the input port is served inside the chip. ucrst is tied
// high to hold the board's unused 8031 in reset.
//
// Timing: everything is synchronous to clk; see emrisc16_core for the bus
// cycles. rst is active high.
module emrisc16_mcu (
  input  logic        clk,
  input  logic        rst,
  input  logic        irqa,
  input  logic        irqb,
  output logic        rd_n,
  output logic        wr_n,
  output logic [16:0] a,
  input  logic [7:0]  d_in,
  output logic [7:0]  d_out,
  output logic        d_oe,
  output logic        srce_n,
  output logic        netce_n,
  input  logic [7:0]  pin,
  output logic [7:0]  led,
  output logic        ucrst
);

  logic [17:0] abus;
  logic [7:0]  core_din, core_dout, in_dout;
  logic        dbout_n, in_ce, out_ce, in_en;

  emrisc16_core u_core (
    .clk, .rst, .irqa, .irqb,
    .rd_n, .wr_n, .dbout_n,
    .addr_bus     (abus),
    .data_bus_in  (core_din),
    .data_bus_out (core_dout),
    .eib       (),
    .halted    (),
    .int_entry ()
  );

  // Address decoder.
  assign srce_n  = abus[17];
  assign netce_n = !(abus[17] && !abus[16] && !abus[15]);
  assign in_ce   = abus[17] && !abus[16] && abus[15];
  assign out_ce  = abus[17] && abus[16];

  emrisc16_inport u_inport (
    .clk, .rst,
    .ce      (in_ce),
    .rd      (!rd_n),
    .wr      (!wr_n),
    .din     (pin),
    .dout    (in_dout),
    .dout_en (in_en)
  );

  emrisc16_outport u_outport (
    .clk, .rst,
    .ce   (out_ce),
    .wr   (!wr_n),
    .din  (core_dout),
    .dout (led)
  );

  assign core_din = in_en ? in_dout : d_in;
  assign a        = abus[16:0];
  assign d_out    = core_dout;
  assign d_oe     = !dbout_n;
  assign ucrst    = 1'b1;

endmodule
