// tb_emrisc16_alu: self-checking test of the arithmetic/logic/compare unit.
//
// Every opcode from 0x20 to 0x3F (the shift codes included, for which the
// unit must give its 0xFFFF error value) is applied with random and corner
// operands, and the result is compared with a reference written with 32-bit
// integer arithmetic. The comparisons follow the unit's rule: the sign of the
// 16-bit difference ra - rb and whether it is zero.
module tb_emrisc16_alu;
  logic [5:0]  op;
  logic [15:0] ra, rb, immed, out;
  int checks = 0, failures = 0;

  emrisc16_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_out(input logic [5:0] o, input logic [15:0] a, input logic [15:0] rbv, input logic [15:0] im);
    int unsigned b, x, y;
    logic [15:0] d;
    logic neg, eq;
    b = o[0] ? im : rbv;
    x = a; y = b;
    d = 16'(x - rbv);
    neg = d[15];
    eq = (a == rbv);
    case (o)
      6'h20, 6'h21: return 16'(x + y);
      6'h22, 6'h23: return ((x + y) > 32'hFFFF) ? 16'd1 : 16'd0;
      6'h24, 6'h25: return 16'(x - y);
      6'h26, 6'h27: return (x >= y) ? 16'd1 : 16'd0;     // no borrow
      6'h28, 6'h29: return 16'(x & y);
      6'h2A, 6'h2B: return 16'(x | y);
      6'h2C, 6'h2D: return 16'(x ^ y);
      6'h38: return {15'd0, neg};
      6'h39: return {15'd0, neg | eq};
      6'h3A: return {15'd0, !neg & !eq};
      6'h3B: return {15'd0, !neg};
      6'h3C: return {15'd0, eq};
      6'h3D: return {15'd0, !eq};
      default: return 16'hFFFF;
    endcase
  endfunction

  task automatic apply(input logic [5:0] o, input logic [15:0] a, input logic [15:0] b, input logic [15:0] im);
    logic [15:0] e;
    op = o; ra = a; rb = b; immed = im;
    #1;
    e = ref_out(o, a, b, im);
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL op %h ra %h rb %h im %h: got %h expected %h", o, a, b, im, out, e);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    for (int o = 6'h20; o <= 6'h3F; o++) begin
      foreach (corner[i]) foreach (corner[j]) apply(6'(o), corner[i], corner[j], corner[5 - j]);
      for (int n = 0; n < 200; n++) apply(6'(o), 16'($urandom), 16'($urandom), 16'($urandom));
      // small values, as software compares loop counters
      for (int n = 0; n < 50; n++) apply(6'(o), 16'($urandom_range(0, 100)), 16'($urandom_range(0, 100)), 16'($urandom_range(0, 100)));
    end
    // one's-complement end-around carry, as in an IP checksum loop
    apply(6'h22, 16'hF000, 16'h2000, 16'h0);
    apply(6'h20, 16'hF000, 16'h2000, 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
