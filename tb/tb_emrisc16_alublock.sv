// tb_emrisc16_alublock: self-checking test of the ALU block.
//
// Checks the shifter for lsl/lsli/lsr/lsri/asr/asri over every shift amount
// (amount from rb or from the immediate by opcode bit 0), the branch check
// for beqz/bnez and other opcodes, and that the ALU result reaches alu_out.
module tb_emrisc16_alublock;
  logic [5:0]  op;
  logic [15:0] ra, rb, immed, alu_out, shift_out;
  logic        br_true;
  int checks = 0, failures = 0;

  emrisc16_alublock dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: op %h ra %h rb %h im %h got %h expected %h", what, op, ra, rb, immed, got, exp);
    end
  endtask

  function automatic logic [15:0] ref_shift(input logic [5:0] o, input logic [15:0] a, input int n);
    logic [15:0] r;
    r = a;
    for (int i = 0; i < n; i++) begin
      case (o[2:1])
        2'b01:   r = {1'b0, r[15:1]};     // lsr
        2'b11:   r = {r[15], r[15:1]};    // asr
        default: r = {r[14:0], 1'b0};     // lsl
      endcase
    end
    return r;
  endfunction

  initial begin
    logic [5:0] sops [6] = '{6'h30, 6'h31, 6'h32, 6'h33, 6'h36, 6'h37};
    int amt;
    foreach (sops[k]) begin
      for (int n = 0; n < 16; n++) begin
        repeat (4) begin
          op = sops[k]; ra = 16'($urandom);
          rb = 16'($urandom); immed = 16'($urandom);
          if (op[0]) immed[3:0] = 4'(n); else rb[3:0] = 4'(n);
          #1;
          amt = n;
          check("shift", 32'(shift_out), 32'(ref_shift(op, ra, amt)));
        end
      end
    end
    // branch check
    for (int n = 0; n < 200; n++) begin
      op = 6'($urandom);
      if (n % 3 == 0) op = 6'h18;
      if (n % 3 == 1) op = 6'h19;
      ra = (n % 5 == 0) ? 16'h0 : 16'($urandom);
      #1;
      check("br_true", 32'(br_true), (op == 6'h18) ? 32'(ra == 0) : (op == 6'h19) ? 32'(ra != 0) : 0);
    end
    // the ALU result passes through
    op = 6'h20; ra = 16'd1000; rb = 16'd234; immed = 0; #1;
    check("add", 32'(alu_out), 1234);
    op = 6'h25; ra = 16'd10; rb = 0; immed = 16'd3; #1;
    check("subi", 32'(alu_out), 7);
    op = 6'h38; ra = 16'd3; rb = 16'd5; #1;
    check("slt", 32'(alu_out), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
