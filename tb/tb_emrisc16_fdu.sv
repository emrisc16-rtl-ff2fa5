// tb_emrisc16_fdu: self-checking test of the Fetch and Decode Unit.
//
// Loads instruction words one byte per clock, most significant byte first,
// and checks the decoded fields. Three words are the encodings of "acall r15,
// 0x38", "add r3, r1, r2" and "jr r15" as a hand-assembled listing gives them;
// then random words are checked against fields sliced from the word, including
// the rule that stores read the rd field on the rb output.
module tb_emrisc16_fdu;
  import emrisc16_pkg::*;

  logic        clk = 0, rst = 1;
  logic [7:0]  data_in;
  logic        ir_wr;
  logic [1:0]  ir_sel;
  logic [5:0]  op;
  logic [3:0]  dest, ra, rb;
  logic [15:0] immed;
  logic [17:0] addr;
  int checks = 0, failures = 0;

  emrisc16_fdu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load(input logic [31:0] w);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      ir_wr   = 1;
      ir_sel  = 2'(i);
      data_in = w[31 - 8*i -: 8];
      @(negedge clk);
      ir_wr   = 0;
      data_in = $urandom;   // bytes on the bus between strobes must not load
    end
  endtask

  initial begin
    logic [31:0] w;
    ir_wr = 0; ir_sel = 0; data_in = 0;
    @(negedge clk);
    check("reset op", 32'(op), 0);
    check("reset addr", 32'(addr), 0);
    rst = 0;

    load(32'h3BC00038);
    check("acall op", 32'(op), 32'(OP_ACALL));
    check("acall rd", 32'(dest), 15);
    check("acall addr", 32'(addr), 32'h38);
    load(32'h80C48000);
    check("add op", 32'(op), 32'(OP_ADD));
    check("add rd", 32'(dest), 3);
    check("add ra", 32'(ra), 1);
    check("add rb", 32'(rb), 2);
    load(32'h243C0000);
    check("jr op", 32'(op), 32'(OP_JR));
    check("jr ra", 32'(ra), 15);

    for (int n = 0; n < 200; n++) begin
      w = $urandom;
      if (n % 4 == 0) w[31:26] = 6'h14 + 6'($urandom_range(0, 3));  // stores
      load(w);
      check("op", 32'(op), 32'(w[31:26]));
      check("dest", 32'(dest), 32'(w[25:22]));
      check("ra", 32'(ra), 32'(w[21:18]));
      check("rb", 32'(rb), (w[31:26] inside {6'h14, 6'h15, 6'h16, 6'h17}) ? 32'(w[25:22]) : 32'(w[17:14]));
      check("immed", 32'(immed), 32'(w[15:0]));
      check("addr", 32'(addr), 32'(w[17:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
