// tb_emrisc16_pcunit: self-checking test of the Program Counter Unit.
//
// Random sequences of next-PC selections and INTPC loads against a reference
// model; the interrupt vectors must be 0x10 and 0x20 and the PC must count
// in 18 bits (wrap from 0x3FFFF to 0).
module tb_emrisc16_pcunit;
  import emrisc16_pkg::*;
  logic        clk = 0, rst = 1;
  logic [17:0] dec_addr, reg_addr, pc_bus, intpc;
  pcsrc_e      pcsrc_sel;
  logic        pc_wr, intpc_wr;
  logic [17:0] m_pc, m_intpc, nxt;
  int checks = 0, failures = 0;

  emrisc16_pcunit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    pc_wr = 0; intpc_wr = 0; pcsrc_sel = PCSRC_INC; dec_addr = 0; reg_addr = 0;
    @(negedge clk);
    check("reset pc", 32'(pc_bus), 0);
    check("reset intpc", 32'(intpc), 0);
    rst = 0;
    m_pc = 0; m_intpc = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      dec_addr = 18'($urandom); reg_addr = 18'($urandom);
      pcsrc_sel = pcsrc_e'($urandom_range(0, 5));
      if (n == 100) begin
        pcsrc_sel = PCSRC_DEC; dec_addr = 18'h3FFFF;
      end
      if (n == 101) pcsrc_sel = PCSRC_INC;
      pc_wr = (n == 100 || n == 101) ? 1'b1 : 1'($urandom);
      intpc_wr = 1'($urandom_range(0, 3) == 0);
      case (pcsrc_sel)
        PCSRC_INC:    nxt = m_pc + 1;
        PCSRC_DEC:    nxt = dec_addr;
        PCSRC_REG:    nxt = reg_addr;
        PCSRC_INTPC:  nxt = m_intpc;
        PCSRC_IADDRA: nxt = 18'h10;
        default:      nxt = 18'h20;
      endcase
      @(posedge clk);
      if (intpc_wr) m_intpc = m_pc;
      if (pc_wr) m_pc = nxt;
      #1;
      check("pc", 32'(pc_bus), 32'(m_pc));
      check("intpc", 32'(intpc), 32'(m_intpc));
      if (n == 101) check("wrap", 32'(pc_bus), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
