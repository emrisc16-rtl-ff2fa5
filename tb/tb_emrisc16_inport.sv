// tb_emrisc16_inport: self-checking test of the input port.
//
// A write strobe with the port selected samples the pins; changing the pins
// later does not change the held value; dout_en follows ce and rd.
module tb_emrisc16_inport;
  logic       clk = 0, rst = 1, ce, rd, wr, dout_en;
  logic [7:0] din, dout, held;
  int checks = 0, failures = 0;

  emrisc16_inport dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    ce = 0; rd = 0; wr = 0; din = 0;
    @(negedge clk);
    check("reset", 32'(dout), 0);
    rst = 0;
    held = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ce = 1'($urandom); rd = 1'($urandom); wr = 1'($urandom); din = 8'($urandom);
      #1;
      check("dout_en", 32'(dout_en), 32'(ce && rd));
      @(posedge clk);
      if (ce && wr) held = din;
      #1;
      check("dout", 32'(dout), 32'(held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
