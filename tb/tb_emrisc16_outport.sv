// tb_emrisc16_outport: self-checking test of the output port.
//
// The port takes din only on a clock edge where ce and wr are both high and
// holds it otherwise.
module tb_emrisc16_outport;
  logic       clk = 0, rst = 1, ce, wr;
  logic [7:0] din, dout, held;
  int checks = 0, failures = 0;

  emrisc16_outport dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; wr = 0; din = 0;
    @(negedge clk);
    checks++;
    if (dout !== 0) failures++;
    rst = 0;
    held = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ce = 1'($urandom); wr = 1'($urandom); din = 8'($urandom);
      @(posedge clk);
      if (ce && wr) held = din;
      #1;
      checks++;
      if (dout !== held) begin
        failures++;
        $display("FAIL dout %h expected %h", dout, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
