// tb_emrisc16_regfile: self-checking test of the register file.
//
// Random writes and dual reads against a reference array; r0 must read zero
// on both ports even after a write to it; reg_addr must be port A shifted
// left by two; a read in the same cycle as a write sees the old value.
module tb_emrisc16_regfile;
  logic        clk = 0;
  logic        wr_en;
  logic [3:0]  sel_dest, sel_a, sel_b;
  logic [15:0] wr_data, a_out, b_out;
  logic [17:0] reg_addr;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  emrisc16_regfile dut (.*);

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
    wr_en = 0; sel_dest = 0; sel_a = 0; sel_b = 0; wr_data = 0;
    // fill every register, r0 included
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      wr_en = 1; sel_dest = 4'(r); wr_data = 16'($urandom);
      model[r] = (r == 0) ? 16'h0 : wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      sel_a = 4'($urandom); sel_b = 4'($urandom);
      wr_en = 1'($urandom); sel_dest = 4'($urandom); wr_data = 16'($urandom);
      #1;
      check("a_out", 32'(a_out), 32'(model[sel_a]));
      check("b_out", 32'(b_out), 32'(model[sel_b]));
      check("reg_addr", 32'(reg_addr), 32'({model[sel_a], 2'b00}));
      @(posedge clk);
      if (wr_en && sel_dest != 0) model[sel_dest] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
