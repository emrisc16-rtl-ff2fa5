// tb_emrisc16_memio: self-checking test of the Memory and I/O Unit.
//
// Displacement sums (18-bit address plus zero-extended 16-bit register,
// modulo 2^18), the PC / sum address multiplexer, the high/low byte choice
// of stores and sign or zero extension of loads.
module tb_emrisc16_memio;
  logic [5:0]  op;
  logic [17:0] pc_bus, dec_addr, addr_bus;
  logic [15:0] rega, regb, dest_mem;
  logic        addr_sel;
  logic [7:0]  data_bus_in, data_bus_out;
  int checks = 0, failures = 0;

  emrisc16_memio dut (.*);

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
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int unsigned s;
    for (int n = 0; n < 2000; n++) begin
      op = 6'h10 + 6'($urandom_range(0, 7));
      pc_bus = 18'($urandom); dec_addr = 18'($urandom);
      rega = 16'($urandom); regb = 16'($urandom);
      addr_sel = 1'($urandom); data_bus_in = 8'($urandom);
      if (n == 0) begin dec_addr = 18'h3FFFF; rega = 16'h0002; addr_sel = 1; end
      #1;
      s = (int'(dec_addr) + int'(rega)) % (1 << 18);
      check("addr_bus", 32'(addr_bus), addr_sel ? s : 32'(pc_bus));
      check("data_out", 32'(data_bus_out), (op == 6'h15) ? 32'(regb >> 8) : 32'(regb & 16'hFF));
      if (op == 6'h11)
        check("lbs", 32'(dest_mem), 32'(data_bus_in) | (data_bus_in[7] ? 32'hFF00 : 0));
      else
        check("load", 32'(dest_mem), 32'(data_bus_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
