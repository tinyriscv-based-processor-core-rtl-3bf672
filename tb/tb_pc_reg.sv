// tb_pc_reg: self-checking test of the program counter.
// Checks the reset value, +4 stepping, hold, jump and the priority of a
// jump over a hold against a cycle-by-cycle model kept in the testbench.
module tb_pc_reg;
  logic clk = 0, rst, jump, hold;
  logic [31:0] jaddr, pc, exp;
  int checks = 0, failures = 0;

  pc_reg #(.RESET_PC(32'h0000_0100)) dut (.clk, .rst, .jump_i(jump), .jump_addr_i(jaddr), .hold_i(hold), .pc_o(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; jump = 0; hold = 0; jaddr = 0;
    @(posedge clk); #1;
    checks++; if (pc !== 32'h100) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0; exp = 32'h100;
    for (int n = 0; n < 500; n++) begin
      jump  = ($urandom % 5) == 0;
      hold  = ($urandom % 4) == 0;
      jaddr = $urandom & ~32'h3;
      @(posedge clk); #1;
      if (jump) exp = jaddr; else if (!hold) exp = exp + 4;
      checks++;
      if (pc !== exp) begin failures++; $display("FAIL n=%0d pc=%h exp=%h", n, pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
