// tb_regs: self-checking test of the register file.
// Random writes and reads on all three read ports against an array model;
// x0 must read 0 even when written, and a read of the register being
// written in the same cycle must return the new value (bypass).
module tb_regs;
  logic clk = 0, rst, we;
  logic [4:0]  wa, ra1, ra2, ra3;
  logic [31:0] wd, rd1, rd2, rd3;
  logic [31:0] model [32];
  int checks = 0, failures = 0, bypass_seen = 0;

  regs dut (.clk, .rst, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr1_i(ra1), .rdata1_o(rd1),
            .raddr2_i(ra2), .rdata2_o(rd2), .dbg_raddr_i(ra3), .dbg_rdata_o(rd3));

  always #5 clk = ~clk;

  function automatic logic [31:0] expv(logic [4:0] a);
    if (a == 0) return 0;
    if (we && a == wa) return wd;
    return model[a];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      we = $urandom % 3 != 0; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom);
      if (n % 4 == 0) ra1 = wa;
      if (n % 6 == 0) ra2 = wa;
      #1;
      checks++;
      if (rd1 !== expv(ra1) || rd2 !== expv(ra2) || rd3 !== expv(ra3)) begin
        failures++; $display("FAIL n=%0d ra1=%0d rd1=%h exp=%h", n, ra1, rd1, expv(ra1));
      end
      if (we && wa != 0 && (ra1 == wa || ra2 == wa)) bypass_seen++;
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    checks++;
    if (bypass_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
