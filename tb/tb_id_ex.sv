// tb_id_ex: self-checking test of the decode/execute pipeline register.
// Every field must appear one clock later; a flush or reset must give a
// NOP with write enable and valid cleared.
module tb_id_ex;
  import rv_pkg::*;
  logic clk = 0, rst, flush, wen_i, val_i, wen_o, val_o;
  logic [31:0] inst_i, addr_i, d1_i, d2_i, imm_i, inst_o, addr_o, d1_o, d2_o, imm_o;
  logic [4:0]  rd_i, rd_o;
  int checks = 0, failures = 0;

  id_ex dut (.clk, .rst, .flush_i(flush), .inst_i, .inst_addr_i(addr_i), .rs1_data_i(d1_i),
             .rs2_data_i(d2_i), .rd_addr_i(rd_i), .rd_wen_i(wen_i), .imm_i, .valid_i(val_i),
             .inst_o, .inst_addr_o(addr_o), .rs1_data_o(d1_o), .rs2_data_o(d2_o), .rd_addr_o(rd_o),
             .rd_wen_o(wen_o), .imm_o, .valid_o(val_o));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; flush = 0;
    {inst_i, addr_i, d1_i, d2_i, imm_i, rd_i, wen_i, val_i} = '0;
    @(posedge clk); #1;
    checks++; if (inst_o !== INST_NOP || wen_o || val_o) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] a, b, c, d, e; logic [4:0] r; logic w, v, f;
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; e = $urandom; r = 5'($urandom);
      w = 1'($urandom); v = 1'($urandom); f = ($urandom % 4) == 0;
      inst_i = a; addr_i = b; d1_i = c; d2_i = d; imm_i = e; rd_i = r; wen_i = w; val_i = v; flush = f;
      @(posedge clk); #1;
      checks++;
      if (f) begin
        if (inst_o !== INST_NOP || wen_o !== 0 || val_o !== 0) begin failures++; $display("FAIL flush n=%0d", n); end
      end else if (inst_o !== a || addr_o !== b || d1_o !== c || d2_o !== d || imm_o !== e ||
                   rd_o !== r || wen_o !== w || val_o !== v) begin
        failures++; $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
