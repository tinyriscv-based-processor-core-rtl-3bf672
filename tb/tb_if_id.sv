// tb_if_id: self-checking test of the fetch/decode pipeline register.
// Random capture, hold and flush (flush wins) checked against a model; a
// flush or reset must present the NOP bubble with valid low.
module tb_if_id;
  import rv_pkg::*;
  logic clk = 0, rst, flush, hold, valid;
  logic [31:0] inst, iaddr, inst_o, iaddr_o;
  logic [31:0] e_inst, e_addr;
  logic        e_valid;
  int checks = 0, failures = 0;

  if_id dut (.clk, .rst, .inst_i(inst), .inst_addr_i(iaddr), .flush_i(flush), .hold_i(hold),
             .inst_o, .inst_addr_o(iaddr_o), .valid_o(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; flush = 0; hold = 0; inst = 0; iaddr = 0;
    @(posedge clk); #1;
    checks++; if (inst_o !== INST_NOP || valid !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; e_inst = INST_NOP; e_addr = 0; e_valid = 0;
    for (int n = 0; n < 500; n++) begin
      inst = $urandom; iaddr = $urandom;
      flush = ($urandom % 5) == 0; hold = ($urandom % 4) == 0;
      @(posedge clk); #1;
      if (flush) begin e_inst = INST_NOP; e_addr = 0; e_valid = 0; end
      else if (!hold) begin e_inst = inst; e_addr = iaddr; e_valid = 1; end
      checks++;
      if (inst_o !== e_inst || iaddr_o !== e_addr || valid !== e_valid) begin
        failures++; $display("FAIL n=%0d inst=%h exp=%h", n, inst_o, e_inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
