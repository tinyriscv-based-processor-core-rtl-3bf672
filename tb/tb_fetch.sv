// tb_fetch: self-checking test of the fetch unit (pc_reg + if_id).
// A combinational instruction memory is modelled here as a fixed function
// of the address.  With random jumps, holds and flushes, the testbench keeps
// its own PC and fetch-register model and checks that the memory address,
// the registered instruction, its address and valid all match, and that an
// instruction appears at the output exactly one cycle after its address.
module tb_fetch;
  import rv_pkg::*;
  logic clk = 0, rst, jump, hold, flush, valid;
  logic [31:0] jaddr, iaddr, inst, pcaddr, rom;
  logic [31:0] e_pc, e_inst, e_addr;
  logic        e_valid;
  int checks = 0, failures = 0;

  function automatic logic [31:0] mem_f(logic [31:0] a);
    return {a[17:2], ~a[17:2]};
  endfunction

  assign rom = mem_f(iaddr);

  fetch dut (.clk, .rst, .rom_inst_i(rom), .jump_addr_i(jaddr), .jump_en(jump), .hold_i(hold),
             .flush_i(flush), .inst_addr_o(iaddr), .inst_o(inst), .pc_addr_o(pcaddr), .valid_o(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; jump = 0; hold = 0; flush = 0; jaddr = 0;
    @(posedge clk); #1;
    rst = 0;
    e_pc = 0; e_inst = INST_NOP; e_addr = 0; e_valid = 0;
    checks++; if (iaddr !== 0 || valid !== 0) begin failures++; $display("FAIL reset"); end
    // straight-line: one instruction per cycle, one cycle latency
    for (int n = 0; n < 8; n++) begin
      @(posedge clk); #1;
      checks++;
      if (pcaddr !== 4 * n || inst !== mem_f(4 * n) || valid !== 1 || iaddr !== 4 * (n + 1)) begin
        failures++; $display("FAIL seq n=%0d pcaddr=%h", n, pcaddr);
      end
    end
    e_pc = iaddr; e_inst = inst; e_addr = pcaddr; e_valid = 1;
    for (int n = 0; n < 600; n++) begin
      jump  = ($urandom % 6) == 0;
      flush = jump || (($urandom % 8) == 0);
      hold  = !jump && (($urandom % 4) == 0);
      jaddr = $urandom & 32'h0000_fffc;
      @(posedge clk); #1;
      if (flush) begin e_inst = INST_NOP; e_addr = 0; e_valid = 0; end
      else if (!hold) begin e_inst = mem_f(e_pc); e_addr = e_pc; e_valid = 1; end
      if (jump) e_pc = jaddr; else if (!hold) e_pc = e_pc + 4;
      checks++;
      if (iaddr !== e_pc || inst !== e_inst || pcaddr !== e_addr || valid !== e_valid) begin
        failures++; $display("FAIL n=%0d pc=%h/%h inst=%h/%h", n, iaddr, e_pc, inst, e_inst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
