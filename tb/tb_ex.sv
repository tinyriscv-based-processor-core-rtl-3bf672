// tb_ex: self-checking test of the execute stage.
// Random RV32I instructions of every supported kind are executed with
// random operands, immediates and memory read data.  The expected outcome
// (destination value, branch/jump decision and target, store data after
// byte-lane merging) comes from the instruction-set simulator in rv_tb_pkg,
// which shares no code with the design.  Bubbles (valid low) must not
// write, jump or access memory.
module tb_ex;
  import rv_pkg::*;
  import rv_tb_pkg::*;
  logic [31:0] inst, pc, d1, d2, imm, rdata, wdata, jaddr;
  logic [4:0]  rd_i, rd_o;
  logic        wen_i, valid, wen_o, jflag, hflag;
  bus_req_t    req;
  int checks = 0, failures = 0;
  int n_taken = 0, n_load = 0, n_store = 0;

  ex dut (.inst_i(inst), .inst_addr_i(pc), .rs1_data_i(d1), .rs2_data_i(d2), .rd_addr_i(rd_i),
          .rd_wen_i(wen_i), .imm_i(imm), .valid_i(valid), .mem_req_o(req), .mem_rdata_i(rdata),
          .rd_addr_o(rd_o), .rd_data_o(wdata), .rd_wen_o(wen_o), .jump_addr_o(jaddr),
          .jump_flag_o(jflag), .hold_flag_o(hflag));

  logic [6:0] ops [9] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011,
                          7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011};
  logic [2:0] bf3 [6] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
  logic [2:0] lf3 [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};

  function automatic logic [31:0] rand_inst(int k);
    logic [31:0] w;
    w = $urandom;
    w[6:0] = ops[k % 9];
    case (w[6:0])
      7'b1100011: w[14:12] = bf3[$urandom % 6];
      7'b0000011: w[14:12] = lf3[$urandom % 5];
      7'b0100011: w[14:12] = 3'($urandom % 3);
      7'b1100111: w[14:12] = 0;
      7'b0110011: begin
        w[31:25] = 0;
        if (w[14:12] == 3'b000 || w[14:12] == 3'b101) w[30] = 1'($urandom);
      end
      7'b0010011: begin
        if (w[14:12] == 3'b001) w[31:25] = 0;
        if (w[14:12] == 3'b101) begin w[31:25] = 0; w[30] = 1'($urandom); end
      end
      default: ;
    endcase
    return w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv_tb_pkg::rv_iss iss;
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] ea, mask;
      int size;
      iss = new();
      inst = rand_inst(n);
      pc = $urandom & ~32'h3; d1 = $urandom; d2 = $urandom; rdata = $urandom;
      if (n % 5 == 0) d2 = d1;                    // equal operands for branches
      if (inst[24:20] == inst[19:15]) d2 = d1;
      imm = ref_imm(inst);
      // align loads and stores to their size
      size = 1 << inst[13:12];
      if (inst[6:0] == 7'b0000011 || inst[6:0] == 7'b0100011) begin
        ea = d1 + imm;
        d1 = d1 - (ea % size);
        if (inst[24:20] == inst[19:15]) d2 = d1;
      end
      rd_i  = inst[11:7];
      wen_i = !(inst[6:0] inside {7'b1100011, 7'b0100011});
      valid = (n % 17) != 0;
      #1;
      iss.pc = pc; iss.x[inst[19:15]] = d1; iss.x[inst[24:20]] = d2;
      ea = d1 + imm;
      iss.mem[ea >> 2] = rdata;
      iss.step(inst);
      if (!valid) begin
        checks++;
        if (wen_o || jflag || hflag || req.req || req.be != 0) begin failures++; $display("FAIL bubble acted"); end
        continue;
      end
      // write-back
      if (wen_i && rd_i != 0) begin
        checks++;
        if (!wen_o || rd_o !== rd_i || wdata !== iss.x[rd_i]) begin
          failures++; $display("FAIL wb inst=%h d1=%h d2=%h got=%h exp=%h", inst, d1, d2, wdata, iss.x[rd_i]);
        end
      end else begin
        checks++;
        if (wen_o !== wen_i) begin failures++; $display("FAIL wen inst=%h", inst); end
      end
      // control transfer
      checks++;
      if (jflag !== iss.taken || hflag !== iss.taken || (jflag && jaddr !== iss.pc)) begin
        failures++; $display("FAIL jump inst=%h d1=%h d2=%h j=%b exp=%0d addr=%h exp=%h", inst, d1, d2, jflag, iss.taken, jaddr, iss.pc);
      end
      if (iss.taken) n_taken++;
      // memory
      if (inst[6:0] == 7'b0000011 || inst[6:0] == 7'b0100011) begin
        checks++;
        if (!req.req || req.addr !== {ea[31:2], 2'b00}) begin failures++; $display("FAIL mem addr inst=%h", inst); end
        if (inst[6:0] == 7'b0100011) begin
          n_store++;
          mask = {{8{req.be[3]}}, {8{req.be[2]}}, {8{req.be[1]}}, {8{req.be[0]}}};
          checks++;
          if (((rdata & ~mask) | (req.wdata & mask)) !== iss.mem[ea >> 2]) begin
            failures++; $display("FAIL store inst=%h be=%b", inst, req.be);
          end
        end else begin
          n_load++;
          checks++;
          if (req.be != 0) begin failures++; $display("FAIL load writes"); end
        end
      end else begin
        checks++;
        if (req.req || req.be != 0) begin failures++; $display("FAIL spurious mem access inst=%h", inst); end
      end
    end
    checks++;
    if (n_taken == 0 || n_load == 0 || n_store == 0) begin failures++; $display("FAIL coverage"); end
    $display("taken=%0d loads=%0d stores=%0d", n_taken, n_load, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
