// tb_id: self-checking test of the decode stage.
// Random instructions of every supported format (and some unsupported
// opcodes) are decoded; the register addresses, write enable and immediate
// are compared with a table of the RV32I formats and an independent
// immediate decoder; operand data and instruction/address must pass through.
module tb_id;
  import rv_tb_pkg::*;
  logic [31:0] inst, iaddr, d1, d2, inst_o, iaddr_o, d1_o, d2_o, imm;
  logic [4:0]  ra1, ra2, rd;
  logic        wen;
  int checks = 0, failures = 0;

  id dut (.inst_i(inst), .inst_addr_i(iaddr), .rs1_data_i(d1), .rs2_data_i(d2), .inst_o,
          .inst_addr_o(iaddr_o), .rs1_addr_o(ra1), .rs2_addr_o(ra2), .rs1_data_o(d1_o),
          .rs2_data_o(d2_o), .rd_addr_o(rd), .rd_wen_o(wen), .imm_o(imm));

  // opcode -> {uses rs1, uses rs2, writes rd}
  function automatic logic [2:0] fmt(logic [6:0] op);
    case (op)
      7'b0110111, 7'b0010111, 7'b1101111: return 3'b001;
      7'b1100111, 7'b0000011, 7'b0010011: return 3'b101;
      7'b1100011, 7'b0100011:             return 3'b110;
      7'b0110011:                         return 3'b111;
      default:                            return 3'b000;
    endcase
  endfunction

  logic [6:0] ops [11] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011,
                           7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011, 7'b0001111, 7'b1110011};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [2:0] f;
      inst = $urandom; inst[6:0] = ops[n % 11];
      iaddr = $urandom; d1 = $urandom; d2 = $urandom;
      #1;
      f = fmt(inst[6:0]);
      checks++;
      if (ra1 !== (f[2] ? inst[19:15] : 5'd0) || ra2 !== (f[1] ? inst[24:20] : 5'd0) ||
          wen !== f[0] || rd !== inst[11:7]) begin
        failures++; $display("FAIL regs inst=%h", inst);
      end
      checks++;
      if (f != 0 && imm !== ref_imm(inst)) begin
        failures++; $display("FAIL imm inst=%h imm=%h exp=%h", inst, imm, ref_imm(inst));
      end
      checks++;
      if (inst_o !== inst || iaddr_o !== iaddr || d1_o !== d1 || d2_o !== d2) begin
        failures++; $display("FAIL pass-through");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
