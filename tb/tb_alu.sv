// tb_alu: self-checking test of the shared ALU.
// Drives random and corner-case operands through every operation and
// compares result, address adder and compare flags with values computed
// here from the RV32I definitions.
module tb_alu;
  import rv_pkg::*;

  logic [31:0] a, b, base, off, y, addr;
  logic        eq, lt, ltu;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu dut (.a_i(a), .b_i(b), .op_i(op), .base_i(base), .offset_i(off),
           .result_o(y), .addr_o(addr), .eq_o(eq), .lt_o(lt), .ltu_o(ltu));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] p, logic [31:0] q);
    case (o)
      ALU_ADD:  return p + q;
      ALU_SUB:  return p - q;
      ALU_SLL:  return p << q[4:0];
      ALU_SLT:  return ($signed(p) < $signed(q)) ? 1 : 0;
      ALU_SLTU: return (p < q) ? 1 : 0;
      ALU_XOR:  return p ^ q;
      ALU_SRL:  return p >> q[4:0];
      ALU_SRA:  return 32'($signed(p) >>> q[4:0]);
      ALU_OR:   return p | q;
      default:  return p & q;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_001f};

  initial begin
    for (int n = 0; n < 3000; n++) begin
      if (n < 36) begin a = corners[n % 6]; b = corners[n / 6]; end
      else begin a = $urandom; b = (n % 3 == 0) ? $urandom % 32 : $urandom; end
      if (n % 7 == 0) b = a;
      base = $urandom; off = $urandom;
      op = alu_op_e'(n % 10);
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, model(op, a, b));
      end
      checks++;
      if (addr !== base + off || eq !== (a == b) || lt !== ($signed(a) < $signed(b)) || ltu !== (a < b)) begin
        failures++;
        $display("FAIL flags/addr a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
