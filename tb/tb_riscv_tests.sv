// tb_riscv_tests: per-instruction unit tests in the style of the RISC-V
// community's riscv-tests, run on the complete processor at default sizes.
//
// For each instruction a self-checking program is generated: it computes
// the instruction on corner-case and random operands (including writes to
// x0 and back-to-back dependent instructions), compares every result with
// the expected value and branches to a fail handler on a mismatch.  The
// handler sets s10 = 1, s11 = 0; the end of the program sets s11 = 1 then
// s10 = 1.  The testbench waits for s10, then requires s11 = 1.  Expected
// values are taken from the instruction-set simulator in rv_tb_pkg.  The
// instruction list is the one of the processor's regression (add ... xori,
// including the trivial "simple" test) plus the loads and stores.
module tb_riscv_tests;
  import rv_tb_pkg::*;

  logic        clk = 0, rst = 1;
  logic [4:0]  dbg_addr = 0;
  logic [31:0] dbg_data, ex_pc;
  logic        ex_valid;
  int checks = 0, failures = 0;

  tinyriscv dut (.clk, .rst, .hold_req_i(1'b0), .dbg_reg_addr_i(dbg_addr),
                 .dbg_reg_data_o(dbg_data), .ex_pc_o(ex_pc), .ex_valid_o(ex_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  localparam logic [4:0] S10 = 5'd26, S11 = 5'd27;
  localparam logic [31:0] FAIL_PC = 32'd4;

  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  function automatic logic [31:0] pc_now(); return 32'(prog.size() * 4); endfunction
  function automatic void li(logic [4:0] rd, logic [31:0] v);
    logic [63:0] p; p = li32(rd, v); emit(p[63:32]); emit(p[31:0]);
  endfunction
  function automatic void bne_fail(logic [4:0] a, logic [4:0] b);
    emit(bne(a, b, 13'(FAIL_PC - pc_now())));
  endfunction

  // expected result of a register/immediate instruction (rs1 = x1, rs2 = x2, rd = x3)
  function automatic logic [31:0] expect_op(logic [31:0] inst, logic [31:0] a, logic [31:0] b);
    rv_tb_pkg::rv_iss s;
    s = new();
    s.x[1] = a; s.x[2] = b;
    s.step(inst);
    return s.x[inst[11:7]];
  endfunction

  function automatic logic [31:0] operand(int k);
    logic [31:0] c [8] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h0000_001f, 32'h0000_7fff, 32'hffff_8000};
    return (k < 8) ? c[k] : $urandom;
  endfunction

  function automatic void prologue();
    prog.delete();
    emit(jal(5'd0, 21'd20));                   // 0: jump to body at 20
    emit(addi(S10, 5'd0, 12'd1));              // 4: fail: s10 = 1
    emit(addi(S11, 5'd0, 12'd0));              // 8:       s11 = 0
    emit(jal(5'd0, 21'd0));                    // 12: park
    emit(32'h0000_0013);                       // 16
  endfunction

  function automatic void epilogue();
    emit(addi(S11, 5'd0, 12'd1));
    emit(addi(S10, 5'd0, 12'd1));
    emit(jal(5'd0, 21'd0));
  endfunction

  function automatic logic [31:0] enc(string name, logic [11:0] imm);
    case (name)
      "add":   return r_type(7'h00, 5'd2, 5'd1, 3'b000, 5'd3, 7'b0110011);
      "sub":   return r_type(7'h20, 5'd2, 5'd1, 3'b000, 5'd3, 7'b0110011);
      "sll":   return r_type(7'h00, 5'd2, 5'd1, 3'b001, 5'd3, 7'b0110011);
      "slt":   return r_type(7'h00, 5'd2, 5'd1, 3'b010, 5'd3, 7'b0110011);
      "sltu":  return r_type(7'h00, 5'd2, 5'd1, 3'b011, 5'd3, 7'b0110011);
      "xor":   return r_type(7'h00, 5'd2, 5'd1, 3'b100, 5'd3, 7'b0110011);
      "srl":   return r_type(7'h00, 5'd2, 5'd1, 3'b101, 5'd3, 7'b0110011);
      "sra":   return r_type(7'h20, 5'd2, 5'd1, 3'b101, 5'd3, 7'b0110011);
      "or":    return r_type(7'h00, 5'd2, 5'd1, 3'b110, 5'd3, 7'b0110011);
      "and":   return r_type(7'h00, 5'd2, 5'd1, 3'b111, 5'd3, 7'b0110011);
      "addi":  return i_type(imm, 5'd1, 3'b000, 5'd3, 7'b0010011);
      "slti":  return i_type(imm, 5'd1, 3'b010, 5'd3, 7'b0010011);
      "sltiu": return i_type(imm, 5'd1, 3'b011, 5'd3, 7'b0010011);
      "xori":  return i_type(imm, 5'd1, 3'b100, 5'd3, 7'b0010011);
      "ori":   return i_type(imm, 5'd1, 3'b110, 5'd3, 7'b0010011);
      "andi":  return i_type(imm, 5'd1, 3'b111, 5'd3, 7'b0010011);
      "slli":  return i_type({7'h00, imm[4:0]}, 5'd1, 3'b001, 5'd3, 7'b0010011);
      "srli":  return i_type({7'h00, imm[4:0]}, 5'd1, 3'b101, 5'd3, 7'b0010011);
      "srai":  return i_type({7'h20, imm[4:0]}, 5'd1, 3'b101, 5'd3, 7'b0010011);
      default: return 32'h0000_0013;
    endcase
  endfunction

  function automatic logic [2:0] br_f3(string name);
    case (name)
      "beq": return 3'b000; "bne": return 3'b001; "blt": return 3'b100;
      "bge": return 3'b101; "bltu": return 3'b110; default: return 3'b111;
    endcase
  endfunction

  function automatic void build(string name);
    prologue();
    for (int k = 0; k < 24; k++) begin
      logic [31:0] a, b, w, e, p;
      logic [11:0] imm;
      a = operand(k); b = operand((k * 5 + 3) % 24);
      imm = (k < 8) ? 12'(a) : 12'($urandom);
      if (name inside {"add", "sub", "sll", "slt", "sltu", "xor", "srl", "sra", "or", "and"}) begin
        li(5'd1, a); li(5'd2, b);
        w = enc(name, 0); e = expect_op(w, a, b);
        emit(w); li(5'd4, e); bne_fail(5'd3, 5'd4);
        if (k == 0) begin                      // result to x0 stays 0
          w[11:7] = 5'd0; emit(w); bne_fail(5'd0, 5'd0);
          emit(addi(5'd4, 5'd0, 12'd0)); bne_fail(5'd0, 5'd4);
        end
      end else if (name inside {"addi", "slti", "sltiu", "xori", "ori", "andi", "slli", "srli", "srai"}) begin
        li(5'd1, a);
        w = enc(name, imm); e = expect_op(w, a, 0);
        emit(w); li(5'd4, e); bne_fail(5'd3, 5'd4);
      end else if (name == "lui") begin
        w = lui(5'd3, 20'(a)); e = expect_op(w, 0, 0);
        emit(w); li(5'd4, e); bne_fail(5'd3, 5'd4);
      end else if (name == "auipc") begin
        w = u_type(20'(a), 5'd3, 7'b0010111);
        e = pc_now() + {a[19:0], 12'h0};
        emit(w); li(5'd4, e); bne_fail(5'd3, 5'd4);
      end else if (name inside {"beq", "bne", "blt", "bge", "bltu", "bgeu"}) begin
        rv_tb_pkg::rv_iss s;
        if (k % 3 == 0) b = a;
        li(5'd1, a); li(5'd2, b);
        w = b_type(13'd8, 5'd2, 5'd1, br_f3(name));
        s = new(); s.x[1] = a; s.x[2] = b; s.step(w);
        if (s.taken) begin emit(w); emit(jal(5'd0, 21'(FAIL_PC - pc_now()))); end
        else emit(b_type(13'(FAIL_PC - pc_now()), 5'd2, 5'd1, br_f3(name)));
      end else if (name == "jal") begin
        p = pc_now();
        emit(jal(5'd1, 21'd8)); emit(jal(5'd0, 21'(FAIL_PC - pc_now())));
        li(5'd4, p + 4); bne_fail(5'd1, 5'd4);
      end else if (name == "jalr") begin
        p = pc_now() + 8;                      // address of the jalr
        li(5'd5, p + 8);                       // odd k: target p+9, bit 0 cleared
        emit(i_type(12'(k % 2), 5'd5, 3'b000, 5'd1, 7'b1100111));
        emit(jal(5'd0, 21'(FAIL_PC - pc_now())));
        li(5'd4, p + 4); bne_fail(5'd1, 5'd4);
      end else if (name inside {"lb", "lbu", "lh", "lhu", "lw", "sb", "sh", "sw"}) begin
        rv_tb_pkg::rv_iss s;
        logic [2:0]  lf3, sf3;
        logic [11:0] off;
        logic [31:0] ls, ss;
        case (name)
          "lb": begin lf3 = 3'b000; sf3 = 3'b010; end
          "lbu": begin lf3 = 3'b100; sf3 = 3'b010; end
          "lh": begin lf3 = 3'b001; sf3 = 3'b010; end
          "lhu": begin lf3 = 3'b101; sf3 = 3'b010; end
          "lw": begin lf3 = 3'b010; sf3 = 3'b010; end
          "sb": begin lf3 = 3'b010; sf3 = 3'b000; end
          "sh": begin lf3 = 3'b010; sf3 = 3'b001; end
          default: begin lf3 = 3'b010; sf3 = 3'b010; end
        endcase
        off = 12'(4 * k);
        // background word, then the store under test, then the load under test
        li(5'd5, 32'h1000_0000);
        li(5'd2, ~a); emit(sw(5'd2, 5'd5, off));
        li(5'd2, b);
        ss = s_type(off + 12'(name[0] == "s" ? (sf3 == 3'b000 ? k % 4 : (sf3 == 3'b001 ? 2 * (k % 2) : 0)) : 0), 5'd2, 5'd5, sf3);
        ls = i_type(off + 12'(name[0] == "l" ? (lf3[1:0] == 2'b00 ? k % 4 : (lf3[1:0] == 2'b01 ? 2 * (k % 2) : 0)) : 0), 5'd5, lf3, 5'd3, 7'b0000011);
        if (name[0] == "s") ls = i_type(off, 5'd5, 3'b010, 5'd3, 7'b0000011);
        s = new(); s.x[5] = 32'h1000_0000;
        s.x[2] = ~a; s.step(sw(5'd2, 5'd5, off));
        s.x[2] = b;  s.step(ss);
        s.step(ls);
        emit(ss); emit(ls);
        li(5'd4, s.x[3]); bne_fail(5'd3, 5'd4);
      end
      // "simple": no case, the program only reaches its end
    end
    epilogue();
  endfunction

  task automatic run(string name);
    logic [31:0] s10, s11;
    int cyc;
    build(name);
    for (int i = 0; i < prog.size(); i++) dut.u_rom.mem[i] = prog[i];
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    cyc = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
      dbg_addr = S10; #1; s10 = dbg_data;
    end while (s10 != 1 && cyc < 5000);
    repeat (4) @(posedge clk);
    #1; dbg_addr = S11; #1; s11 = dbg_data;
    checks++;
    if (s10 == 1 && s11 == 1) $display("inst %-6s PASS  (%0d instructions, %0d cycles)", name, prog.size(), cyc);
    else begin failures++; $display("inst %-6s FAIL  s10=%0d s11=%0d", name, s10, s11); end
  endtask

  initial begin
    static string names [38] = '{"add", "addi", "and", "andi", "auipc", "beq", "bge", "bgeu", "blt", "bltu",
                          "bne", "jal", "jalr", "lui", "or", "ori", "simple", "sll", "slli", "slt",
                          "slti", "sltiu", "sltu", "sra", "srai", "srl", "srli", "sub", "xor", "xori",
                          "lb", "lbu", "lh", "lhu", "lw", "sb", "sh", "sw"};
    foreach (names[i]) run(names[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
