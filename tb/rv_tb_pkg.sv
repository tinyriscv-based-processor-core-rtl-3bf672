// rv_tb_pkg: verification helpers for the RV32I pipeline testbenches.
//
// * Instruction encoders (r_type ... j_type and named helpers such as
//   addi/add/beq/lw/sw) written straight from the RV32I base encoding, so
//   testbenches can build programs without an assembler.
// * ref_imm: an independent immediate decoder used to check the decode stage.
// * rv_iss: a small instruction-set simulator of the same RV32I subset
//   (integer ALU, LUI/AUIPC, JAL/JALR, branches, loads/stores of all widths).
//   It executes one instruction per step with architectural semantics only,
//   with no pipeline, so the pipelined core can be compared with it.
package rv_tb_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                         input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_type(input logic [11:0] imm, input logic [4:0] rs1,
                                         input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_type(input logic [11:0] imm, input logic [4:0] rs2, rs1,
                                         input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input logic [12:0] imm, input logic [4:0] rs2, rs1,
                                         input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(input logic [19:0] imm, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rd, op};
  endfunction
  function automatic logic [31:0] j_type(input logic [20:0] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input logic [4:0] rd, rs1, input logic [11:0] imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] lui(input logic [4:0] rd, input logic [19:0] imm);
    return u_type(imm, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] beq(input logic [4:0] rs1, rs2, input logic [12:0] off);
    return b_type(off, rs2, rs1, 3'b000);
  endfunction
  function automatic logic [31:0] bne(input logic [4:0] rs1, rs2, input logic [12:0] off);
    return b_type(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] jal(input logic [4:0] rd, input logic [20:0] off);
    return j_type(off, rd);
  endfunction
  function automatic logic [31:0] lw(input logic [4:0] rd, rs1, input logic [11:0] off);
    return i_type(off, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] sw(input logic [4:0] rs2, rs1, input logic [11:0] off);
    return s_type(off, rs2, rs1, 3'b010);
  endfunction

  // Load a 32-bit constant into rd with LUI + ADDI (two words).
  function automatic logic [63:0] li32(input logic [4:0] rd, input logic [31:0] v);
    logic [31:0] hi;
    hi = v + 32'h800;
    return {lui(rd, hi[31:12]), addi(rd, rd, v[11:0])};
  endfunction

  // ---------------- reference immediate decode ----------------
  function automatic logic [31:0] ref_imm(input logic [31:0] in);
    logic [31:0] r;
    case (in[6:0])
      7'b0110111, 7'b0010111: r = in & 32'hFFFF_F000;
      7'b1101111: r = 32'($signed({in[31], in[19:12], in[20], in[30:21], 1'b0}));
      7'b1100011: r = 32'($signed({in[31], in[7], in[30:25], in[11:8], 1'b0}));
      7'b0100011: r = 32'($signed({in[31:25], in[11:7]}));
      7'b1100111, 7'b0000011, 7'b0010011: r = 32'($signed(in[31:20]));
      default: r = 0;
    endcase
    return r;
  endfunction

  // ---------------- instruction-set simulator ----------------
  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] mem [logic [31:0]];   // word address -> word (data side)
    bit          taken;                // last step changed control flow

    function new(logic [31:0] reset_pc = 0);
      foreach (x[i]) x[i] = 0;
      pc = reset_pc;
    endfunction

    function logic [31:0] rdw(logic [31:0] a);
      return mem.exists(a >> 2) ? mem[a >> 2] : 32'h0;
    endfunction

    // Execute one instruction; imem supplies the instruction word.
    function void step(logic [31:0] in);
      logic [6:0]  op;
      logic [2:0]  f3;
      logic [31:0] a, b, imm, res, npc, ad, w;
      logic [4:0]  rd;
      logic        wr;
      op = in[6:0]; f3 = in[14:12]; rd = in[11:7];
      a = x[in[19:15]]; b = x[in[24:20]];
      imm = ref_imm(in);
      npc = pc + 4; wr = 0; res = 0; taken = 0;
      case (op)
        7'b0110111: begin res = imm; wr = 1; end
        7'b0010111: begin res = pc + imm; wr = 1; end
        7'b1101111: begin res = pc + 4; wr = 1; npc = pc + imm; taken = 1; end
        7'b1100111: begin res = pc + 4; wr = 1; npc = (a + imm) & ~32'h1; taken = 1; end
        7'b1100011: begin
          logic t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = ($signed(a) < $signed(b));
            3'b101: t = ($signed(a) >= $signed(b));
            3'b110: t = (a < b);
            3'b111: t = (a >= b);
            default: t = 0;
          endcase
          if (t) begin npc = pc + imm; taken = 1; end
        end
        7'b0000011: begin
          ad = a + imm; w = rdw(ad); wr = 1;
          case (f3)
            3'b000: res = 32'($signed(w[8*ad[1:0] +: 8]));
            3'b001: res = 32'($signed(w[16*ad[1] +: 16]));
            3'b100: res = {24'h0, w[8*ad[1:0] +: 8]};
            3'b101: res = {16'h0, w[16*ad[1] +: 16]};
            default: res = w;
          endcase
        end
        7'b0100011: begin
          ad = a + imm; w = rdw(ad);
          case (f3)
            3'b000: w[8*ad[1:0] +: 8] = b[7:0];
            3'b001: w[16*ad[1] +: 16] = b[15:0];
            default: w = b;
          endcase
          mem[ad >> 2] = w;
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] bb;
          bb = (op == 7'b0010011) ? imm : b;
          wr = 1;
          case (f3)
            3'b000: res = (op == 7'b0110011 && in[30]) ? a - bb : a + bb;
            3'b001: res = a << bb[4:0];
            3'b010: res = {31'h0, $signed(a) < $signed(bb)};
            3'b011: res = {31'h0, a < bb};
            3'b100: res = a ^ bb;
            3'b101: res = in[30] ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
            3'b110: res = a | bb;
            default: res = a & bb;
          endcase
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
    endfunction
  endclass

endpackage
