// ex: the execute stage (combinational), which also does memory access and
// write-back.
//
// It decodes the instruction handed over by id_ex, chooses the two ALU
// operands, and takes from the shared alu the value to write to rd, the
// target of a branch or jump, or the address of a load or store:
//   OP / OP-IMM   rd = rs1 (op) rs2-or-imm
//   LUI / AUIPC   rd = imm / pc + imm
//   JAL / JALR    rd = pc + 4, target = pc + imm / (rs1 + imm) & ~1
//   Bxx           target = pc + imm when the comparison holds
//   Lx / Sx       address = rs1 + imm; the bus read is combinational, so a
//                 load's data is back in the same cycle; a store's byte
//                 enables and lane-aligned data go out on mem_req_o and are
//                 written by the memory at the next rising edge.
// rd_addr_o/rd_data_o/rd_wen_o go to the register file, which writes at the
// next rising edge, so there is no separate write-back stage.
// A taken branch or any jump raises jump_flag_o with jump_addr_o, and
// hold_flag_o, which asks ctrl to pause the pipeline: the two younger
// instructions already fetched are dropped (two bubble cycles).
//
// Loads and stores are assumed naturally aligned; the low address bits only
// select byte lanes.  Port names follow the execute-module block diagram;
// imm_i, valid_i and the memory request port are this design's additions.
module ex
  import rv_pkg::*;
(
  input  logic [31:0] inst_i,
  input  logic [31:0] inst_addr_i,
  input  logic [31:0] rs1_data_i,
  input  logic [31:0] rs2_data_i,
  input  logic [4:0]  rd_addr_i,
  input  logic        rd_wen_i,
  input  logic [31:0] imm_i,
  input  logic        valid_i,
  // data memory, through the bus
  output bus_req_t    mem_req_o,
  input  logic [31:0] mem_rdata_i,
  // write back
  output logic [4:0]  rd_addr_o,
  output logic [31:0] rd_data_o,
  output logic        rd_wen_o,
  // control transfer
  output logic [31:0] jump_addr_o,
  output logic        jump_flag_o,
  output logic        hold_flag_o
);

  logic [6:0]  opcode;
  logic [2:0]  funct3;
  logic        f7_alt;
  logic [31:0] a, b, base, alu_y, addr;
  logic        eq, lt, ltu;
  alu_op_e     op;
  logic        take;
  logic [1:0]  lane;
  logic [31:0] load_data;

  assign opcode = inst_i[6:0];
  assign funct3 = inst_i[14:12];
  assign f7_alt = inst_i[30];
  assign lane   = addr[1:0];

  function automatic alu_op_e arith_op(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      F3_ADD:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      F3_SLL:  return ALU_SLL;
      F3_SLT:  return ALU_SLT;
      F3_SLTU: return ALU_SLTU;
      F3_XOR:  return ALU_XOR;
      F3_SR:   return alt ? ALU_SRA : ALU_SRL;
      F3_OR:   return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  // Operand selection
  always_comb begin
    a    = rs1_data_i;
    b    = rs2_data_i;
    op   = ALU_ADD;
    base = inst_addr_i;
    unique case (opcode)
      OP_IMM:           begin b = imm_i; op = arith_op(funct3, f7_alt, 1'b0); end
      OP_REG:           op = arith_op(funct3, f7_alt, 1'b1);
      OP_LUI:           begin a = '0; b = imm_i; end
      OP_AUIPC:         begin a = inst_addr_i; b = imm_i; end
      OP_JAL:           begin a = inst_addr_i; b = 32'd4; end
      OP_JALR:          begin a = inst_addr_i; b = 32'd4; base = rs1_data_i; end
      OP_LOAD, OP_STORE: base = rs1_data_i;
      default: ;
    endcase
  end

  alu u_alu (
    .a_i     (a),
    .b_i     (b),
    .op_i    (op),
    .base_i  (base),
    .offset_i(imm_i),
    .result_o(alu_y),
    .addr_o  (addr),
    .eq_o    (eq),
    .lt_o    (lt),
    .ltu_o   (ltu)
  );

  // Branch decision
  always_comb begin
    take = 1'b0;
    unique case (opcode)
      OP_JAL, OP_JALR: take = 1'b1;
      OP_BRANCH: begin
        unique case (funct3)
          F3_BEQ:  take = eq;
          F3_BNE:  take = !eq;
          F3_BLT:  take = lt;
          F3_BGE:  take = !lt;
          F3_BLTU: take = ltu;
          F3_BGEU: take = !ltu;
          default: take = 1'b0;
        endcase
      end
      default: ;
    endcase
  end

  assign jump_flag_o = valid_i && take;
  assign hold_flag_o = valid_i && take;
  assign jump_addr_o = (opcode == OP_JALR) ? {addr[31:1], 1'b0} : addr;

  // Load data extraction
  always_comb begin
    logic [7:0]  byte_v;
    logic [15:0] half_v;
    byte_v = mem_rdata_i[8*lane +: 8];
    half_v = lane[1] ? mem_rdata_i[31:16] : mem_rdata_i[15:0];
    unique case (funct3)
      F3_B:    load_data = {{24{byte_v[7]}}, byte_v};
      F3_H:    load_data = {{16{half_v[15]}}, half_v};
      F3_BU:   load_data = {24'b0, byte_v};
      F3_HU:   load_data = {16'b0, half_v};
      default: load_data = mem_rdata_i;
    endcase
  end

  // Memory request
  always_comb begin
    mem_req_o       = '0;
    mem_req_o.addr  = {addr[31:2], 2'b00};
    if (valid_i && (opcode == OP_LOAD || opcode == OP_STORE)) mem_req_o.req = 1'b1;
    if (valid_i && opcode == OP_STORE) begin
      unique case (funct3)
        F3_B: begin
          mem_req_o.be    = 4'b0001 << lane;
          mem_req_o.wdata = {4{rs2_data_i[7:0]}};
        end
        F3_H: begin
          mem_req_o.be    = lane[1] ? 4'b1100 : 4'b0011;
          mem_req_o.wdata = {2{rs2_data_i[15:0]}};
        end
        default: begin
          mem_req_o.be    = 4'b1111;
          mem_req_o.wdata = rs2_data_i;
        end
      endcase
    end
  end

  // Write back
  assign rd_addr_o = rd_addr_i;
  assign rd_wen_o  = valid_i && rd_wen_i;
  assign rd_data_o = (opcode == OP_LOAD) ? load_data : alu_y;

endmodule
