// id: the decode stage (combinational).
//
// From the instruction held in if_id it works out which source registers the
// instruction reads (rs1_addr_o/rs2_addr_o go straight to the register file,
// whose read is asynchronous, and the data comes back on rs1_data_i/
// rs2_data_i), which destination register it writes (rd_addr_o, rd_wen_o),
// and the sign-extended immediate of its format (I, S, B, U or J).  All of
// this, with the instruction word and its address, is handed on to id_ex.
// A source register an instruction does not use is addressed as x0, so no
// stale value is read for it.  Opcodes outside the supported RV32I subset
// (e.g. FENCE, SYSTEM) decode as no-ops: no register is written.
//
// The port names follow the decode-module block diagram; the extra imm_o
// output and the x0 convention for unused sources are this design's own.
module id
  import rv_pkg::*;
(
  input  logic [31:0] inst_i,
  input  logic [31:0] inst_addr_i,
  input  logic [31:0] rs1_data_i,
  input  logic [31:0] rs2_data_i,
  output logic [31:0] inst_o,
  output logic [31:0] inst_addr_o,
  output logic [4:0]  rs1_addr_o,
  output logic [4:0]  rs2_addr_o,
  output logic [31:0] rs1_data_o,
  output logic [31:0] rs2_data_o,
  output logic [4:0]  rd_addr_o,
  output logic        rd_wen_o,
  output logic [31:0] imm_o
);

  logic [6:0]  opcode;
  logic        use_rs1, use_rs2;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opcode = inst_i[6:0];

  // Immediates: the sign bit is always inst[31].
  assign imm_i = {{20{inst_i[31]}}, inst_i[31:20]};
  assign imm_s = {{20{inst_i[31]}}, inst_i[31:25], inst_i[11:7]};
  assign imm_b = {{19{inst_i[31]}}, inst_i[31], inst_i[7], inst_i[30:25], inst_i[11:8], 1'b0};
  assign imm_u = {inst_i[31:12], 12'b0};
  assign imm_j = {{11{inst_i[31]}}, inst_i[31], inst_i[19:12], inst_i[20], inst_i[30:21], 1'b0};

  always_comb begin
    use_rs1  = 1'b0;
    use_rs2  = 1'b0;
    rd_wen_o = 1'b0;
    imm_o    = '0;
    unique case (opcode)
      OP_LUI, OP_AUIPC: begin rd_wen_o = 1'b1; imm_o = imm_u; end
      OP_JAL:           begin rd_wen_o = 1'b1; imm_o = imm_j; end
      OP_JALR:          begin rd_wen_o = 1'b1; use_rs1 = 1'b1; imm_o = imm_i; end
      OP_BRANCH:        begin use_rs1 = 1'b1; use_rs2 = 1'b1; imm_o = imm_b; end
      OP_LOAD:          begin rd_wen_o = 1'b1; use_rs1 = 1'b1; imm_o = imm_i; end
      OP_STORE:         begin use_rs1 = 1'b1; use_rs2 = 1'b1; imm_o = imm_s; end
      OP_IMM:           begin rd_wen_o = 1'b1; use_rs1 = 1'b1; imm_o = imm_i; end
      OP_REG:           begin rd_wen_o = 1'b1; use_rs1 = 1'b1; use_rs2 = 1'b1; end
      default: ;
    endcase
  end

  assign rs1_addr_o  = use_rs1 ? inst_i[19:15] : 5'd0;
  assign rs2_addr_o  = use_rs2 ? inst_i[24:20] : 5'd0;
  assign rd_addr_o   = inst_i[11:7];
  assign rs1_data_o  = rs1_data_i;
  assign rs2_data_o  = rs2_data_i;
  assign inst_o      = inst_i;
  assign inst_addr_o = inst_addr_i;

endmodule
