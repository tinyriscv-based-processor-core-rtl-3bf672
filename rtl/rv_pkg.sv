// rv_pkg: constants and types shared by the three-stage RV32I pipeline.
//
// Holds the RV32I opcode and funct3 encodings (from the RISC-V base ISA),
// the ALU operation set, the pipeline-control bundle that ctrl drives into
// the fetch and decode/execute registers, and the request bundle that a bus
// master (fetch or execute) presents to the internal bus.  The bus bundle,
// the control bundle and the memory map are this design's own choices.
package rv_pkg;

  localparam logic [31:0] INST_NOP = 32'h0000_0013;  // addi x0, x0, 0

  // Major opcodes (inst[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // Branch funct3
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // Load / store funct3
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // ALU / arithmetic funct3 (OP and OP-IMM)
  localparam logic [2:0] F3_ADD  = 3'b000;
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_SLT  = 3'b010;
  localparam logic [2:0] F3_SLTU = 3'b011;
  localparam logic [2:0] F3_XOR  = 3'b100;
  localparam logic [2:0] F3_SR   = 3'b101;
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND
  } alu_op_e;

  // Pipeline control produced by ctrl each cycle.
  typedef struct packed {
    logic pc_load;     // load jump address into the PC
    logic hold;        // keep the PC and the fetch/decode register
    logic if_flush;    // put a bubble into the fetch/decode register
    logic idex_flush;  // put a bubble into the decode/execute register
  } pipe_ctrl_t;

  // One bus master's request.  Reads are combinational; a write with
  // be != 0 takes effect at the next rising clock edge.
  typedef struct packed {
    logic        req;
    logic [3:0]  be;     // byte enables of a write; 0 for a read
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

endpackage
