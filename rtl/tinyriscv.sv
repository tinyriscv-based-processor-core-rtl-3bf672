// tinyriscv: a three-stage pipelined RV32I processor with its memories.
//
// Stage 1, fetch: pc_reg addresses the instruction ROM over the internal bus
// (rib); the word read combinationally is captured by if_id.
// Stage 2, decode: id decodes the instruction, reads its source registers
// from regs (asynchronously, with write-to-read bypass) and forms the
// immediate; id_ex registers the result.
// Stage 3, execute: ex computes with the shared alu, resolves branches and
// jumps, performs loads and stores on the data RAM through rib, and its
// result is written to regs (and stores to memory) at the next rising edge.
// ctrl flushes the two younger instructions on every taken branch or jump
// and redirects the PC (two lost cycles), and can pause the pipeline on
// hold_req_i.
//
// Timing: with ex at PC p, decode holds p+4 and fetch p+8.  After reset the
// first instruction (at RESET_PC) writes its result at the third rising
// edge, and one instruction completes per cycle after that when no branch is
// taken.  Memory map (data side): 0x0xxx_xxxx ROM, 0x1xxx_xxxx RAM.
// The debug port reads any register; ex_pc_o/ex_valid_o show the
// instruction in execute.  Reset is synchronous and active high.
module tinyriscv
  import rv_pkg::*;
#(
  parameter int unsigned ROM_WORDS = 4096,
  parameter int unsigned RAM_WORDS = 4096,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        hold_req_i,
  input  logic [4:0]  dbg_reg_addr_i,
  output logic [31:0] dbg_reg_data_o,
  output logic [31:0] ex_pc_o,
  output logic        ex_valid_o
);

  pipe_ctrl_t  ctl;
  logic [31:0] jump_addr;
  logic        jump_flag, hold_flag;

  // fetch
  logic [31:0] pc, rom_inst, if_inst, if_inst_addr;
  logic        if_valid;

  // decode
  logic [31:0] id_inst, id_inst_addr, id_rs1_data, id_rs2_data, id_imm;
  logic [31:0] rf_rdata1, rf_rdata2;
  logic [4:0]  id_rs1_addr, id_rs2_addr, id_rd_addr;
  logic        id_rd_wen;

  // execute
  logic [31:0] ex_inst, ex_inst_addr, ex_rs1_data, ex_rs2_data, ex_imm;
  logic [4:0]  ex_rd_addr_i;
  logic        ex_rd_wen_i, ex_valid;
  logic [4:0]  wb_addr;
  logic [31:0] wb_data;
  logic        wb_wen;
  bus_req_t    ex_req;
  logic [31:0] ex_rdata;

  // bus
  logic [31:0] rom_iaddr, rom_idata;
  bus_req_t    s_req   [2];
  logic [31:0] s_rdata [2];

  fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk        (clk),
    .rst        (rst),
    .rom_inst_i (rom_inst),
    .jump_addr_i(jump_addr),
    .jump_en    (ctl.pc_load),
    .hold_i     (ctl.hold),
    .flush_i    (ctl.if_flush),
    .inst_addr_o(pc),
    .inst_o     (if_inst),
    .pc_addr_o  (if_inst_addr),
    .valid_o    (if_valid)
  );

  id u_id (
    .inst_i     (if_inst),
    .inst_addr_i(if_inst_addr),
    .rs1_data_i (rf_rdata1),
    .rs2_data_i (rf_rdata2),
    .inst_o     (id_inst),
    .inst_addr_o(id_inst_addr),
    .rs1_addr_o (id_rs1_addr),
    .rs2_addr_o (id_rs2_addr),
    .rs1_data_o (id_rs1_data),
    .rs2_data_o (id_rs2_data),
    .rd_addr_o  (id_rd_addr),
    .rd_wen_o   (id_rd_wen),
    .imm_o      (id_imm)
  );

  regs u_regs (
    .clk        (clk),
    .rst        (rst),
    .we_i       (wb_wen),
    .waddr_i    (wb_addr),
    .wdata_i    (wb_data),
    .raddr1_i   (id_rs1_addr),
    .rdata1_o   (rf_rdata1),
    .raddr2_i   (id_rs2_addr),
    .rdata2_o   (rf_rdata2),
    .dbg_raddr_i(dbg_reg_addr_i),
    .dbg_rdata_o(dbg_reg_data_o)
  );

  id_ex u_id_ex (
    .clk        (clk),
    .rst        (rst),
    .flush_i    (ctl.idex_flush),
    .inst_i     (id_inst),
    .inst_addr_i(id_inst_addr),
    .rs1_data_i (id_rs1_data),
    .rs2_data_i (id_rs2_data),
    .rd_addr_i  (id_rd_addr),
    .rd_wen_i   (id_rd_wen),
    .imm_i      (id_imm),
    .valid_i    (if_valid),
    .inst_o     (ex_inst),
    .inst_addr_o(ex_inst_addr),
    .rs1_data_o (ex_rs1_data),
    .rs2_data_o (ex_rs2_data),
    .rd_addr_o  (ex_rd_addr_i),
    .rd_wen_o   (ex_rd_wen_i),
    .imm_o      (ex_imm),
    .valid_o    (ex_valid)
  );

  ex u_ex (
    .inst_i     (ex_inst),
    .inst_addr_i(ex_inst_addr),
    .rs1_data_i (ex_rs1_data),
    .rs2_data_i (ex_rs2_data),
    .rd_addr_i  (ex_rd_addr_i),
    .rd_wen_i   (ex_rd_wen_i),
    .imm_i      (ex_imm),
    .valid_i    (ex_valid),
    .mem_req_o  (ex_req),
    .mem_rdata_i(ex_rdata),
    .rd_addr_o  (wb_addr),
    .rd_data_o  (wb_data),
    .rd_wen_o   (wb_wen),
    .jump_addr_o(jump_addr),
    .jump_flag_o(jump_flag),
    .hold_flag_o(hold_flag)
  );

  ctrl u_ctrl (
    .jump_flag_i(jump_flag),
    .hold_flag_i(hold_flag),
    .hold_req_i (hold_req_i),
    .ctl_o      (ctl)
  );

  rib #(.NSLV(2), .SLV_REGION({4'h1, 4'h0})) u_rib (
    .if_addr_i (pc),
    .if_data_o (rom_inst),
    .ex_req_i  (ex_req),
    .ex_rdata_o(ex_rdata),
    .s0_iaddr_o(rom_iaddr),
    .s0_idata_i(rom_idata),
    .s_req_o   (s_req),
    .s_rdata_i (s_rdata)
  );

  rom #(.WORDS(ROM_WORDS)) u_rom (
    .clk    (clk),
    .iaddr_i(rom_iaddr),
    .idata_o(rom_idata),
    .req_i  (s_req[0]),
    .rdata_o(s_rdata[0])
  );

  ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk    (clk),
    .req_i  (s_req[1]),
    .rdata_o(s_rdata[1])
  );

  assign ex_pc_o    = ex_inst_addr;
  assign ex_valid_o = ex_valid;

endmodule
