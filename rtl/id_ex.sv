// id_ex: pipeline register between decode and execute.
//
// At each rising edge it passes everything decode produced (instruction word
// and address, source operand values, destination register and write
// enable, immediate) on to the execute stage one cycle later.  flush_i, from
// ctrl, loads a bubble instead: a NOP with its write enable cleared and
// valid_o low.  Reset loads the bubble too.  valid_i/valid_o are not in the
// reference port list; they are added so that a bubble (from a flush here or
// in if_id) can be told apart from a real instruction in execute.
module id_ex
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush_i,
  input  logic [31:0] inst_i,
  input  logic [31:0] inst_addr_i,
  input  logic [31:0] rs1_data_i,
  input  logic [31:0] rs2_data_i,
  input  logic [4:0]  rd_addr_i,
  input  logic        rd_wen_i,
  input  logic [31:0] imm_i,
  input  logic        valid_i,
  output logic [31:0] inst_o,
  output logic [31:0] inst_addr_o,
  output logic [31:0] rs1_data_o,
  output logic [31:0] rs2_data_o,
  output logic [4:0]  rd_addr_o,
  output logic        rd_wen_o,
  output logic [31:0] imm_o,
  output logic        valid_o
);

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      inst_o      <= INST_NOP;
      inst_addr_o <= '0;
      rs1_data_o  <= '0;
      rs2_data_o  <= '0;
      rd_addr_o   <= '0;
      rd_wen_o    <= 1'b0;
      imm_o       <= '0;
      valid_o     <= 1'b0;
    end else begin
      inst_o      <= inst_i;
      inst_addr_o <= inst_addr_i;
      rs1_data_o  <= rs1_data_i;
      rs2_data_o  <= rs2_data_i;
      rd_addr_o   <= rd_addr_i;
      rd_wen_o    <= rd_wen_i;
      imm_o       <= imm_i;
      valid_o     <= valid_i;
    end
  end

endmodule
