// fetch: the fetch ("finger fetch") unit, pc_reg and if_id taken as one.
//
// inst_addr_o is the PC, sent to the instruction memory; the word that comes
// back on rom_inst_i (combinational read) is registered by if_id at the next
// rising edge and presented on inst_o, with its address on pc_addr_o.  So an
// instruction reaches decode one cycle after its address leaves the PC.
// jump_en/jump_addr_i redirect the PC; flush_i and hold_i come from ctrl and
// bubble or pause the fetch/decode register (hold_i also pauses the PC);
// valid_o is low while inst_o is a bubble.
//
// The port names follow the fetch-unit block diagram; which of the two
// address outputs is the memory address and which the decoded instruction's
// address, and the flush/hold inputs, are this design's reading.
module fetch #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] rom_inst_i,
  input  logic [31:0] jump_addr_i,
  input  logic        jump_en,
  input  logic        hold_i,
  input  logic        flush_i,
  output logic [31:0] inst_addr_o,
  output logic [31:0] inst_o,
  output logic [31:0] pc_addr_o,
  output logic        valid_o
);

  pc_reg #(.RESET_PC(RESET_PC)) u_pc_reg (
    .clk        (clk),
    .rst        (rst),
    .jump_i     (jump_en),
    .jump_addr_i(jump_addr_i),
    .hold_i     (hold_i),
    .pc_o       (inst_addr_o)
  );

  if_id u_if_id (
    .clk        (clk),
    .rst        (rst),
    .inst_i     (rom_inst_i),
    .inst_addr_i(inst_addr_o),
    .flush_i    (flush_i),
    .hold_i     (hold_i),
    .inst_o     (inst_o),
    .inst_addr_o(pc_addr_o),
    .valid_o    (valid_o)
  );

endmodule
