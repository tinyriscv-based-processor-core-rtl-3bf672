// alu: the shared arithmetic/logic unit used by the execute stage.
//
// Every result the execute stage can need (sum, difference, and, or, xor,
// left shift, logical and arithmetic right shift, signed/unsigned less-than)
// is computed once here with continuous assignments, and op_i only picks one
// of them.  A separate address adder forms base_i + offset_i for branch and
// jump targets and load/store addresses, and the three comparisons used by
// the branch instructions come out as flags.  Collecting these operators in
// one unit so the execute stage reuses them follows the resource-sharing
// idea of the design; the exact split into a result port, an address port
// and compare flags is this implementation's choice.
//
// Purely combinational; no clock.
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  alu_op_e     op_i,
  input  logic [31:0] base_i,
  input  logic [31:0] offset_i,
  output logic [31:0] result_o,
  output logic [31:0] addr_o,
  output logic        eq_o,
  output logic        lt_o,
  output logic        ltu_o
);

  logic [31:0] sum, diff, and_r, or_r, xor_r, sll_r, srl_r, sra_r;
  logic        lt_s, lt_u;

  assign sum   = a_i + b_i;
  assign diff  = a_i - b_i;
  assign and_r = a_i & b_i;
  assign or_r  = a_i | b_i;
  assign xor_r = a_i ^ b_i;
  assign sll_r = a_i << b_i[4:0];
  assign srl_r = a_i >> b_i[4:0];
  assign sra_r = 32'($signed(a_i) >>> b_i[4:0]);
  assign lt_s  = $signed(a_i) < $signed(b_i);
  assign lt_u  = a_i < b_i;

  assign addr_o = base_i + offset_i;
  assign eq_o   = (a_i == b_i);
  assign lt_o   = lt_s;
  assign ltu_o  = lt_u;

  always_comb begin
    unique case (op_i)
      ALU_ADD:  result_o = sum;
      ALU_SUB:  result_o = diff;
      ALU_SLL:  result_o = sll_r;
      ALU_SLT:  result_o = {31'b0, lt_s};
      ALU_SLTU: result_o = {31'b0, lt_u};
      ALU_XOR:  result_o = xor_r;
      ALU_SRL:  result_o = srl_r;
      ALU_SRA:  result_o = sra_r;
      ALU_OR:   result_o = or_r;
      ALU_AND:  result_o = and_r;
      default:  result_o = sum;
    endcase
  end

endmodule
