// if_id: pipeline register between fetch and decode.
//
// At each rising edge it captures the instruction word read from instruction
// memory together with the address it was read from, so decode sees them for
// one full cycle.  flush_i (a control transfer is taken) loads a bubble (the
// NOP addi x0,x0,0) instead; hold_i keeps the current contents while the
// pipeline is paused.  Flush wins over hold.  Reset also loads the bubble.
// valid_o is low for a bubble.  Using a NOP as the bubble follows the reference pipeline; the flush/hold
// priority is this design's choice.
module if_id
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] inst_i,
  input  logic [31:0] inst_addr_i,
  input  logic        flush_i,
  input  logic        hold_i,
  output logic [31:0] inst_o,
  output logic [31:0] inst_addr_o,
  output logic        valid_o
);

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      inst_o      <= INST_NOP;
      inst_addr_o <= '0;
      valid_o     <= 1'b0;
    end else if (!hold_i) begin
      inst_o      <= inst_i;
      inst_addr_o <= inst_addr_i;
      valid_o     <= 1'b1;
    end
  end

endmodule
