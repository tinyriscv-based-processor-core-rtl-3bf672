// pc_reg: the program counter of the fetch stage.
//
// pc_o addresses the instruction memory; the instruction read there is
// captured by if_id at the next rising edge.  Each cycle the PC advances by
// four, unless ctrl redirects it (jump_i: load jump_addr_i, taken over any
// hold) or pauses it (hold_i: keep the value).  Reset loads RESET_PC; the
// first instruction fetched after reset is at address 0.
//
// Reset is synchronous and active high; this and the priority of a jump
// over a hold are this design's choices.
module pc_reg #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        jump_i,
  input  logic [31:0] jump_addr_i,
  input  logic        hold_i,
  output logic [31:0] pc_o
);

  always_ff @(posedge clk) begin
    if (rst)         pc_o <= RESET_PC;
    else if (jump_i) pc_o <= jump_addr_i;
    else if (!hold_i) pc_o <= pc_o + 32'd4;
  end

endmodule
