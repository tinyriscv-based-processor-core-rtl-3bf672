// ctrl: pipeline control.
//
// Turns the execute stage's requests into the per-cycle control bundle
// (rv_pkg::pipe_ctrl_t) for pc_reg, if_id and id_ex.
//  * Control transfer (jump_flag_i / hold_flag_i from ex): the PC loads the
//    jump target (taken by pc_reg straight from ex) and both pipeline registers are flushed, so the two
//    instructions fetched behind the branch or jump never execute.  This is
//    the pipeline pause used for control hazards: two lost cycles per taken
//    transfer, no branch prediction and no delay slot.
//  * External pause (hold_req_i, e.g. from a debugger): the PC and if_id keep
//    their contents and a bubble enters id_ex, while the instruction already
//    in execute completes.  A control transfer in the same cycle wins, and
//    the pause takes effect from the next cycle.
// Combinational.  The flush-on-transfer follows the design; the external
// pause input and its priority are this design's additions.
module ctrl
  import rv_pkg::*;
(
  input  logic        jump_flag_i,
  input  logic        hold_flag_i,
  input  logic        hold_req_i,
  output pipe_ctrl_t  ctl_o
);

  logic transfer;
  assign transfer = jump_flag_i || hold_flag_i;

  always_comb begin
    ctl_o = '0;
    if (transfer) begin
      ctl_o.pc_load    = jump_flag_i;
      ctl_o.hold       = !jump_flag_i;
      ctl_o.if_flush   = 1'b1;
      ctl_o.idex_flush = 1'b1;
    end else if (hold_req_i) begin
      ctl_o.hold       = 1'b1;
      ctl_o.idex_flush = 1'b1;
    end
  end

endmodule
