// tb_ctrl: self-checking test of the pipeline controller.
// All combinations of jump, execute-stage hold and external pause are
// applied and the control bundle is compared
// with the expected rule: a control transfer redirects the PC and flushes
// both pipeline registers; otherwise an external pause holds the PC and
// fetch register and bubbles decode/execute; otherwise nothing happens.
module tb_ctrl;
  import rv_pkg::*;
  logic jf, hf, hr;
  pipe_ctrl_t c, e;
  int checks = 0, failures = 0;

  ctrl dut (.jump_flag_i(jf), .hold_flag_i(hf), .hold_req_i(hr), .ctl_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      {jf, hf, hr} = 3'(n);
      #1;
      e = '0;
      if (jf || hf) begin
        e.pc_load = jf; e.hold = !jf; e.if_flush = 1; e.idex_flush = 1;
      end else if (hr) begin
        e.hold = 1; e.idex_flush = 1;
      end
      checks++;
      if (c !== e) begin
        failures++; $display("FAIL jf=%b hf=%b hr=%b ctl=%b exp=%b", jf, hf, hr, c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
