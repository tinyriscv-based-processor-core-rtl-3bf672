// tb_rom: self-checking test of the rom memory.
// Random byte-enabled writes and reads over the whole address range,
// including addresses beyond the size (which wrap), are checked against a
// word array model; reads are combinational and writes appear after the
// next rising edge.
// The instruction port is checked against the same model.
module tb_rom;
  import rv_pkg::*;
  localparam int unsigned W = 64;
  logic clk = 0;
  bus_req_t    req;
  logic [31:0] rdata, iaddr, idata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  rom #(.WORDS(W)) dut (.clk, .iaddr_i(iaddr), .idata_o(idata), .req_i(req), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    req = '0; iaddr = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = $urandom & 32'h0000_1ffc;
      req.req = ($urandom % 4) != 0;
      req.be = (($urandom % 2) != 0) ? 4'($urandom) : 4'h0;
      req.addr = a; req.wdata = $urandom;
      iaddr = ($urandom & 32'h0000_1ffc) | 32'($urandom % 4);
      #1;
      checks++;
      if (rdata !== model[a[7:2]]) begin failures++; $display("FAIL read a=%h got=%h exp=%h", a, rdata, model[a[7:2]]); end
      checks++;
      if (idata !== model[iaddr[7:2]]) begin failures++; $display("FAIL ifetch a=%h", iaddr); end
      @(posedge clk);
      if (req.req) for (int b = 0; b < 4; b++) if (req.be[b]) model[a[7:2]][8*b +: 8] = req.wdata[8*b +: 8];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
