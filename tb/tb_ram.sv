// tb_ram: self-checking test of the ram memory.
// Random byte-enabled writes and reads over the whole address range,
// including addresses beyond the size (which wrap), are checked against a
// word array model; reads are combinational and writes appear after the
// next rising edge.
module tb_ram;
  import rv_pkg::*;
  localparam int unsigned W = 64;
  logic clk = 0;
  bus_req_t    req;
  logic [31:0] rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  ram #(.WORDS(W)) dut (.clk, .req_i(req), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    req = '0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = $urandom & 32'h0000_1ffc;
      req.req = ($urandom % 4) != 0;
      req.be = (($urandom % 2) != 0) ? 4'($urandom) : 4'h0;
      req.addr = a; req.wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[a[7:2]]) begin failures++; $display("FAIL read a=%h got=%h exp=%h", a, rdata, model[a[7:2]]); end
      @(posedge clk);
      if (req.req) for (int b = 0; b < 4; b++) if (req.be[b]) model[a[7:2]][8*b +: 8] = req.wdata[8*b +: 8];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
