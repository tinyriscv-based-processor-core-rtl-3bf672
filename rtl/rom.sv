// rom: instruction memory, WORDS x 32 bits, word addressed by addr[..:2].
//
// The instruction port (iaddr_i -> idata_o) is read combinationally, so the
// word at the PC is ready before the rising edge at which if_id captures it.
// A second, data-side port lets loads read constants from the program image
// and lets stores (byte enables in req_i.be) write it at the next rising
// edge, which is how a program can be placed in it over the bus.  Addresses
// wrap at WORDS.  Contents start as all zero; the program is loaded by
// writing mem[] or through the data port.
//
// The size and the writable data port are this design's choices; the
// combinational read follows the design.
module rom
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] iaddr_i,
  output logic [31:0] idata_o,
  input  bus_req_t    req_i,
  output logic [31:0] rdata_o
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] iidx, didx;

  assign iidx    = iaddr_i[AW+1:2];
  assign didx    = req_i.addr[AW+1:2];
  assign idata_o = mem[iidx];
  assign rdata_o = mem[didx];

  always_ff @(posedge clk) begin
    if (req_i.req) begin
      for (int b = 0; b < 4; b++)
        if (req_i.be[b]) mem[didx][8*b +: 8] <= req_i.wdata[8*b +: 8];
    end
  end

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

endmodule
