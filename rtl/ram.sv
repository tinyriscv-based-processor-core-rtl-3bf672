// ram: data memory, WORDS x 32 bits, word addressed by addr[..:2].
//
// Kept separate from the instruction memory so that a load or store in
// execute never competes with instruction fetch.  Reads are combinational
// (the load result is available in the cycle the address is presented);
// writes take effect at the next rising edge, per byte lane as enabled by
// req_i.be.  Addresses wrap at WORDS.  Contents start as all zero.
// The size is this design's choice.
module ram
  import rv_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  bus_req_t    req_i,
  output logic [31:0] rdata_o
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx     = req_i.addr[AW+1:2];
  assign rdata_o = mem[idx];

  always_ff @(posedge clk) begin
    if (req_i.req) begin
      for (int b = 0; b < 4; b++)
        if (req_i.be[b]) mem[idx][8*b +: 8] <= req_i.wdata[8*b +: 8];
    end
  end

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

endmodule
