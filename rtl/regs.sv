// regs: the 32 x 32-bit general-purpose register file.
//
// Two asynchronous read ports serve decode; one write port, driven by the
// execute stage, writes at the rising clock edge.  x0 always reads 0 and is
// never written.  A read of the register that is being written in the same
// cycle returns the write data directly (write-to-read bypass): this is how
// the pipeline resolves the only data hazard it has, an instruction in
// decode reading the destination of the instruction just ahead of it in
// execute, whose result has not reached the array yet.  A third read port
// (dbg_*) lets a debugger or testbench look at any register; it has the same
// bypass.
//
// The bypass follows the design; the debug port and the reset of all
// registers to 0 are this design's additions.
module regs (
  input  logic        clk,
  input  logic        rst,
  input  logic        we_i,
  input  logic [4:0]  waddr_i,
  input  logic [31:0] wdata_i,
  input  logic [4:0]  raddr1_i,
  output logic [31:0] rdata1_o,
  input  logic [4:0]  raddr2_i,
  output logic [31:0] rdata2_o,
  input  logic [4:0]  dbg_raddr_i,
  output logic [31:0] dbg_rdata_o
);

  logic [31:0] rf [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) rf[i] <= '0;
    end else if (we_i && waddr_i != 5'd0) begin
      rf[waddr_i] <= wdata_i;
    end
  end

  function automatic logic [31:0] rd_port(input logic [4:0] a);
    if (a == 5'd0)                   return '0;
    else if (we_i && a == waddr_i)   return wdata_i;
    else                             return rf[a];
  endfunction

  assign rdata1_o    = rd_port(raddr1_i);
  assign rdata2_o    = rd_port(raddr2_i);
  assign dbg_rdata_o = rd_port(dbg_raddr_i);

endmodule
