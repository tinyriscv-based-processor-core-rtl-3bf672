// rib: the RISC-V internal bus.
//
// Two masters, kept apart so that instruction fetch and data access never
// compete for one memory (a Harvard arrangement):
//  * the fetch port (if_addr_i -> if_data_o) goes to the instruction port of
//    slave 0, the instruction ROM, every cycle;
//  * the data port of the execute stage (ex_req_i -> ex_rdata_o) is decoded
//    on address bits [31:28] against SLV_REGION[] and forwarded to exactly
//    one of NSLV slaves.  Slave 0 is the ROM's data port, slave 1 the data
//    RAM.  An address that selects no slave reads as 0 and its writes are
//    dropped.
// Reads are combinational in both directions, so a load's data comes back in
// the cycle it is issued; writes are performed by the slave at the next
// rising edge.  The memory map and the slave count are this design's choice.
module rib
  import rv_pkg::*;
#(
  parameter int unsigned NSLV = 2,
  parameter logic [NSLV-1:0][3:0] SLV_REGION = {4'h1, 4'h0}
) (
  // fetch master
  input  logic [31:0] if_addr_i,
  output logic [31:0] if_data_o,
  // data master
  input  bus_req_t    ex_req_i,
  output logic [31:0] ex_rdata_o,
  // instruction port of slave 0
  output logic [31:0] s0_iaddr_o,
  input  logic [31:0] s0_idata_i,
  // data ports of the slaves
  output bus_req_t    s_req_o   [NSLV],
  input  logic [31:0] s_rdata_i [NSLV]
);

  logic [NSLV-1:0] sel;

  assign s0_iaddr_o = if_addr_i;
  assign if_data_o  = s0_idata_i;

  always_comb begin
    for (int unsigned i = 0; i < NSLV; i++) begin
      sel[i]         = ex_req_i.req && (ex_req_i.addr[31:28] == SLV_REGION[i]);
      s_req_o[i]     = ex_req_i;
      s_req_o[i].req = sel[i];
      if (!sel[i]) s_req_o[i].be = '0;
    end
  end

  always_comb begin
    ex_rdata_o = '0;
    for (int unsigned i = 0; i < NSLV; i++)
      if (sel[i]) ex_rdata_o = s_rdata_i[i];
  end

  // The slave regions must not overlap: one access, one slave.
  always_comb begin
    assert ($onehot0(sel)) else $error("rib: address %h selects several slaves", ex_req_i.addr);
  end

endmodule
