// tb_rib: self-checking test of the internal bus.
// Two slave data ports are modelled as fixed functions of the address; the
// fetch port must always reach slave 0's instruction port, and a data
// access must go to exactly the slave whose region matches address bits
// [31:28] (its write enables kept, the other slave's cleared), return that
// slave's data, and return 0 for an unmapped address.
module tb_rib;
  import rv_pkg::*;
  logic [31:0] ifa, ifd, ia, exd;
  bus_req_t    mreq;
  bus_req_t    sreq [2];
  logic [31:0] srd  [2];
  int checks = 0, failures = 0;
  int hits [3] = '{0, 0, 0};

  rib #(.NSLV(2), .SLV_REGION({4'h1, 4'h0})) dut (
    .if_addr_i(ifa), .if_data_o(ifd), .ex_req_i(mreq), .ex_rdata_o(exd),
    .s0_iaddr_o(ia), .s0_idata_i(~ia), .s_req_o(sreq), .s_rdata_i(srd));

  assign srd[0] = sreq[0].addr ^ 32'h5555_0000;
  assign srd[1] = sreq[1].addr ^ 32'h0000_aaaa;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int s;
      logic [3:0] region;
      ifa = $urandom;
      s = $urandom % 3;
      region = (s == 2) ? 4'(2 + $urandom % 14) : 4'(s);
      mreq.req = ($urandom % 8) != 0; mreq.be = 4'($urandom); mreq.wdata = $urandom;
      mreq.addr = {region, 28'($urandom)};
      #1;
      checks++;
      if (ia !== ifa || ifd !== ~ifa) begin failures++; $display("FAIL fetch path"); end
      checks++;
      if (!mreq.req) begin
        if (sreq[0].req || sreq[1].req || sreq[0].be != 0 || sreq[1].be != 0 || exd !== 0) begin
          failures++; $display("FAIL idle access");
        end
      end else if (s == 2) begin
        hits[2]++;
        if (sreq[0].req || sreq[1].req || sreq[0].be != 0 || sreq[1].be != 0 || exd !== 0) begin
          failures++; $display("FAIL unmapped addr=%h", mreq.addr);
        end
      end else begin
        hits[s]++;
        if (!sreq[s].req || sreq[s].be !== mreq.be || sreq[s].addr !== mreq.addr ||
            sreq[s].wdata !== mreq.wdata || sreq[1-s].req || sreq[1-s].be != 0 ||
            exd !== (s == 0 ? mreq.addr ^ 32'h5555_0000 : mreq.addr ^ 32'h0000_aaaa)) begin
          failures++; $display("FAIL slave %0d addr=%h", s, mreq.addr);
        end
      end
    end
    checks++;
    if (hits[0] == 0 || hits[1] == 0 || hits[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
