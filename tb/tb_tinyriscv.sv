// tb_tinyriscv: end-to-end test of the three-stage pipeline with its
// memories, at the default sizes.
//
// Part 1 runs the three-instruction example (x27 = 38, x28 = 54,
// x29 = x28 + x27) and checks, cycle by cycle, the PC of the instruction in
// execute and the moment each result reaches the register file: the first
// result is written at the third rising edge after reset, then one per cycle.
//
// Part 2 runs random programs (ALU register/immediate ops, LUI/AUIPC, loads
// and stores of every width to the data RAM, taken and not-taken branches,
// JAL, JALR) with many back-to-back register dependencies.  Every
// instruction that reaches execute is checked in lock step against the
// instruction-set simulator of rv_tb_pkg (same PC, same order), the gap
// between two completing instructions must be 1 cycle, or 3 after a taken
// branch/jump (two flushed slots), and at the end all registers are
// compared.  Half of the programs also raise the external pause input at
// random.  Each mechanism (bypass, taken transfer/flush, not-taken branch,
// load, store, pause) is counted and must have happened.
module tb_tinyriscv;
  import rv_tb_pkg::*;

  logic        clk = 0, rst = 1, hold_req = 0;
  logic [4:0]  dbg_addr = 0;
  logic [31:0] dbg_data, ex_pc;
  logic        ex_valid;
  int checks = 0, failures = 0;

  tinyriscv dut (.clk, .rst, .hold_req_i(hold_req), .dbg_reg_addr_i(dbg_addr),
                 .dbg_reg_data_o(dbg_data), .ex_pc_o(ex_pc), .ex_valid_o(ex_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  int n_bypass = 0, n_taken = 0, n_nottaken = 0, n_load = 0, n_store = 0, n_pause = 0, n_retired = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load_prog();
    for (int i = 0; i < prog.size(); i++) dut.u_rom.mem[i] = prog[i];
    for (int i = prog.size(); i < prog.size() + 8; i++) dut.u_rom.mem[i] = 32'h0000_0013;
    for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = 32'h0;   // region the programs use
  endtask

  task automatic reg_read(input logic [4:0] a, output logic [31:0] v);
    dbg_addr = a; #1; v = dbg_data;
  endtask

  // ---------- random program generator ----------
  function automatic logic [4:0] rr();
    return 5'(1 + $urandom % 8);
  endfunction

  function automatic void gen_prog(int body);
    logic [2:0] bf3 [6] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
    logic [2:0] lf3 [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    logic [63:0] li;
    prog.delete();
    prog.push_back(lui(5'd31, 20'h10000));                 // x31 = RAM base
    prog.push_back(lui(5'd29, 20'h00001));
    prog.push_back(addi(5'd29, 5'd29, 12'h800));           // x29 = 0x800, jalr base
    for (int r = 1; r <= 8; r++) begin
      li = li32(5'(r), (r % 3 == 0) ? 32'($urandom % 8) : $urandom);
      prog.push_back(li[63:32]); prog.push_back(li[31:0]);
    end
    for (int k = 0; k < body; k++) begin
      int t;
      logic [31:0] w;
      logic [2:0]  f3;
      t = $urandom % 100;
      if (t < 30) begin
        f3 = 3'($urandom);
        w = r_type((f3 == 3'b000 || f3 == 3'b101) && (($urandom % 2) != 0) ? 7'h20 : 7'h00, rr(), rr(), f3, rr(), 7'b0110011);
      end else if (t < 50) begin
        f3 = 3'($urandom);
        w = i_type(12'($urandom), rr(), f3, rr(), 7'b0010011);
        if (f3 == 3'b001) w[31:25] = 0;
        if (f3 == 3'b101) w[31:25] = (($urandom % 2) != 0) ? 7'h20 : 7'h00;
      end else if (t < 55) begin
        w = u_type(20'($urandom), rr(), (($urandom % 2) != 0) ? 7'b0110111 : 7'b0010111);
      end else if (t < 65) begin
        f3 = lf3[$urandom % 5];
        w = i_type(12'(($urandom % 64) * 4 + (($urandom % 4) & ~((1 << f3[1:0]) - 1))), 5'd31, f3, rr(), 7'b0000011);
      end else if (t < 75) begin
        f3 = 3'($urandom % 3);
        w = s_type(12'(($urandom % 64) * 4 + (($urandom % 4) & ~((1 << f3[1:0]) - 1))), rr(), 5'd31, f3);
      end else if (t < 90) begin
        w = b_type(13'(4 * (2 + $urandom % 3)), rr(), rr(), bf3[$urandom % 6]);
      end else if (t < 95) begin
        w = jal((($urandom % 2) != 0) ? rr() : 5'd0, 21'(4 * (2 + $urandom % 2)));
      end else begin
        // jalr rd, off(x29) with x29 = 0x800: absolute target two words on
        w = i_type(12'(prog.size() * 4 + 8 - 32'h800), 5'd29, 3'b000, rr(), 7'b1100111);
      end
      prog.push_back(w);
    end
    repeat (4) prog.push_back(32'h0000_0013);
    prog.push_back(jal(5'd0, 21'd0));                        // park: jump to self
  endfunction

  // ---------- run a program in lock step with the ISS ----------
  task automatic run_prog(input bit pause, input int max_cycles);
    rv_tb_pkg::rv_iss iss;
    logic [31:0] end_pc, v, prev_in, prev_pc;
    int cyc, last_ret, parked;
    bit prev_taken;
    logic [4:0] prev_rd;
    bit prev_wr, pause_seen;
    iss = new();
    end_pc = 32'((prog.size() - 1) * 4);
    load_prog();
    rst = 1; hold_req = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    cyc = 0; last_ret = -1; prev_taken = 0; parked = 0; prev_wr = 0; prev_rd = 0; pause_seen = 0;
    while (parked < 3 && cyc < max_cycles) begin
      @(negedge clk);
      cyc++;
      if (ex_valid) begin
        logic [31:0] in;
        logic [4:0]  rs1, rs2;
        in = prog[ex_pc >> 2];
        check(ex_pc === iss.pc, $sformatf("lock step pc=%h iss=%h after %h at %h", ex_pc, iss.pc, prev_in, prev_pc));
        if (ex_pc !== iss.pc) break;
        if (!pause && last_ret >= 0)
          check(cyc - last_ret == (prev_taken ? 3 : 1),
                $sformatf("issue gap %0d after pc=%h (taken=%0d)", cyc - last_ret, ex_pc, prev_taken));
        // a bypass happens when this instruction reads the register written
        // by the one that completed in the cycle just before
        rs1 = in[19:15]; rs2 = in[24:20];
        if (last_ret == cyc - 1 && prev_wr && prev_rd != 0 &&
            ((rs1 == prev_rd && in[6:0] inside {7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011, 7'b1100011, 7'b1100111}) ||
             (rs2 == prev_rd && in[6:0] inside {7'b0110011, 7'b0100011, 7'b1100011})))
          n_bypass++;
        if (in[6:0] == 7'b0000011) n_load++;
        if (in[6:0] == 7'b0100011) n_store++;
        iss.step(in);
        if (in[6:0] == 7'b1100011 && !iss.taken) n_nottaken++;
        if (iss.taken) n_taken++;
        prev_taken = iss.taken;
        prev_wr = !(in[6:0] inside {7'b1100011, 7'b0100011});
        prev_rd = in[11:7];
        prev_in = in;
        prev_pc = ex_pc;
        last_ret = cyc;
        n_retired++;
        if (ex_pc == end_pc) parked++;
      end else if (hold_req) begin
        pause_seen = 1;
      end
      if (pause) hold_req = ($urandom % 8) == 0;
    end
    hold_req = 0;
    if (pause_seen) n_pause++;
    check(parked == 3, "program reached its end");
    for (int r = 1; r < 32; r++) begin
      reg_read(5'(r), v);
      check(v === iss.x[r], $sformatf("x%0d = %h, expected %h", r, v, iss.x[r]));
    end
  endtask

  initial begin
    logic [31:0] v;
    // ---------- part 1: the 38 + 54 example ----------
    prog.delete();
    prog.push_back(addi(5'd27, 5'd0, 12'd38));
    prog.push_back(addi(5'd28, 5'd0, 12'd54));
    prog.push_back(add(5'd29, 5'd28, 5'd27));
    prog.push_back(jal(5'd0, 21'd0));
    load_prog();
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    // rising edge 1: inst0 in if_id; edge 2: inst0 in execute
    @(posedge clk); #1;
    check(!ex_valid, "execute empty one cycle after reset");
    @(posedge clk); #1;
    check(ex_valid && ex_pc == 32'h0, "addi x27 in execute at edge 2");
    reg_read(5'd27, v); check(v == 38, "x27 bypassed in its execute cycle");
    @(posedge clk); #1;
    check(ex_valid && ex_pc == 32'h4, "addi x28 in execute at edge 3");
    reg_read(5'd29, v); check(v == 0, "x29 not yet written");
    @(posedge clk); #1;
    check(ex_valid && ex_pc == 32'h8, "add x29 in execute at edge 4");
    check(dut.u_ex.rs1_data_i == 32'h36 && dut.u_ex.rs2_data_i == 32'h26, "operands 0x36/0x26 reach execute");
    @(posedge clk); #1;
    reg_read(5'd27, v); check(v == 38, "x27 = 38");
    reg_read(5'd28, v); check(v == 54, "x28 = 54");
    reg_read(5'd29, v); check(v == 92, "x29 = 92 after the fifth rising edge");

    // ---------- part 2: random programs ----------
    for (int p = 0; p < 24; p++) begin
      gen_prog(200 + (p % 4) * 100);
      run_prog(p % 2 == 1, 20000);
    end

    $display("retired=%0d bypass=%0d taken=%0d not_taken=%0d loads=%0d stores=%0d paused_programs=%0d",
             n_retired, n_bypass, n_taken, n_nottaken, n_load, n_store, n_pause);
    check(n_bypass > 0, "bypass happened");
    check(n_taken > 0, "taken transfer (flush) happened");
    check(n_nottaken > 0, "not-taken branch happened");
    check(n_load > 0, "load happened");
    check(n_store > 0, "store happened");
    check(n_pause > 0, "external pause happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
