// tb_pipe_core: test of the pipeline core alone in its interlock-only
// configuration (BYPASS = 0), with the instruction and data memories modelled
// in the testbench as arrays read combinationally.
//
// Without bypasses an instruction that needs the result of the instruction
// d slots ahead of it (bubbles included) waits in decode for max(0, 4 - d)
// cycles, until the producer has written the register file in write-back.
// The directed programs check those stall counts and the kills of jumps and
// taken branches; random programs with forward-only control flow are then
// compared instruction by instruction with the reference model of
// tb_rv_pkg (PC, register write, store address and data) and the data
// memory word by word. No bypass may ever be used, and stalls and both
// kinds of kill must occur.
`timescale 1ns/1ps
module tb_pipe_core;
  import tb_rv_pkg::*;

  localparam int IW = 1024;
  localparam int DW = 1024;
  localparam int DATA_WORDS = 256;  // words the programs address

  logic        clk = 1'b0;
  logic        rst;
  logic        iload_we;
  logic [9:0]  iload_addr;
  logic [31:0] iload_data;
  logic        dhost_we;
  logic [9:0]  dhost_addr;
  logic [31:0] dhost_wdata, dhost_rdata;
  logic        retire_valid, retire_we;
  logic [31:0] retire_pc, retire_ir, retire_wd;
  logic [4:0]  retire_wa;
  logic        store_en;
  logic [31:0] store_addr, store_data;
  logic        ev_stall, ev_byp_e, ev_byp_m, ev_byp_w, ev_kill_jump, ev_kill_branch;

  logic [31:0] imem_addr, imem_inst, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  logic [31:0] timem [IW];
  logic [31:0] tdmem [DW];

  pipe_core #(.BYPASS(1'b0)) dut (
    .clk, .rst, .imem_addr, .imem_inst, .dmem_addr, .dmem_wdata, .dmem_we, .dmem_rdata,
    .retire_valid, .retire_pc, .retire_ir, .retire_we, .retire_wa, .retire_wd,
    .ev_stall, .ev_byp_e, .ev_byp_m, .ev_byp_w, .ev_kill_jump, .ev_kill_branch);

  assign imem_inst   = timem[imem_addr[11:2]];
  assign dmem_rdata  = tdmem[dmem_addr[11:2]];
  assign dhost_rdata = tdmem[dhost_addr];
  assign store_en    = dmem_we;
  assign store_addr  = dmem_addr;
  assign store_data  = dmem_wdata;

  always @(posedge clk) begin
    if (iload_we) timem[iload_addr] <= iload_data;
    if (dhost_we) tdmem[dhost_addr] <= dhost_wdata;
    if (dmem_we)  tdmem[dmem_addr[11:2]] <= dmem_wdata;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_byp_e = 0, n_byp_m = 0, n_byp_w = 0, n_kjump = 0, n_kbr = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (!rst) begin
    n_stall <= n_stall + int'(ev_stall);
    n_byp_e <= n_byp_e + int'(ev_byp_e);
    n_byp_m <= n_byp_m + int'(ev_byp_m);
    n_byp_w <= n_byp_w + int'(ev_byp_w);
    n_kjump <= n_kjump + int'(ev_kill_jump);
    n_kbr   <= n_kbr   + int'(ev_kill_branch);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rv_model m;
  u32 dinit [DATA_WORDS];

  // Load a program and the data memory; leaves the core in reset.
  task automatic load(u32 prog[$]);
    rst = 1'b1;
    iload_we = 1'b1;
    dhost_we = 1'b0;
    for (int i = 0; i < IW; i++) begin
      iload_addr = 10'(i);
      iload_data = (i < prog.size()) ? prog[i] : HALT;
      @(posedge clk); #1;
    end
    iload_we = 1'b0;
    dhost_we = 1'b1;
    for (int i = 0; i < DATA_WORDS; i++) begin
      dinit[i] = $urandom();
      dhost_addr = 10'(i);
      dhost_wdata = dinit[i];
      @(posedge clk); #1;
    end
    dhost_we = 1'b0;
    m = new();
    foreach (prog[i]) m.imem[i] = prog[i];
    for (int i = 0; i < DATA_WORDS; i++) m.dmem[i] = dinit[i];
    @(posedge clk); #1;
  endtask

  // Run the loaded program to its HALT. Returns the cycle at which the
  // instruction at pc_mark retired and the cycle at which HALT retired.
  task automatic run(u32 pc_mark, output longint t_mark, output longint t_halt,
                     output int retired);
    step_t s;
    u32    st_q_addr[$], st_q_data[$];
    bit    done = 0;
    int    guard = 0;
    t_mark = -1;
    t_halt = -1;
    retired = 0;
    rst = 1'b0;
    while (!done && guard < 20000) begin
      @(posedge clk);
      guard++;
      if (store_en) begin
        st_q_addr.push_back(store_addr);
        st_q_data.push_back(store_data);
      end
      if (retire_valid) begin
        s = m.step();
        retired++;
        check(retire_pc == s.pc, $sformatf("pc %h, model %h", retire_pc, s.pc));
        check(retire_ir == s.ir, $sformatf("ir %h at pc %h, model %h", retire_ir, retire_pc, s.ir));
        check(retire_we == s.we, $sformatf("we at pc %h: %b, model %b", s.pc, retire_we, s.we));
        if (s.we)
          check(retire_wa == 5'(s.wa) && retire_wd == s.wd,
                $sformatf("write at pc %h: x%0d=%h, model x%0d=%h",
                          s.pc, retire_wa, retire_wd, s.wa, s.wd));
        if (s.st) begin
          check(st_q_addr.size() > 0, $sformatf("store at pc %h not seen", s.pc));
          if (st_q_addr.size() > 0) begin
            check(st_q_addr[0] == s.saddr && st_q_data[0] == s.sdata,
                  $sformatf("store at pc %h: [%h]=%h, model [%h]=%h", s.pc,
                            st_q_addr[0], st_q_data[0], s.saddr, s.sdata));
            void'(st_q_addr.pop_front());
            void'(st_q_data.pop_front());
          end
        end
        if (retire_pc == pc_mark && t_mark < 0) t_mark = cycle;
        if (s.ir == HALT) begin
          t_halt = cycle;
          done = 1;
        end
      end
    end
    if (!done) $display("no halt: last pc %h ir %h model pc %h", retire_pc, retire_ir, m.pc);
    check(done, "program did not reach HALT");
    check(st_q_addr.size() == 0, "store seen that no instruction made");
    // data memory against the model
    for (int i = 0; i < DATA_WORDS; i++) begin
      dhost_addr = 10'(i);
      #1;
      check(dhost_rdata == m.rdmem(u32'(i * 4)),
            $sformatf("dmem[%0d]=%h, model %h", i, dhost_rdata, m.rdmem(u32'(i * 4))));
    end
    rst = 1'b1;
    @(posedge clk); #1;
  endtask

  // x1..x7 <- small distinct values
  function automatic void prefix(ref u32 p[$]);
    for (int r = 1; r <= 7; r++) p.push_back(ADDI(r, 0, r * 3));
  endfunction

  localparam u32 BODY = 32'd28;  // first body instruction after the prefix

  // Run a directed program; check its cycles from BODY to HALT.
  task automatic timed(string name, u32 body[$], int expect_span);
    u32 p[$];
    longint tm, th;
    int n;
    prefix(p);
    foreach (body[i]) p.push_back(body[i]);
    load(p);
    run(BODY, tm, th, n);
    check(th - tm == longint'(expect_span),
          $sformatf("%s: %0d cycles from first to last retirement, expected %0d",
                    name, th - tm, expect_span));
  endtask

  // Random program with forward-only control flow.
  function automatic void gen(int n, ref u32 p[$]);
    int i = 0;
    prefix(p);
    while (i < n) begin
      int kind = $urandom_range(0, 99);
      int rd   = $urandom_range(1, 6);
      int rs1  = $urandom_range(0, 6);
      int rs2  = $urandom_range(0, 6);
      int here = p.size();
      int fwd  = $urandom_range(1, 4);
      if (i + fwd >= n) fwd = 1;
      if (kind < 14)      p.push_back(ADD(rd, rs1, rs2));
      else if (kind < 20) p.push_back(SUB(rd, rs1, rs2));
      else if (kind < 24) p.push_back(XOR_(rd, rs1, rs2));
      else if (kind < 27) p.push_back(SLT(rd, rs1, rs2));
      else if (kind < 30) p.push_back(SRA(rd, rs1, rs2));
      else if (kind < 40) p.push_back(ADDI(rd, rs1, $urandom_range(0, 4095)));
      else if (kind < 46) p.push_back(ANDI(rd, rs1, $urandom_range(0, 3)));
      else if (kind < 58) p.push_back(LW(rd, 0, 4 * $urandom_range(0, DATA_WORDS - 1)));
      else if (kind < 68) p.push_back(SW(rs2, 0, 4 * $urandom_range(0, DATA_WORDS - 1)));
      else if (kind < 82) p.push_back(BEQ(rs1, $urandom_range(0, 1) ? rs1 : rs2, 4 * fwd));
      else if (kind < 87) p.push_back(J(4 * fwd));
      else if (kind < 92) p.push_back(JAL(4 * fwd));
      else begin
        // JALR through x7, which only this pattern writes
        p.push_back(ADDI(7, 0, 4 * (here + 2 + fwd)));
        p.push_back(JALR(rd, 7, 0));
        i++;
      end
      i++;
    end
    p.push_back(HALT);
    // A branch or jump that lands on a JALR would skip the ADDI that sets its
    // base; move such targets one instruction further.
    for (int k = 0; k < p.size(); k++) begin
      int off, t;
      u32 ir = p[k];
      if (ir[6:0] == 7'b1100011) off = int'(tb_rv_pkg::rv_model::sx({20'b0, ir[11:7], ir[31:25]}, 12));
      else if (ir[6:0] == 7'b1101011 || ir[6:0] == 7'b1101111) off = int'(tb_rv_pkg::rv_model::sx({7'b0, ir[31:7]}, 25));
      else if (ir[6:0] == 7'b0010011 && ir[11:7] == 5'd7) begin
        // base of a JALR: an absolute target
        t = int'(ir[31:20]) / 4;
        if (t < p.size() && p[t][6:0] == 7'b1100111) p[k] = ADDI(7, 0, 4 * (t + 1));
        continue;
      end
      else continue;
      t = k + off / 4;
      if (t < p.size() && p[t][6:0] == 7'b1100111) begin
        if (ir[6:0] == 7'b1100011) p[k] = BEQ(int'(ir[19:15]), int'(ir[24:20]), off + 4);
        else p[k] = enc_jt(int'(ir[6:0]), off + 4);
      end
    end
  endfunction

  initial begin
    u32 b[$];
    u32 p[$];
    longint tm, th;
    int n;
    rst = 1'b1;
    iload_we = 0; iload_addr = '0; iload_data = '0;
    dhost_we = 0; dhost_addr = '0; dhost_wdata = '0;
    repeat (3) @(posedge clk);
    #1;

    // ---- Part 1: directed programs and their timing
    // x1 <- x0 + 10 ; x4 <- x1 + 17 ; x5 <- x4 + x1: three stall cycles each
    b = {ADDI(1, 0, 10), ADDI(4, 1, 17), ADD(5, 4, 1), HALT};
    timed("dependent chain", b, 3 + 3 + 3);
    // load then use: three stall cycles
    b = {LW(2, 0, 8), ADDI(3, 2, 1), HALT};
    timed("load-use", b, 2 + 3);
    // load, then an instruction the next one depends on
    b = {LW(2, 0, 12), ADDI(4, 0, 1), ADD(3, 2, 4), HALT};
    timed("load-gap-use", b, 3 + 3);
    // store then load of the same word
    b = {ADDI(5, 0, 77), SW(5, 0, 40), LW(6, 0, 40), ADDI(6, 6, 1), HALT};
    timed("store-load", b, 4 + 3 + 3);
    // J over one instruction: one killed fetch
    b = {J(8), ADDI(2, 0, 1), ADDI(3, 0, 2), HALT};
    timed("jump", b, 3);
    // JAL links x1
    b = {JAL(8), ADDI(2, 0, 1), ADDI(3, 1, 0), HALT};
    timed("jal", b, 3 + 2);
    // JALR whose base comes from the instruction before it
    b = {ADDI(7, 0, 28 + 12), JALR(6, 7, 0), ADDI(2, 0, 1), ADDI(3, 6, 0), HALT};
    timed("jalr", b, 3 + 1 + 3 + 2);
    // taken branch: two killed instructions
    b = {BEQ(0, 0, 12), ADDI(2, 0, 1), ADDI(3, 0, 1), ADDI(4, 0, 1), HALT};
    timed("beq taken", b, 4);
    // branch not taken, on a value from the instruction before
    b = {ADDI(1, 0, 1), BEQ(1, 0, 12), ADDI(2, 0, 1), HALT};
    timed("beq not taken", b, 3 + 3);
    // branch on a loaded value: stall, then taken branch
    b = {LW(2, 0, 0), BEQ(2, 2, 8), ADDI(3, 0, 1), HALT};
    timed("load-branch", b, 2 + 3 + 2);

    // ---- Part 2: random programs
    for (int k = 0; k < 12; k++) begin
      p.delete();
      gen(150, p);
      load(p);
      run(BODY, tm, th, n);
    end

    check(n_stall > 0, "no stall happened");
    check(n_byp_e + n_byp_m + n_byp_w == 0, "a bypass was used without bypassing");
    check(n_kjump > 0, "no jump kill happened");
    check(n_kbr > 0, "no branch kill happened");
    $display("events: stall=%0d bypassE=%0d bypassM=%0d bypassW=%0d jumpkill=%0d branchkill=%0d",
             n_stall, n_byp_e, n_byp_m, n_byp_w, n_kjump, n_kbr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
