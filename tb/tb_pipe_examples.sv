// tb_pipe_examples: the classic example sequences of pipeline hazards,
// run on the processor at its default parameters (fully bypassed) and on an
// interlock-only instance (BYPASS = 0), with their timing checked against
// the pipeline diagrams. Times are write-back cycles relative to the first
// instruction of each sequence (I1, at address 96):
//
//   data hazard   x1 <- x0 + 10 ; x4 <- x1 + 17
//                 bypassed: I2 one cycle after I1; interlocked: four cycles
//                 after (decode held for three cycles). x4 must be 27.
//   jump          096 ADD ; 100 J 304 ; 104 ADD ; 304 ADD
//                 104 is killed and never written back; 304 two cycles
//                 after the jump.
//   branch        096 ADD ; 100 BEQ x1,x2 -> 304 (taken) ; 104 ; 108 ; 304 ADD
//                 104 and 108 are killed; 304 three cycles after the branch.
//   load/store    M[x1+7] <- x2 ; x4 <- M[x3+5] with x1+7 = x3+5: the load
//                 returns the stored word.
//   CPI           three instructions finishing in 3 cycles (dependent ALU
//                 chain, bypassed), 4 cycles (load then use: one bubble)
//                 and 5 cycles (taken branch: two bubbles).
// Each sequence is reached from address 0 by a few set-up instructions and
// a jump to address 96, and ends in "J 0" (jump to itself).
`timescale 1ns/1ps
module tb_pipe_examples;
  import tb_rv_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        iload_we;
  logic [9:0]  iload_addr;
  logic [31:0] iload_data;
  logic        dhost_we;
  logic [9:0]  dhost_addr;
  logic [31:0] dhost_wdata;
  logic [31:0] dhost_rdata [2];
  logic        retire_valid [2], retire_we [2];
  logic [31:0] retire_pc [2], retire_ir [2], retire_wd [2];
  logic [4:0]  retire_wa [2];
  logic        store_en [2];
  logic [31:0] store_addr [2], store_data [2];
  logic        ev [2][6];

  // instance 0: defaults (full bypass); instance 1: interlocks only
  pipe_top dut0 (
    .clk, .rst, .iload_we, .iload_addr, .iload_data,
    .dhost_we, .dhost_addr, .dhost_wdata, .dhost_rdata(dhost_rdata[0]),
    .retire_valid(retire_valid[0]), .retire_pc(retire_pc[0]), .retire_ir(retire_ir[0]),
    .retire_we(retire_we[0]), .retire_wa(retire_wa[0]), .retire_wd(retire_wd[0]),
    .store_en(store_en[0]), .store_addr(store_addr[0]), .store_data(store_data[0]),
    .ev_stall(ev[0][0]), .ev_byp_e(ev[0][1]), .ev_byp_m(ev[0][2]), .ev_byp_w(ev[0][3]),
    .ev_kill_jump(ev[0][4]), .ev_kill_branch(ev[0][5]));

  pipe_top #(.BYPASS(1'b0)) dut1 (
    .clk, .rst, .iload_we, .iload_addr, .iload_data,
    .dhost_we, .dhost_addr, .dhost_wdata, .dhost_rdata(dhost_rdata[1]),
    .retire_valid(retire_valid[1]), .retire_pc(retire_pc[1]), .retire_ir(retire_ir[1]),
    .retire_we(retire_we[1]), .retire_wa(retire_wa[1]), .retire_wd(retire_wd[1]),
    .store_en(store_en[1]), .store_addr(store_addr[1]), .store_data(store_data[1]),
    .ev_stall(ev[1][0]), .ev_byp_e(ev[1][1]), .ev_byp_m(ev[1][2]), .ev_byp_w(ev[1][3]),
    .ev_kill_jump(ev[1][4]), .ev_kill_branch(ev[1][5]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint t_wb [2][int];      // write-back cycle by PC
  logic [31:0] v_wb [2][int]; // value written by PC

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int d = 0; d < 2; d++)
      if (!rst && retire_valid[d] && !t_wb[d].exists(int'(retire_pc[d]))) begin
        t_wb[d][int'(retire_pc[d])] = cycle;
        v_wb[d][int'(retire_pc[d])] = retire_wd[d];
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Load a sparse program (word address -> instruction; HALT elsewhere) and
  // run both instances for a fixed time.
  task automatic run(u32 prog[int]);
    rst = 1'b1;
    iload_we = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      iload_addr = 10'(i);
      iload_data = prog.exists(i) ? prog[i] : HALT;
      @(posedge clk); #1;
    end
    iload_we = 1'b0;
    for (int d = 0; d < 2; d++) t_wb[d].delete();
    @(posedge clk); #1;
    rst = 1'b0;
    repeat (60) @(posedge clk);
    #1;
    rst = 1'b1;
  endtask

  function automatic longint dt(int d, int pc_a, int pc_b);
    if (!t_wb[d].exists(pc_a) || !t_wb[d].exists(pc_b)) return -999;
    return t_wb[d][pc_b] - t_wb[d][pc_a];
  endfunction

  u32 p[int];

  initial begin
    rst = 1'b1;
    iload_we = 0; iload_addr = '0; iload_data = '0;
    dhost_we = 0; dhost_addr = '0; dhost_wdata = '0;
    repeat (3) @(posedge clk);
    #1;

    // ---- data hazard
    p.delete();
    p[0] = J(96);
    p[24] = ADDI(1, 0, 10);
    p[25] = ADDI(4, 1, 17);
    run(p);
    check(dt(0, 96, 100) == 1, $sformatf("bypassed: x4 written %0d cycles after x1, expected 1", dt(0, 96, 100)));
    check(dt(1, 96, 100) == 4, $sformatf("interlocked: x4 written %0d cycles after x1, expected 4", dt(1, 96, 100)));
    for (int d = 0; d < 2; d++)
      check(v_wb[d].exists(100) && v_wb[d][100] == 27, $sformatf("instance %0d: x4 != 27", d));

    // ---- jump: 096 ADD ; 100 J 304 ; 104 ADD ; 304 ADD
    p.delete();
    p[0]  = J(96);
    p[24] = ADD(5, 0, 0);
    p[25] = J(304 - 100);
    p[26] = ADD(6, 0, 0);
    p[76] = ADD(7, 0, 0);
    run(p);
    for (int d = 0; d < 2; d++) begin
      check(dt(d, 96, 100) == 1, $sformatf("instance %0d: J not right after I1", d));
      check(dt(d, 100, 304) == 2, $sformatf("instance %0d: 304 written back %0d cycles after J, expected 2", d, dt(d, 100, 304)));
      check(!t_wb[d].exists(104), $sformatf("instance %0d: instruction at 104 was not killed", d));
    end

    // ---- branch: 096 ADD ; 100 BEQ x1,x2 ; 104 ADD ; 108 ; 304 ADD
    p.delete();
    p[0]  = ADDI(1, 0, 5);
    p[1]  = ADDI(2, 0, 5);
    p[2]  = J(96 - 8);
    p[24] = ADD(5, 0, 0);
    p[25] = BEQ(1, 2, 304 - 100);
    p[26] = ADD(6, 0, 0);
    p[27] = ADD(8, 0, 0);
    p[76] = ADD(7, 0, 0);
    run(p);
    check(dt(0, 100, 304) == 3, $sformatf("bypassed: 304 written back %0d cycles after BEQ, expected 3", dt(0, 100, 304)));
    for (int d = 0; d < 2; d++)
      check(!t_wb[d].exists(104) && !t_wb[d].exists(108),
            $sformatf("instance %0d: 104/108 not killed", d));

    // ---- load/store to the same address
    p.delete();
    p[0]  = ADDI(1, 0, 13);
    p[1]  = ADDI(3, 0, 15);
    p[2]  = ADDI(2, 0, 1365);
    p[3]  = J(96 - 12);
    p[24] = SW(2, 1, 7);
    p[25] = LW(4, 3, 5);
    run(p);
    for (int d = 0; d < 2; d++)
      check(v_wb[d].exists(100) && v_wb[d][100] == 1365,
            $sformatf("instance %0d: load after store returned the wrong word", d));

    // ---- CPI 3/3: dependent ALU chain, bypassed
    p.delete();
    p[0]  = J(96);
    p[24] = ADDI(1, 0, 1);
    p[25] = ADDI(2, 1, 1);
    p[26] = ADDI(3, 2, 1);
    run(p);
    check(dt(0, 96, 104) + 1 == 3, $sformatf("CPI example 1: %0d cycles, expected 3", dt(0, 96, 104) + 1));

    // ---- CPI 4/3: load then use
    p.delete();
    p[0]  = J(96);
    p[24] = LW(1, 0, 0);
    p[25] = ADDI(2, 1, 1);
    p[26] = ADDI(3, 2, 1);
    run(p);
    check(dt(0, 96, 104) + 1 == 4, $sformatf("CPI example 2: %0d cycles, expected 4", dt(0, 96, 104) + 1));

    // ---- CPI 5/3: taken branch
    p.delete();
    p[0]  = J(96);
    p[24] = BEQ(0, 0, 12);
    p[27] = ADDI(1, 0, 1);
    p[28] = ADDI(2, 1, 1);
    run(p);
    check(dt(0, 96, 112) + 1 == 5, $sformatf("CPI example 3: %0d cycles, expected 5", dt(0, 96, 112) + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
