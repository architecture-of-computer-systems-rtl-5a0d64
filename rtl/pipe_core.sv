// pipe_core: the 5-stage pipelined datapath and its pipeline control.
//
// Stages: fetch (PC, instruction memory), decode & register fetch (IR_D,
// register file, Imm Select, bypass muxes, jump target adders), execute
// (A, B, MD1 registers, ALU, BEQ condition), memory (Y, MD2 registers, data
// memory), write-back (R register, register file write). Every stage holds
// its own copy of the instruction (IR_D, IR_E, IR_M, IR_W); this design
// decodes it once in decode and carries the decoded control (ctrl_t) along
// with it, which is equivalent to decoding each stage's IR.
//
// Hazards (see hazard_unit): with BYPASS = 1 the operands are taken in decode
// from the youngest of the execute ALU output, the memory-stage result (Y,
// or the loaded word for LW) and the write-back register R, and the pipeline
// stalls only when decode needs the value of a load that is in execute; with
// BYPASS = 0 it stalls until the producer has written the register file.
// A stall holds PC and IR_D and sends a bubble into execute. J and JAL
// (PCSel = jabs, target PC_D + offset) and JALR (PCSel = rind, target
// rs1 + imm) are resolved in decode and kill the one instruction fetched
// behind them. BEQ (PCSel = br, target PC_D + imm computed in decode and
// carried to execute) is resolved by the ALU's equality output in execute;
// when taken it kills the two instructions behind it. The fetch always
// guesses PC + 4. JAL and JALR compute their link value PC_D + 4 in the ALU.
//
// Interface: combinational instruction and data memory ports (the memories
// answer in the same cycle), a write-back trace (retire_*) for checking, and
// per-cycle event flags. Reset (rst, synchronous, active high) sets PC to
// RESET_PC and fills IR_D..IR_W with bubbles. Stage structure, stall, bypass
// and kill equations follow the design; the reset, the trace and event ports
// and the carried control are this design's choices.
module pipe_core
  import pipe_pkg::*;
#(
  parameter bit    BYPASS   = 1'b1,
  parameter word_t RESET_PC = '0
) (
  input  logic     clk,
  input  logic     rst,
  // instruction memory
  output word_t    imem_addr,
  input  word_t    imem_inst,
  // data memory
  output word_t    dmem_addr,
  output word_t    dmem_wdata,
  output logic     dmem_we,
  input  word_t    dmem_rdata,
  // write-back trace: one entry per instruction leaving the pipeline
  output logic     retire_valid,
  output word_t    retire_pc,
  output word_t    retire_ir,
  output logic     retire_we,
  output reg_idx_t retire_wa,
  output word_t    retire_wd,
  // events of this cycle
  output logic     ev_stall,       // load-use or interlock stall
  output logic     ev_byp_e,       // an operand taken from the execute stage
  output logic     ev_byp_m,       // an operand taken from the memory stage
  output logic     ev_byp_w,       // an operand taken from the write-back stage
  output logic     ev_kill_jump,   // a jump in decode killed the fetched instruction
  output logic     ev_kill_branch  // a taken branch in execute killed two instructions
);

  // ---------------------------------------------------------------- state
  typedef struct packed {
    logic  v;
    word_t pc;
    word_t ir;
  } d_regs_t;

  typedef struct packed {
    logic  v;
    word_t pc;
    word_t ir;
    ctrl_t c;
    word_t a;
    word_t b;
    word_t md1;
    word_t brt;
  } e_regs_t;

  typedef struct packed {
    logic  v;
    word_t pc;
    word_t ir;
    ctrl_t c;
    word_t y;
    word_t md2;
  } m_regs_t;

  typedef struct packed {
    logic  v;
    word_t pc;
    word_t ir;
    ctrl_t c;
    word_t r;
  } w_regs_t;

  word_t   pc_q;
  d_regs_t d_q;
  e_regs_t e_q;
  m_regs_t m_q;
  w_regs_t w_q;

  // ---------------------------------------------------------------- decode
  ctrl_t    c_d;
  word_t    imm_d, rd1, rd2, op1_d, op2_d;
  word_t    jabs_d, rind_d, brt_d;
  byp_sel_e byp1, byp2;
  logic     stall, pc_en, kill_f, bubble_e;
  pc_sel_e  pc_sel;

  // ---------------------------------------------------------------- execute/memory
  word_t alu_y;
  logic  alu_eq, br_taken_e;
  word_t wbval_m;

  ctrl_decode u_dec (
    .ir (d_q.ir),
    .c  (c_d)
  );

  imm_select u_imm (
    .ir  (d_q.ir),
    .sel (c_d.imm_sel),
    .imm (imm_d)
  );

  regfile u_rf (
    .clk (clk),
    .rs1 (rs1_of(d_q.ir)),
    .rs2 (rs2_of(d_q.ir)),
    .rd1 (rd1),
    .rd2 (rd2),
    .we  (w_q.c.we),
    .wa  (w_q.c.ws),
    .wd  (w_q.r)
  );

  hazard_unit #(.BYPASS(BYPASS)) u_haz (
    .rs1_d       (rs1_of(d_q.ir)),
    .rs2_d       (rs2_of(d_q.ir)),
    .re1_d       (c_d.re1),
    .re2_d       (c_d.re2),
    .jabs_d      (c_d.is_jump),
    .rind_d      (c_d.is_jalr),
    .ws_e        (e_q.c.ws),
    .we_e        (e_q.c.we),
    .we_bypass_e (e_q.c.we_bypass),
    .we_stall_e  (e_q.c.we_stall),
    .br_taken_e  (br_taken_e),
    .ws_m        (m_q.c.ws),
    .we_m        (m_q.c.we),
    .ws_w        (w_q.c.ws),
    .we_w        (w_q.c.we),
    .stall       (stall),
    .byp1        (byp1),
    .byp2        (byp2),
    .pc_sel      (pc_sel),
    .pc_en       (pc_en),
    .kill_f      (kill_f),
    .bubble_e    (bubble_e)
  );

  function automatic word_t byp_mux(byp_sel_e s, word_t rf, word_t e, word_t m, word_t w);
    unique case (s)
      SRC_E:   return e;
      SRC_M:   return m;
      SRC_W:   return w;
      default: return rf;
    endcase
  endfunction

  assign op1_d  = byp_mux(byp1, rd1, alu_y, wbval_m, w_q.r);
  assign op2_d  = byp_mux(byp2, rd2, alu_y, wbval_m, w_q.r);
  assign jabs_d = d_q.pc + imm_d;
  assign rind_d = op1_d + imm_d;
  assign brt_d  = d_q.pc + imm_d;

  // ---------------------------------------------------------------- fetch
  word_t pc_next;

  always_comb begin
    unique case (pc_sel)
      PC_BR:   pc_next = e_q.brt;
      PC_JABS: pc_next = jabs_d;
      PC_RIND: pc_next = rind_d;
      default: pc_next = pc_q + 32'd4;
    endcase
  end

  assign imem_addr = pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q <= RESET_PC;
    end else if (pc_en) begin
      pc_q <= pc_next;
    end
  end

  // IRSrc_D: the fetched instruction, or a bubble when it is killed.
  always_ff @(posedge clk) begin
    if (rst || (kill_f && !stall) || br_taken_e) begin
      d_q <= '{v: 1'b0, pc: '0, ir: NOP};
    end else if (!stall) begin
      d_q <= '{v: 1'b1, pc: pc_q, ir: imem_inst};
    end
  end

  // IRSrc_E: the decoded instruction, or a bubble on a stall or a branch kill.
  always_ff @(posedge clk) begin
    if (rst || bubble_e) begin
      e_q <= '{v: 1'b0, pc: '0, ir: NOP, c: '0, a: '0, b: '0, md1: '0, brt: '0};
    end else begin
      e_q.v   <= d_q.v;
      e_q.pc  <= d_q.pc;
      e_q.ir  <= d_q.ir;
      e_q.c   <= c_d;
      e_q.a   <= (c_d.wb_sel == WB_PC) ? d_q.pc : op1_d;
      e_q.b   <= (c_d.wb_sel == WB_PC) ? 32'd4
               : (c_d.op2_sel == OP2_IMM) ? imm_d : op2_d;
      e_q.md1 <= op2_d;
      e_q.brt <= brt_d;
    end
  end

  // ---------------------------------------------------------------- execute
  alu u_alu (
    .a  (e_q.a),
    .b  (e_q.b),
    .op (e_q.c.alu_op),
    .y  (alu_y),
    .eq (alu_eq)
  );

  assign br_taken_e = e_q.c.is_beq && alu_eq;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_q <= '{v: 1'b0, pc: '0, ir: NOP, c: '0, y: '0, md2: '0};
    end else begin
      m_q <= '{v: e_q.v, pc: e_q.pc, ir: e_q.ir, c: e_q.c, y: alu_y, md2: e_q.md1};
    end
  end

  // ---------------------------------------------------------------- memory
  assign dmem_addr  = m_q.y;
  assign dmem_wdata = m_q.md2;
  assign dmem_we    = m_q.c.mem_wr;
  assign wbval_m    = (m_q.c.wb_sel == WB_MEM) ? dmem_rdata : m_q.y;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_q <= '{v: 1'b0, pc: '0, ir: NOP, c: '0, r: '0};
    end else begin
      w_q <= '{v: m_q.v, pc: m_q.pc, ir: m_q.ir, c: m_q.c, r: wbval_m};
    end
  end

  // ---------------------------------------------------------------- trace
  assign retire_valid = w_q.v;
  assign retire_pc    = w_q.pc;
  assign retire_ir    = w_q.ir;
  assign retire_we    = w_q.c.we;
  assign retire_wa    = w_q.c.ws;
  assign retire_wd    = w_q.r;

  assign ev_stall       = stall && !br_taken_e;
  assign ev_byp_e       = (byp1 == SRC_E) || (byp2 == SRC_E);
  assign ev_byp_m       = (byp1 == SRC_M) || (byp2 == SRC_M);
  assign ev_byp_w       = (byp1 == SRC_W) || (byp2 == SRC_W);
  assign ev_kill_jump   = kill_f && !br_taken_e;
  assign ev_kill_branch = br_taken_e;

  // ---------------------------------------------------------------- checks
  // A stall holds the decode instruction in place.
  a_stall_holds: assert property (@(posedge clk) disable iff (rst)
    (stall && !br_taken_e) |=> (d_q.ir == $past(d_q.ir)));
  // A bubble never writes the register file or the data memory.
  a_bubble_inert: assert property (@(posedge clk) disable iff (rst)
    !w_q.v |-> !w_q.c.we && !m_q.c.mem_wr || m_q.v);

endmodule
