// pipe_pkg: types and constants shared by the 5-stage pipelined processor.
//
// The instruction set is the small load-store subset used throughout the
// design: register-register ALU, ALU-immediate, LW, SW, BEQ, J, JAL and JALR.
// The four instruction formats (register, immediate, store/branch, jump) and
// their fields (rd, rs1, rs2, func10 = {func7, func3}, a 12-bit immediate, a
// 25-bit jump offset) follow the design's format table. The bit positions of
// the fields and the opcode values are this design's choice: they reuse the
// standard RV32I positions and major opcodes, and give J, which has no RV32I
// counterpart, an opcode of its own (7'b1101011).
//
// Store and branch immediates are split as the format table splits them:
// Imm[11:7] sits where rd sits (bits 11:7) and Imm[6:0] where func7 sits
// (bits 31:25).
package pipe_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Major opcodes (bits 6:0).
  localparam logic [6:0] OPC_ALU  = 7'b0110011;
  localparam logic [6:0] OPC_ALUI = 7'b0010011;
  localparam logic [6:0] OPC_LW   = 7'b0000011;
  localparam logic [6:0] OPC_SW   = 7'b0100011;
  localparam logic [6:0] OPC_BEQ  = 7'b1100011;
  localparam logic [6:0] OPC_J    = 7'b1101011;
  localparam logic [6:0] OPC_JAL  = 7'b1101111;
  localparam logic [6:0] OPC_JALR = 7'b1100111;

  // Instruction injected by the bubble/kill muxes: ALUi x0 <- x0 + 0.
  // It writes nothing (ws = 0) and reads nothing that can stall.
  localparam word_t NOP = 32'h0000_0013;

  // Register that JAL links into (WASel = X1).
  localparam reg_idx_t LINK_REG = 5'd1;

  // ALU operations, selected by func10 (ALU), func3 (ALUi) or fixed to ADD.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND
  } alu_op_e;

  // ImmSel column of the control table.
  typedef enum logic [1:0] {IMM_I, IMM_S, IMM_B, IMM_J} imm_sel_e;

  // Op2Sel, WBSel, WASel and PCSel columns of the control table.
  typedef enum logic {OP2_REG, OP2_IMM} op2_sel_e;
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wb_sel_e;
  typedef enum logic {WA_RD, WA_X1} wa_sel_e;
  typedef enum logic [1:0] {PC_PLUS4, PC_BR, PC_RIND, PC_JABS} pc_sel_e;

  // Operand source chosen by the bypass network in decode.
  typedef enum logic [1:0] {SRC_RF, SRC_E, SRC_M, SRC_W} byp_sel_e;

  // Decoded control for one instruction.
  typedef struct packed {
    logic       valid_op;   // a recognised opcode
    imm_sel_e   imm_sel;
    op2_sel_e   op2_sel;
    alu_op_e    alu_op;
    logic       mem_wr;     // MemWr
    logic       mem_rd;     // instruction is LW
    wb_sel_e    wb_sel;
    reg_idx_t   ws;         // destination register (after WASel)
    logic       we;         // RFWen, already qualified by ws != 0
    logic       we_bypass;  // result is ready at the end of execute
    logic       we_stall;   // result is not ready at the end of execute (LW)
    logic       re1;        // instruction reads rs1
    logic       re2;        // instruction reads rs2
    logic       is_beq;
    logic       is_jump;    // J or JAL: PCSel = jabs, resolved in decode
    logic       is_jalr;    // JALR: PCSel = rind, resolved in decode
  } ctrl_t;

  function automatic reg_idx_t rd_of(word_t ir);
    return ir[11:7];
  endfunction
  function automatic reg_idx_t rs1_of(word_t ir);
    return ir[19:15];
  endfunction
  function automatic reg_idx_t rs2_of(word_t ir);
    return ir[24:20];
  endfunction

endpackage
