// ctrl_decode: hardwired control of the pipeline, used in the decode stage.
//
// Turns one instruction into the control points of the design's control
// table (ImmSel, Op2Sel, FuncSel, MemWr, RFWen, WBSel, WASel) and into the
// fields the hazard logic compares:
//   ws  = x1 for JAL, else rd                        (WASel)
//   we  = (ws != 0) for ALU, ALUi, LW, JALR; on for JAL; off otherwise
//   re1 = on for ALU, ALUi, LW, SW, BEQ, JALR; off for J, JAL
//   re2 = on for ALU, SW, BEQ; off otherwise
//   we_bypass = we of an instruction whose result exists at the end of
//               execute (ALU, ALUi, JAL, JALR); we_stall = we of LW.
// The control table, ws, we, re1 and re2 follow the design. In this design
// JAL and JALR compute their link value, the return address PC+4, in the ALU
// (operands PC and 4), so their result is bypassable from execute exactly
// like an ALU result and only LW needs we_stall. Writing PC+4 for
// WBSel = PC and treating unknown opcodes as no-operations (nothing written,
// nothing read) are this design's choices. Purely combinational.
module ctrl_decode
  import pipe_pkg::*;
(
  input  word_t ir,
  output ctrl_t c
);

  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = ir[6:0];
  assign f3  = ir[14:12];
  assign f7  = ir[31:25];

  // FuncSel = Func: operation from func10 = {func7, func3}
  function automatic alu_op_e func10_op(logic [6:0] func7, logic [2:0] func3);
    unique case (func3)
      3'b000:  return func7[5] ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return func7[5] ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  // FuncSel = Op: operation from func3 (no subtract; SRAI flagged by bit 30)
  function automatic alu_op_e func3_op(logic [6:0] func7, logic [2:0] func3);
    if (func3 == 3'b000) return ALU_ADD;
    return func10_op(func7, func3);
  endfunction

  always_comb begin
    c = '0;
    c.imm_sel = IMM_I;
    c.op2_sel = OP2_REG;
    c.alu_op  = ALU_ADD;
    c.wb_sel  = WB_ALU;
    c.ws      = rd_of(ir);
    unique case (opc)
      OPC_ALU: begin
        c.valid_op = 1'b1;
        c.alu_op   = func10_op(f7, f3);
        c.we       = 1'b1;
        c.re1      = 1'b1;
        c.re2      = 1'b1;
      end
      OPC_ALUI: begin
        c.valid_op = 1'b1;
        c.op2_sel  = OP2_IMM;
        c.alu_op   = func3_op(f7, f3);
        c.we       = 1'b1;
        c.re1      = 1'b1;
      end
      OPC_LW: begin
        c.valid_op = 1'b1;
        c.op2_sel  = OP2_IMM;
        c.mem_rd   = 1'b1;
        c.wb_sel   = WB_MEM;
        c.we       = 1'b1;
        c.re1      = 1'b1;
      end
      OPC_SW: begin
        c.valid_op = 1'b1;
        c.imm_sel  = IMM_S;
        c.op2_sel  = OP2_IMM;
        c.mem_wr   = 1'b1;
        c.re1      = 1'b1;
        c.re2      = 1'b1;
      end
      OPC_BEQ: begin
        c.valid_op = 1'b1;
        c.imm_sel  = IMM_B;
        c.is_beq   = 1'b1;
        c.re1      = 1'b1;
        c.re2      = 1'b1;
      end
      OPC_J: begin
        c.valid_op = 1'b1;
        c.imm_sel  = IMM_J;
        c.is_jump  = 1'b1;
      end
      OPC_JAL: begin
        c.valid_op = 1'b1;
        c.imm_sel  = IMM_J;
        c.is_jump  = 1'b1;
        c.wb_sel   = WB_PC;
        c.ws       = LINK_REG;
        c.we       = 1'b1;
      end
      OPC_JALR: begin
        c.valid_op = 1'b1;
        c.is_jalr  = 1'b1;
        c.wb_sel   = WB_PC;
        c.we       = 1'b1;
        c.re1      = 1'b1;
      end
      default: ;
    endcase
    // A write to x0 is no write at all.
    c.we        = c.we && (c.ws != '0);
    c.we_stall  = c.we && c.mem_rd;
    c.we_bypass = c.we && !c.mem_rd;
  end

endmodule
