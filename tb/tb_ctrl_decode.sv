// tb_ctrl_decode: self-checking test of the hardwired control. For random
// instructions of every opcode (and unknown opcodes) it checks the control
// points against the control table, written out here row by row:
//
//   opcode ImmSel Op2Sel MemWr RFWen WBSel WASel   re1 re2
//   ALU    -      Reg    no    yes   ALU   rd      1   1
//   ALUi   I      Imm    no    yes   ALU   rd      1   0
//   LW     I      Imm    no    yes   Mem   rd      1   0
//   SW     S      Imm    yes   no    -     -       1   1
//   BEQ    B      -      no    no    -     -       1   1
//   J      J      -      no    no    -     -       0   0
//   JAL    J      -      no    yes   PC    x1      0   0
//   JALR   I      -      no    yes   PC    rd      1   0
//
// with we = RFWen and ws != 0, we_stall = we for LW, we_bypass = we otherwise,
// and the ALU operation from func10 (ALU), func3 (ALUi) or add (LW, SW).
`timescale 1ns/1ps
module tb_ctrl_decode;
  import pipe_pkg::*;

  word_t ir;
  ctrl_t c;
  int    checks = 0, failures = 0;

  ctrl_decode dut (.ir, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL ir=%h %s", ir, what);
    end
  endtask

  function automatic alu_op_e op_of(int f3, bit alt);
    case (f3)
      0: return alt ? ALU_SUB : ALU_ADD;
      1: return ALU_SLL;
      2: return ALU_SLT;
      3: return ALU_SLTU;
      4: return ALU_XOR;
      5: return alt ? ALU_SRA : ALU_SRL;
      6: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  initial begin
    automatic logic [6:0] opcs[9] = '{7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011,
                            7'b1100011, 7'b1101011, 7'b1101111, 7'b1100111, 7'b0000000};
    for (int n = 0; n < 4000; n++) begin
      automatic int  k   = $urandom_range(0, 8);
      automatic word_t r = $urandom();
      int  rd, f3;
      bit  alt, wen, rdw, is_ld;
      ir = {r[31:7], opcs[k]};
      if (k == 8) ir[6:0] = 7'(($urandom_range(0, 1) ? 7'b1111111 : 7'b0001111));
      rd  = int'(ir[11:7]);
      f3  = int'(ir[14:12]);
      alt = ir[30];
      #1;
      is_ld = (k == 2);
      wen = (k <= 2) || (k == 6) || (k == 7);
      chk(c.valid_op == (k != 8), "valid_op");
      chk(c.mem_wr == (k == 3), "MemWr");
      chk(c.mem_rd == is_ld, "load");
      chk(c.re1 == (k <= 4 || k == 7), "re1");
      chk(c.re2 == (k == 0 || k == 3 || k == 4), "re2");
      chk(c.is_beq == (k == 4), "is_beq");
      chk(c.is_jump == (k == 5 || k == 6), "is_jump");
      chk(c.is_jalr == (k == 7), "is_jalr");
      if (wen) begin
        automatic int ws = (k == 6) ? 1 : rd;
        chk(c.ws == 5'(ws), "ws");
        chk(c.we == (ws != 0), "we");
        chk(c.we_stall == (is_ld && ws != 0), "we_stall");
        chk(c.we_bypass == (!is_ld && ws != 0), "we_bypass");
      end else begin
        chk(!c.we && !c.we_stall && !c.we_bypass, "no write");
      end
      case (k)
        0: begin
          chk(c.op2_sel == OP2_REG, "Op2Sel");
          chk(c.alu_op == op_of(f3, alt), "FuncSel=Func");
          chk(c.wb_sel == WB_ALU, "WBSel");
        end
        1: begin
          chk(c.op2_sel == OP2_IMM && c.imm_sel == IMM_I, "Op2Sel/ImmSel");
          chk(c.alu_op == op_of(f3, alt && f3 == 5), "FuncSel=Op");
          chk(c.wb_sel == WB_ALU, "WBSel");
        end
        2: begin
          chk(c.op2_sel == OP2_IMM && c.imm_sel == IMM_I, "Op2Sel/ImmSel");
          chk(c.alu_op == ALU_ADD, "FuncSel=+");
          chk(c.wb_sel == WB_MEM, "WBSel");
        end
        3: begin
          chk(c.op2_sel == OP2_IMM && c.imm_sel == IMM_S, "Op2Sel/ImmSel");
          chk(c.alu_op == ALU_ADD, "FuncSel=+");
        end
        4: chk(c.imm_sel == IMM_B, "ImmSel");
        5, 6: chk(c.imm_sel == IMM_J, "ImmSel");
        7: chk(c.imm_sel == IMM_I && c.wb_sel == WB_PC, "ImmSel/WBSel");
        default: ;
      endcase
      if (k == 6) chk(c.wb_sel == WB_PC, "JAL WBSel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
