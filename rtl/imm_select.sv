// imm_select: the Imm Select block of the decode stage.
//
// Extracts the immediate of an instruction and sign-extends it to XLEN bits,
// as chosen by ImmSel:
//   IMM_I  IType12   : ir[31:20]                    (ALUi, LW, JALR)
//   IMM_S  BsType12  : {ir[11:7], ir[31:25]}         (SW)
//   IMM_B  BrType12  : {ir[11:7], ir[31:25]}         (BEQ)
//   IMM_J  25-bit jump offset : ir[31:7]             (J, JAL)
// The split of the store/branch immediate into Imm[11:7] and Imm[6:0] is the
// design's format table; the bit positions are this design's choice (see
// pipe_pkg). All immediates are byte offsets. Purely combinational.
module imm_select
  import pipe_pkg::*;
(
  input  word_t    ir,
  input  imm_sel_e sel,
  output word_t    imm
);

  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{(XLEN-12){ir[31]}}, ir[31:20]};
      IMM_S,
      IMM_B:   imm = {{(XLEN-12){ir[11]}}, ir[11:7], ir[31:25]};
      IMM_J:   imm = {{(XLEN-25){ir[31]}}, ir[31:7]};
      default: imm = '0;
    endcase
  end

endmodule
