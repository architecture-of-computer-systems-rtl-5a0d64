// tb_imm_select: self-checking test of Imm Select. Builds instructions from
// known immediates placed in the fields of each format and checks that the
// sign-extended immediate comes back.
`timescale 1ns/1ps
module tb_imm_select;
  import pipe_pkg::*;

  word_t    ir, imm;
  imm_sel_e sel;
  int       checks = 0, failures = 0;

  imm_select dut (.ir, .sel, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_imm(imm_sel_e s, word_t inst, int want);
    sel = s; ir = inst;
    #1;
    checks++;
    if (imm !== word_t'(want)) begin
      failures++;
      $display("FAIL %s ir=%h imm=%h expected %h", s.name(), inst, imm, word_t'(want));
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic int    v12 = $urandom_range(0, 4095) - 2048;   // -2048..2047
      automatic int    v25 = $urandom_range(0, 33554431) - 16777216;
      automatic word_t junk = $urandom();
      automatic logic [11:0] u12 = 12'(v12);
      automatic logic [24:0] u25 = 25'(v25);
      // I: imm[11:0] in 31:20, other bits random
      expect_imm(IMM_I, {u12, junk[19:0]}, v12);
      // S/B: imm[11:7] in 11:7, imm[6:0] in 31:25
      expect_imm(IMM_S, {u12[6:0], junk[24:12], u12[11:7], junk[6:0]}, v12);
      expect_imm(IMM_B, {u12[6:0], junk[24:12], u12[11:7], junk[6:0]}, v12);
      // J: 25-bit offset in 31:7
      expect_imm(IMM_J, {u25, junk[6:0]}, v25);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
