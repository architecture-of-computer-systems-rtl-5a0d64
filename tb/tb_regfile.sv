// tb_regfile: self-checking test of the register file. Random writes and
// reads on both ports against a shadow array kept here; x0 must read zero
// whatever is written to it, and a read in the cycle of a write to the same
// register must return the old value.
`timescale 1ns/1ps
module tb_regfile;
  import pipe_pkg::*;

  logic     clk = 0;
  reg_idx_t rs1, rs2, wa;
  word_t    rd1, rd2, wd;
  logic     we;
  word_t    shadow [32];
  int       checks = 0, failures = 0;

  regfile dut (.clk, .rs1, .rs2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; rs1 = 0; rs2 = 0;
    // fill every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = $urandom();
      shadow[r] = (r == 0) ? '0 : wd;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = $urandom_range(0, 1);
      wa  = 5'($urandom_range(0, 31));
      wd  = $urandom();
      rs1 = 5'($urandom_range(0, 31));
      rs2 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom_range(0, 31));
      #1;
      chk(rd1 === shadow[rs1], $sformatf("rd1 x%0d=%h expected %h", rs1, rd1, shadow[rs1]));
      chk(rd2 === shadow[rs2], $sformatf("rd2 x%0d=%h expected %h", rs2, rd2, shadow[rs2]));
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    rs1 = 0; #1;
    chk(rd1 === '0, "x0 not zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
