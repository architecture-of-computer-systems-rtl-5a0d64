// tb_alu: self-checking test of the ALU. Drives random and corner operands
// through every operation and compares y and eq with values computed here
// from the operands.
`timescale 1ns/1ps
module tb_alu;
  import pipe_pkg::*;

  word_t   a, b, y;
  alu_op_e op;
  logic    eq;
  int      checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y, .eq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(alu_op_e o, word_t x, word_t z);
    logic [63:0] ext;
    int sh = int'(z & 32'h1f);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_SLL:  return x << sh;
      ALU_SLT:  return (x[31] != z[31]) ? word_t'(x[31]) : word_t'(x < z);
      ALU_SLTU: return word_t'(x < z);
      ALU_XOR:  return (x | z) & ~(x & z);
      ALU_SRL:  return x >> sh;
      ALU_SRA:  begin ext = {{32{x[31]}}, x}; return ext[sh +: 32]; end
      ALU_OR:   return x | z;
      default:  return x & z;
    endcase
  endfunction

  task automatic one(alu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z) || eq !== (x == z)) begin
      failures++;
      $display("FAIL %s a=%h b=%h y=%h expected %h", o.name(), x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    automatic word_t corners[6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1f};
    for (int k = 0; k <= int'(ALU_AND); k++) begin
      foreach (corners[i]) foreach (corners[j]) one(alu_op_e'(k), corners[i], corners[j]);
      for (int n = 0; n < 300; n++) one(alu_op_e'(k), $urandom(), $urandom());
      one(alu_op_e'(k), 32'h1234_5678, 32'h1234_5678);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
