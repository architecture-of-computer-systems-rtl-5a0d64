// alu: the integer ALU of the execute stage.
//
// Computes y = a op b for the operations of alu_op_e (add, subtract, shifts,
// set-less-than signed/unsigned, and the bitwise operations); shift amounts
// are the low five bits of b. It also outputs eq = (a == b), the "Taken?"
// condition that BEQ resolves in the execute stage. The operation set is the
// usual RV32I integer set; the design itself only names an ALU controlled by
// FuncSel. Purely combinational.
module alu
  import pipe_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y,
  output logic    eq
);

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << b[4:0];
      ALU_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = word_t'($signed(a) >>> b[4:0]);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      default:  y = '0;
    endcase
  end

  assign eq = (a == b);

endmodule
