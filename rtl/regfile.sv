// regfile: the general purpose registers (GPRs) of the pipeline.
//
// NREGS registers of XLEN bits with two combinational read ports (rs1 -> rd1,
// rs2 -> rd2), used in the decode stage, and one write port (wa, wd, we),
// written at the rising clock edge by the write-back stage. Register 0 always
// reads as zero and ignores writes; the design relies on this, since a
// destination of x0 never counts as a hazard (ws != 0 in the write enables).
//
// A read in the same cycle as a write to the same register returns the old
// value. This is deliberate: the pipeline either stalls on a pending write in
// write-back (interlock mode) or bypasses the write-back value (full bypass
// mode), so the register file needs no write-through path.
// The storage has no reset; the reset value of the registers is undefined.
module regfile
  import pipe_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic     clk,
  input  reg_idx_t rs1,
  input  reg_idx_t rs2,
  output word_t    rd1,
  output word_t    rd2,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [N];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];

endmodule
