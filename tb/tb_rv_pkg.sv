// tb_rv_pkg: instruction encoders and a reference instruction-set model for
// the pipelined processor's testbenches.
//
// The encoders build the design's instruction formats (see pipe_pkg). The
// reference model (class rv_model) executes one instruction per step()
// call, architecturally and without any pipeline, and reports what it wrote:
// the register write (we, wa, wd) and the store (st, saddr, sdata). It is
// written independently of the RTL: it decodes the raw instruction bits
// itself and does not use the RTL's decoder, ALU or immediate logic.
package tb_rv_pkg;

  typedef logic [31:0] u32;

  // ---------------------------------------------------------------- encoders
  function automatic u32 enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {f7[6:0], rs2[4:0], rs1[4:0], f3[2:0], rd[4:0], 7'b0110011};
  endfunction
  function automatic u32 enc_i(int opc, int imm, int rs1, int f3, int rd);
    return {imm[11:0], rs1[4:0], f3[2:0], rd[4:0], opc[6:0]};
  endfunction
  function automatic u32 enc_s(int opc, int imm, int rs2, int rs1, int f3);
    // Imm[11:7] in bits 11:7, Imm[6:0] in bits 31:25
    return {imm[6:0], rs2[4:0], rs1[4:0], f3[2:0], imm[11:7], opc[6:0]};
  endfunction
  function automatic u32 enc_jt(int opc, int off);
    return {off[24:0], opc[6:0]};
  endfunction

  function automatic u32 ADD (int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 0, rd); endfunction
  function automatic u32 SUB (int rd, int rs1, int rs2); return enc_r(32, rs2, rs1, 0, rd); endfunction
  function automatic u32 XOR_(int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 4, rd); endfunction
  function automatic u32 SLT (int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 2, rd); endfunction
  function automatic u32 SRA (int rd, int rs1, int rs2); return enc_r(32, rs2, rs1, 5, rd); endfunction
  function automatic u32 ADDI(int rd, int rs1, int imm); return enc_i(7'b0010011, imm, rs1, 0, rd); endfunction
  function automatic u32 ANDI(int rd, int rs1, int imm); return enc_i(7'b0010011, imm, rs1, 7, rd); endfunction
  function automatic u32 LW  (int rd, int rs1, int imm); return enc_i(7'b0000011, imm, rs1, 2, rd); endfunction
  function automatic u32 JALR(int rd, int rs1, int imm); return enc_i(7'b1100111, imm, rs1, 0, rd); endfunction
  function automatic u32 SW  (int rs2, int rs1, int imm); return enc_s(7'b0100011, imm, rs2, rs1, 2); endfunction
  function automatic u32 BEQ (int rs1, int rs2, int off); return enc_s(7'b1100011, off, rs2, rs1, 0); endfunction
  function automatic u32 J   (int off); return enc_jt(7'b1101011, off); endfunction
  function automatic u32 JAL (int off); return enc_jt(7'b1101111, off); endfunction

  localparam u32 HALT = 32'h0000_006b;  // J 0: jump to itself

  // ---------------------------------------------------------------- model
  typedef struct {
    u32   pc;
    u32   ir;
    bit   we;
    int   wa;
    u32   wd;
    bit   st;
    u32   saddr;
    u32   sdata;
  } step_t;

  class rv_model;
    u32 x[32];
    u32 pc;
    u32 imem[int];
    u32 dmem[int];

    function new();
      foreach (x[i]) x[i] = '0;
      pc = '0;
    endfunction

    static function u32 sx(u32 v, int bits);
      u32 m = u32'(1) << (bits - 1);
      v = v & ((u32'(1) << bits) - 1);
      return (v ^ m) - m;
    endfunction

    function u32 rdmem(u32 a);
      int k = int'(a[11:2]);
      return dmem.exists(k) ? dmem[k] : '0;
    endfunction

    function step_t step();
      step_t s;
      u32 ir, a, b, res, nxt, imm_i, imm_s, imm_j;
      int rd, rs1, rs2, f3, f7;
      ir  = imem.exists(int'(pc[11:2])) ? imem[int'(pc[11:2])] : HALT;
      rd  = int'(ir[11:7]);
      rs1 = int'(ir[19:15]);
      rs2 = int'(ir[24:20]);
      f3  = int'(ir[14:12]);
      f7  = int'(ir[31:25]);
      a   = x[rs1];
      b   = x[rs2];
      imm_i = sx(u32'(ir[31:20]), 12);
      imm_s = sx({20'b0, ir[11:7], ir[31:25]}, 12);
      imm_j = sx({7'b0, ir[31:7]}, 25);
      s = '{pc: pc, ir: ir, we: 0, wa: 0, wd: 0, st: 0, saddr: 0, sdata: 0};
      nxt = pc + 4;
      case (ir[6:0])
        7'b0110011, 7'b0010011: begin
          u32 op2 = (ir[6:0] == 7'b0110011) ? b : imm_i;
          bit alt = f7[5] && (ir[6:0] == 7'b0110011 || f3 == 5);
          case (f3)
            0: res = alt ? a - op2 : a + op2;
            1: res = a << op2[4:0];
            2: res = ($signed(a) < $signed(op2)) ? 1 : 0;
            3: res = (a < op2) ? 1 : 0;
            4: res = a ^ op2;
            5: res = alt ? u32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
            6: res = a | op2;
            default: res = a & op2;
          endcase
          s.we = 1; s.wa = rd; s.wd = res;
        end
        7'b0000011: begin s.we = 1; s.wa = rd; s.wd = rdmem(a + imm_i); end
        7'b0100011: begin
          s.st = 1; s.saddr = a + imm_s; s.sdata = b;
          dmem[int'(s.saddr[11:2])] = b;
        end
        7'b1100011: if (a == b) nxt = pc + imm_s;
        7'b1101011: nxt = pc + imm_j;
        7'b1101111: begin s.we = 1; s.wa = 1; s.wd = pc + 4; nxt = pc + imm_j; end
        7'b1100111: begin s.we = 1; s.wa = rd; s.wd = pc + 4; nxt = a + imm_i; end
        default: ;
      endcase
      if (s.we && s.wa == 0) s.we = 0;
      if (s.we) x[s.wa] = s.wd;
      pc = nxt;
      return s;
    endfunction
  endclass

endpackage
