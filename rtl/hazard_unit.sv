// hazard_unit: stall, bypass and kill control of the 5-stage pipeline.
//
// Compares the source registers of the instruction in decode (rs1_D, rs2_D,
// qualified by re1_D, re2_D) with the destination registers ws of the
// uncommitted instructions in execute, memory and write-back (qualified by
// their write enables), and decides:
//
//   BYPASS = 1 (fully bypassed pipeline, the default):
//     stall = (rs1_D = ws_E).we-stall_E.re1_D + (rs2_D = ws_E).we-stall_E.re2_D
//     i.e. only a load in execute whose value a decode instruction needs.
//     Each operand takes the youngest matching result: execute (ALU output,
//     only with we-bypass_E), then memory, then write-back, else the register
//     file.
//   BYPASS = 0 (interlocks only):
//     stall = ((rs1_D = ws_E).we_E + (rs1_D = ws_M).we_M
//              + (rs1_D = ws_W).we_W).re1_D  + (same for rs2, re2_D)
//     and every operand comes from the register file.
//
// Control hazards: a jump (J, JAL, JALR) is resolved in decode and kills the
// one instruction fetched behind it (IRSrc_D = bubble); a taken BEQ is
// resolved in execute and kills the two younger instructions in decode and
// fetch. A taken branch overrides a stall, since the stalled instruction is
// one of those it kills. A jump waiting on a stall is not taken until the
// stall clears. These equations are the design's; the priority between
// branch, stall and jump is this design's choice. Purely combinational.
module hazard_unit
  import pipe_pkg::*;
#(
  parameter bit BYPASS = 1'b1
) (
  // decode stage
  input  reg_idx_t rs1_d,
  input  reg_idx_t rs2_d,
  input  logic     re1_d,
  input  logic     re2_d,
  input  logic     jabs_d,       // J or JAL in decode
  input  logic     rind_d,       // JALR in decode
  // execute stage
  input  reg_idx_t ws_e,
  input  logic     we_e,
  input  logic     we_bypass_e,
  input  logic     we_stall_e,
  input  logic     br_taken_e,   // BEQ in execute, condition true
  // memory stage
  input  reg_idx_t ws_m,
  input  logic     we_m,
  // write-back stage
  input  reg_idx_t ws_w,
  input  logic     we_w,
  // decisions
  output logic     stall,        // hold PC and IR_D, bubble into execute
  output byp_sel_e byp1,         // source of the rs1 operand
  output byp_sel_e byp2,         // source of the rs2 operand
  output pc_sel_e  pc_sel,       // PCSel
  output logic     pc_en,        // PC register loads
  output logic     kill_f,       // IRSrc_D = bubble: fetched instruction dies
  output logic     bubble_e      // IRSrc_E = bubble: decode instruction dies or waits
);

  logic m1e, m1m, m1w, m2e, m2m, m2w;

  assign m1e = (rs1_d == ws_e);
  assign m1m = (rs1_d == ws_m);
  assign m1w = (rs1_d == ws_w);
  assign m2e = (rs2_d == ws_e);
  assign m2m = (rs2_d == ws_m);
  assign m2w = (rs2_d == ws_w);

  function automatic byp_sel_e pick(logic e, logic m, logic w);
    if (e) return SRC_E;
    if (m) return SRC_M;
    if (w) return SRC_W;
    return SRC_RF;
  endfunction

  always_comb begin
    if (BYPASS) begin
      stall = (m1e && we_stall_e && re1_d) || (m2e && we_stall_e && re2_d);
      byp1  = pick(m1e && we_bypass_e && re1_d, m1m && we_m && re1_d, m1w && we_w && re1_d);
      byp2  = pick(m2e && we_bypass_e && re2_d, m2m && we_m && re2_d, m2w && we_w && re2_d);
    end else begin
      stall = ((m1e && we_e) || (m1m && we_m) || (m1w && we_w)) && re1_d
           || ((m2e && we_e) || (m2m && we_m) || (m2w && we_w)) && re2_d;
      byp1  = SRC_RF;
      byp2  = SRC_RF;
    end
  end

  always_comb begin
    if (br_taken_e)  pc_sel = PC_BR;
    else if (jabs_d) pc_sel = PC_JABS;
    else if (rind_d) pc_sel = PC_RIND;
    else             pc_sel = PC_PLUS4;
  end

  assign pc_en    = br_taken_e || !stall;
  assign kill_f   = br_taken_e || (!stall && (jabs_d || rind_d));
  assign bubble_e = br_taken_e || stall;

endmodule
