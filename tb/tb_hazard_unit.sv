// tb_hazard_unit: self-checking test of the stall, bypass and kill logic,
// in both configurations (a fully bypassed and an interlock-only instance).
// Random register numbers drawn from a small set make matches frequent. The
// expected values are the design's equations written out here:
//   interlock:  stall = ((rs1=wsE)weE + (rs1=wsM)weM + (rs1=wsW)weW) re1
//                     + ((rs2=wsE)weE + (rs2=wsM)weM + (rs2=wsW)weW) re2
//   bypassed:   stall = (rs1=wsE) we-stallE re1 + (rs2=wsE) we-stallE re2,
//               operand from the youngest matching stage, E only with
//               we-bypassE;
//   kills:      taken branch -> PC = br, kill fetch, bubble into execute;
//               else stall -> hold PC, bubble into execute;
//               else J/JAL or JALR -> PC = jabs or rind, kill fetch.
`timescale 1ns/1ps
module tb_hazard_unit;
  import pipe_pkg::*;

  reg_idx_t rs1_d, rs2_d, ws_e, ws_m, ws_w;
  logic     re1_d, re2_d, jabs_d, rind_d, we_e, we_bypass_e, we_stall_e, br_taken_e, we_m, we_w;
  logic     stall [2], pc_en [2], kill_f [2], bubble_e [2];
  byp_sel_e byp1 [2], byp2 [2];
  pc_sel_e  pc_sel [2];
  int       checks = 0, failures = 0;
  int       seen_stall = 0, seen_byp = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    hazard_unit #(.BYPASS(g == 1)) dut (
      .rs1_d, .rs2_d, .re1_d, .re2_d, .jabs_d, .rind_d,
      .ws_e, .we_e, .we_bypass_e, .we_stall_e, .br_taken_e,
      .ws_m, .we_m, .ws_w, .we_w,
      .stall(stall[g]), .byp1(byp1[g]), .byp2(byp2[g]), .pc_sel(pc_sel[g]),
      .pc_en(pc_en[g]), .kill_f(kill_f[g]), .bubble_e(bubble_e[g]));
  end

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic byp_sel_e src(reg_idx_t rs, logic re);
    if (!re) return SRC_RF;
    if (rs == ws_e && we_bypass_e) return SRC_E;
    if (rs == ws_m && we_m) return SRC_M;
    if (rs == ws_w && we_w) return SRC_W;
    return SRC_RF;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic st_i, st_b, st;
      rs1_d = 5'($urandom_range(0, 3));
      rs2_d = 5'($urandom_range(0, 3));
      ws_e  = 5'($urandom_range(0, 3));
      ws_m  = 5'($urandom_range(0, 3));
      ws_w  = 5'($urandom_range(0, 3));
      re1_d = $urandom_range(0, 1);
      re2_d = $urandom_range(0, 1);
      // execute holds a load, an ALU-type writer, or a non-writer
      case ($urandom_range(0, 2))
        0: begin we_stall_e = 1; we_bypass_e = 0; end
        1: begin we_stall_e = 0; we_bypass_e = 1; end
        default: begin we_stall_e = 0; we_bypass_e = 0; end
      endcase
      we_e = we_stall_e | we_bypass_e;
      we_m = $urandom_range(0, 1);
      we_w = $urandom_range(0, 1);
      jabs_d = 0; rind_d = 0;
      case ($urandom_range(0, 5))
        0: jabs_d = 1;
        1: rind_d = 1;
        default: ;
      endcase
      br_taken_e = ($urandom_range(0, 5) == 0);
      #1;
      st_i = (((rs1_d == ws_e) && we_e) || ((rs1_d == ws_m) && we_m) || ((rs1_d == ws_w) && we_w)) && re1_d
          || (((rs2_d == ws_e) && we_e) || ((rs2_d == ws_m) && we_m) || ((rs2_d == ws_w) && we_w)) && re2_d;
      st_b = (rs1_d == ws_e) && we_stall_e && re1_d || (rs2_d == ws_e) && we_stall_e && re2_d;
      chk(stall[0] == st_i, "interlock stall");
      chk(stall[1] == st_b, "bypassed stall");
      chk(byp1[0] == SRC_RF && byp2[0] == SRC_RF, "interlock uses no bypass");
      chk(byp1[1] == src(rs1_d, re1_d), $sformatf("byp1 %s", byp1[1].name()));
      chk(byp2[1] == src(rs2_d, re2_d), $sformatf("byp2 %s", byp2[1].name()));
      seen_stall += int'(st_b);
      seen_byp   += int'(byp1[1] != SRC_RF);
      for (int g = 0; g < 2; g++) begin
        st = (g == 1) ? st_b : st_i;
        if (br_taken_e) begin
          chk(pc_sel[g] == PC_BR && pc_en[g] && kill_f[g] && bubble_e[g], "taken branch");
        end else if (st) begin
          chk(!pc_en[g] && !kill_f[g] && bubble_e[g], "stall");
        end else begin
          chk(pc_en[g] && !bubble_e[g], "advance");
          chk(kill_f[g] == (jabs_d || rind_d), "jump kill");
          chk(pc_sel[g] == (jabs_d ? PC_JABS : rind_d ? PC_RIND : PC_PLUS4), "PCSel");
        end
      end
    end
    chk(seen_stall > 0 && seen_byp > 0, "stimulus reached stalls and bypasses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
