// tb_imem: self-checking test of the instruction memory. Loads random words
// through the load port, then reads every word back through the fetch port
// by byte address (with the low address bits set, which must be ignored).
`timescale 1ns/1ps
module tb_imem;
  import pipe_pkg::*;

  localparam int W = 1024;
  logic        clk = 0;
  word_t       addr, inst, ld_data;
  logic        ld_we;
  logic [9:0]  ld_addr;
  word_t       ref_mem [W];
  int          checks = 0, failures = 0;

  imem dut (.clk, .addr, .inst, .ld_we, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; ld_addr = 0; ld_data = 0; addr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 10'(i); ld_data = $urandom();
      ref_mem[i] = ld_data;
    end
    @(negedge clk);
    ld_we = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int i = $urandom_range(0, W - 1);
      addr = {20'b0, 10'(i), 2'($urandom_range(0, 3))};
      #1;
      checks++;
      if (inst !== ref_mem[i]) begin
        failures++;
        $display("FAIL word %0d: %h expected %h", i, inst, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
