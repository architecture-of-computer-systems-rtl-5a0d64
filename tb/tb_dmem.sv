// tb_dmem: self-checking test of the data memory. Random pipeline-port
// writes and host-port writes against a shadow array; the pipeline read port
// must show a stored word in the cycle after the store (writes complete in
// one cycle), the host port must read the same contents, and when both
// ports write one word in the same cycle the pipeline's data must stay.
`timescale 1ns/1ps
module tb_dmem;
  import pipe_pkg::*;

  localparam int W = 1024;
  logic       clk = 0;
  word_t      addr, wdata, rdata, h_wdata, h_rdata;
  logic       we, h_we;
  logic [9:0] h_addr;
  word_t      ref_mem [W];
  int         checks = 0, failures = 0;

  dmem dut (.clk, .addr, .wdata, .we, .rdata, .h_we, .h_addr, .h_wdata, .h_rdata);

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
    we = 0; h_we = 0; addr = 0; wdata = 0; h_addr = 0; h_wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = 10'(i); h_wdata = $urandom();
      ref_mem[i] = h_wdata;
    end
    @(negedge clk);
    h_we = 0;
    for (int n = 0; n < 4000; n++) begin
      automatic int i = $urandom_range(0, 63);
      automatic int j = $urandom_range(0, 63);
      @(negedge clk);
      addr    = {20'b0, 10'(i), 2'b00};
      we      = $urandom_range(0, 1);
      wdata   = $urandom();
      h_addr  = ($urandom_range(0, 3) == 0) ? 10'(i) : 10'(j);
      h_we    = ($urandom_range(0, 3) == 0);
      h_wdata = $urandom();
      #1;
      chk(rdata === ref_mem[i], $sformatf("read word %0d: %h expected %h", i, rdata, ref_mem[i]));
      chk(h_rdata === ref_mem[h_addr], $sformatf("host read word %0d", h_addr));
      @(posedge clk);
      if (h_we) ref_mem[h_addr] = h_wdata;
      if (we) ref_mem[i] = wdata;
      #1;
      chk(rdata === ref_mem[i], $sformatf("word %0d after write: %h expected %h", i, rdata, ref_mem[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
