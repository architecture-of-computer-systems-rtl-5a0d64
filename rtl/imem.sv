// imem: the instruction memory, read by the fetch stage.
//
// WORDS words of XLEN bits. The fetch port is combinational: the word at
// byte address addr (addr[1:0] ignored, upper bits beyond the array wrap) is
// on inst in the same cycle, so fetch takes one cycle as in the design's
// timing model. A separate load port (ld_we, ld_addr, ld_data, word address)
// writes at the rising clock edge; it is how a program is placed in memory
// before reset is released. The size and the load port are this design's
// choice; the design gives only the block's function.
module imem
  import pipe_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    inst,
  input  logic                     ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,
  input  word_t                    ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign inst = mem[addr[AW+1:2]];

endmodule
