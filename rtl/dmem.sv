// dmem: the data memory, accessed by the memory stage.
//
// WORDS words of XLEN bits, word-addressed by byte address addr (addr[1:0]
// ignored). The pipeline port reads combinationally (rdata is valid in the
// same cycle as addr) and writes wdata at the rising clock edge when we is
// high, so a store completes in one cycle. That single-cycle write is what
// lets a load that follows a store to the same address see the stored value
// without any check in the pipeline.
// A second, host port (h_we, h_addr, h_wdata, h_rdata, word address) lets
// the surrounding system preload and inspect the memory; if both ports write
// the same word in one cycle the pipeline port wins. The size and the host
// port are this design's choice.
module dmem
  import pipe_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  word_t                    addr,
  input  word_t                    wdata,
  input  logic                     we,
  output word_t                    rdata,
  input  logic                     h_we,
  input  logic [$clog2(WORDS)-1:0] h_addr,
  input  word_t                    h_wdata,
  output word_t                    h_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we && !(we && addr[AW+1:2] == h_addr)) mem[h_addr] <= h_wdata;
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata   = mem[addr[AW+1:2]];
  assign h_rdata = mem[h_addr];

endmodule
