// pipe_top: the 5-stage pipelined processor with its two memories.
//
// pipe_core (fetch, decode, execute, memory, write-back with interlocks,
// bypasses and jump/branch kills) is wired to a separate instruction memory
// (imem) and data memory (dmem), so fetch and memory access never compete
// for a port and the pipeline has no structural hazards.
//
// Use: hold rst high, load the program through the imem load port (word
// addresses) and, if wanted, initial data through the dmem host port, then
// release rst; execution starts at RESET_PC. The host port can read the data
// memory at any time. The retire_* outputs show every instruction leaving
// write-back and the register it writes; the ev_* outputs flag stalls,
// bypasses and kills in the current cycle. Memory sizes are this design's
// choice (the design gives none).
module pipe_top
  import pipe_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          BYPASS     = 1'b1,
  parameter word_t       RESET_PC   = '0
) (
  input  logic                          clk,
  input  logic                          rst,
  // program load port
  input  logic                          iload_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] iload_addr,
  input  word_t                         iload_data,
  // data memory host port
  input  logic                          dhost_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dhost_addr,
  input  word_t                         dhost_wdata,
  output word_t                         dhost_rdata,
  // write-back trace
  output logic                          retire_valid,
  output word_t                         retire_pc,
  output word_t                         retire_ir,
  output logic                          retire_we,
  output reg_idx_t                      retire_wa,
  output word_t                         retire_wd,
  // pipeline stores, as seen by the data memory
  output logic                          store_en,
  output word_t                         store_addr,
  output word_t                         store_data,
  // events
  output logic                          ev_stall,
  output logic                          ev_byp_e,
  output logic                          ev_byp_m,
  output logic                          ev_byp_w,
  output logic                          ev_kill_jump,
  output logic                          ev_kill_branch
);

  word_t imem_addr, imem_inst;
  word_t dmem_addr, dmem_wdata, dmem_rdata;
  logic  dmem_we;

  pipe_core #(.BYPASS(BYPASS), .RESET_PC(RESET_PC)) u_core (
    .clk            (clk),
    .rst            (rst),
    .imem_addr      (imem_addr),
    .imem_inst      (imem_inst),
    .dmem_addr      (dmem_addr),
    .dmem_wdata     (dmem_wdata),
    .dmem_we        (dmem_we),
    .dmem_rdata     (dmem_rdata),
    .retire_valid   (retire_valid),
    .retire_pc      (retire_pc),
    .retire_ir      (retire_ir),
    .retire_we      (retire_we),
    .retire_wa      (retire_wa),
    .retire_wd      (retire_wd),
    .ev_stall       (ev_stall),
    .ev_byp_e       (ev_byp_e),
    .ev_byp_m       (ev_byp_m),
    .ev_byp_w       (ev_byp_w),
    .ev_kill_jump   (ev_kill_jump),
    .ev_kill_branch (ev_kill_branch)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk     (clk),
    .addr    (imem_addr),
    .inst    (imem_inst),
    .ld_we   (iload_we),
    .ld_addr (iload_addr),
    .ld_data (iload_data)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .addr    (dmem_addr),
    .wdata   (dmem_wdata),
    .we      (dmem_we),
    .rdata   (dmem_rdata),
    .h_we    (dhost_we),
    .h_addr  (dhost_addr),
    .h_wdata (dhost_wdata),
    .h_rdata (dhost_rdata)
  );

  assign store_en   = dmem_we;
  assign store_addr = dmem_addr;
  assign store_data = dmem_wdata;

endmodule
