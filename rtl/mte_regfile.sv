// Multithreaded register file: NTHREADS contexts of 32 x 32-bit registers.
//
// One array of NTHREADS*32 words addressed by {thread, register}, with two
// asynchronous read ports (rs, rt in ID) and one synchronous write port (WB).
// Register 0 of every thread reads as zero and ignores writes. Holding one
// full register set per thread (4 x 32 x 32-bit) follows the description;
// the port arrangement suits FPGA distributed RAM and is this design's
// choice. A write at the end of a cycle is visible to reads in the next.
// Since a thread's next instruction reaches ID one cycle after the previous
// one of the same thread has left WB, no bypass path is needed.
module mte_regfile
  import mte_pkg::*;
#(
  parameter int unsigned THREADS = NTHREADS
) (
  input  logic                       clk,
  input  logic [$clog2(THREADS)-1:0] rd_tid,
  input  reg_idx_t                   ra1,
  input  reg_idx_t                   ra2,
  output word_t                      rd1,
  output word_t                      rd2,
  input  logic                       we,
  input  logic [$clog2(THREADS)-1:0] wr_tid,
  input  reg_idx_t                   wa,
  input  word_t                      wd
);
  word_t regs [THREADS*NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[{wr_tid, wa}] <= wd;
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[{rd_tid, ra1}];
  assign rd2 = (ra2 == '0) ? '0 : regs[{rd_tid, ra2}];
endmodule
