// Multi-core emulation engine: NCORES prototyping systems chained by
// hardware queues.
//
// In the untimed task/queue stage all tasks share one multithreaded engine
// (NCORES = 1, the default). After hardware/software partitioning, tasks move
// to processors of their own and the data between them flows through
// hardware queues: here, engine i's output queue (its queue 1) drives engine
// i+1's input queue (its queue 0) with a valid/ready handshake, so the chain
// forms a task pipeline. The ends of the chain are the in_* and out_* ports,
// where hardware blocks that replace the first or last task can be attached.
// Each engine has its own instruction/data memory, thread controls and
// interrupt line; programs are downloaded one engine at a time with
// prog_core selecting the target. A word moves between two engines in one
// cycle when the upstream output queue is not empty and the downstream input
// queue is not full.
// The multi-core stage and the hardware queues between processors follow
// the description; using copies of the multithreaded engine as the
// processors, the linear chain and the port layout are this design's
// choices.
module mte_multicore
  import mte_pkg::*;
#(
  parameter int unsigned NCORES      = 1,
  parameter int unsigned IMEM_WORDS  = 4096,
  parameter int unsigned DMEM_WORDS  = 16384,
  parameter int unsigned QUEUE_DEPTH = 16
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [NCORES-1:0]                   irq,
  // program download
  input  logic [$clog2(NCORES+1)-1:0]         prog_core,
  input  logic                                prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0]       prog_addr,
  input  word_t                               prog_wdata,
  // chain input and output streams
  input  logic                                in_valid,
  input  word_t                               in_data,
  output logic                                in_ready,
  output logic                                out_valid,
  output word_t                               out_data,
  input  logic                                out_ready,
  // observation, per engine
  output logic [NCORES-1:0]                   wb_valid,
  output tid_t                                wb_tid    [NCORES],
  output word_t                               wb_pc     [NCORES],
  output logic [NCORES-1:0]                   irq_taken,
  output logic [NCORES-1:0]                   branch_taken,
  output logic [NCORES-1:0][NTHREADS-1:0]     thread_en
);
  // link k connects engine k-1 (or the in_* port) to engine k (or out_*)
  logic  l_valid [NCORES+1];
  word_t l_data  [NCORES+1];
  logic  l_ready [NCORES+1];

  assign l_valid[0] = in_valid;
  assign l_data[0]  = in_data;
  assign in_ready   = l_ready[0];
  assign out_valid  = l_valid[NCORES];
  assign out_data   = l_data[NCORES];
  assign l_ready[NCORES] = out_ready;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    mte_system #(
      .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .QUEUE_DEPTH(QUEUE_DEPTH)
    ) u_sys (
      .clk, .rst, .irq(irq[c]),
      .prog_we(prog_we && prog_core == ($clog2(NCORES+1))'(c)), .prog_addr, .prog_wdata,
      .in_valid(l_valid[c]), .in_data(l_data[c]), .in_ready(l_ready[c]),
      .out_valid(l_valid[c+1]), .out_data(l_data[c+1]), .out_ready(l_ready[c+1]),
      .wb_valid(wb_valid[c]), .wb_tid(wb_tid[c]), .wb_pc(wb_pc[c]),
      .irq_taken(irq_taken[c]), .branch_taken(branch_taken[c]), .thread_en(thread_en[c])
    );
  end
endmodule
