// Prototyping system: the multithreaded emulation engine with its memories,
// hardware queues and thread control.
//
// Tasks of a task/queue model run as software on the four threads of
// mte_core. Thread 0 runs the kernel (scheduling, dispatch, communication);
// threads 1-3 run computation tasks. Three hardware queues connect tasks:
//   queue 0 (input)  : filled from the in_* port (e.g. an RGB stream),
//                      popped by the engine
//   queue 1 (output) : pushed by the engine, drained on the out_* port
//   queue 2 (local)  : pushed and popped by the engine, a task-to-task queue
// and a block of thread-control registers lets the kernel stop a
// computation thread, point it at a task and start it again.
// Memory map seen by load/store (word registers, byte offsets):
//   0x0000_0000 ..           data memory (DMEM_WORDS words)
//   0x8000_0000 + 0x10*q     queue q data:   load pops the head (0 if empty),
//                                           store pushes (dropped if full)
//   0x8000_0004 + 0x10*q     queue q status: bit0 not-empty, bit1 full,
//                                           bits 15:8 fill level
//   0x8000_0040              thread enable mask, bits 3:0 (bit 0 stays 1)
//   0x8000_0050 + 4*t        write: set thread t's PC (thread must be stopped)
// Instructions come from a separate instruction memory that the host loads
// through prog_* while rst is high. Register reads on this map return in WB,
// like data memory. The engine and the idea of replacing software queues by
// hardware queues follow the description; the memory map, queue depths,
// memory sizes and the thread-control registers are this design's choices.
// Ports are plain signals.
module mte_system
  import mte_pkg::*;
#(
  parameter int unsigned IMEM_WORDS  = 4096,
  parameter int unsigned DMEM_WORDS  = 16384,
  parameter int unsigned QUEUE_DEPTH = 16,
  parameter word_t       BOOT_PC       = 32'h0000_0000,
  parameter word_t       THREAD_STRIDE = 32'h0000_0400,
  parameter word_t       IRQ_VECTOR    = 32'h0000_0180
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                irq,
  // program download
  input  logic                prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  word_t               prog_wdata,
  // input stream -> queue 0
  input  logic                in_valid,
  input  word_t               in_data,
  output logic                in_ready,
  // queue 1 -> output stream
  output logic                out_valid,
  output word_t               out_data,
  input  logic                out_ready,
  // observation
  output logic                wb_valid,
  output tid_t                wb_tid,
  output word_t               wb_pc,
  output logic                irq_taken,
  output logic                branch_taken,
  output logic [NTHREADS-1:0] thread_en
);
  localparam int unsigned NQ = 3;
  localparam int unsigned CW = $clog2(QUEUE_DEPTH) + 1;

  // ---- core ----
  word_t imem_addr, imem_rdata;
  logic  d_req, d_we;
  logic [3:0] d_be;
  word_t d_addr, d_wdata, d_rdata;
  logic  ks_valid;
  tid_t  ks_tid;
  word_t ks_pc;

  mte_core #(.BOOT_PC(BOOT_PC), .THREAD_STRIDE(THREAD_STRIDE), .IRQ_VECTOR(IRQ_VECTOR)) u_core (
    .clk, .rst, .irq, .thread_en,
    .ks_valid, .ks_tid, .ks_pc,
    .imem_addr, .imem_rdata,
    .d_req, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata,
    .wb_valid, .wb_tid, .wb_pc, .irq_taken, .branch_taken
  );

  mte_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(imem_addr[$clog2(IMEM_WORDS)+1:2]), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata)
  );

  // ---- address decode (MEM stage) ----
  logic io_sel, dm_sel;
  assign io_sel = d_req && d_addr[31];
  assign dm_sel = d_req && !d_addr[31];

  word_t dm_rdata;
  mte_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en(dm_sel), .we(d_we), .be(d_be),
    .addr(d_addr[$clog2(DMEM_WORDS)+1:2]), .wdata(d_wdata), .rdata(dm_rdata)
  );

  // ---- queues ----
  logic          q_push [NQ];
  logic          q_pop  [NQ];
  word_t         q_din  [NQ];
  word_t         q_dout [NQ];
  logic          q_full [NQ];
  logic          q_empty[NQ];
  logic [CW-1:0] q_count[NQ];

  logic [1:0] io_word;      // register index within a queue's 16-byte block
  logic [1:0] io_q;         // queue number for queue registers
  assign io_word = d_addr[3:2];
  assign io_q    = d_addr[5:4];

  logic eng_q_data;         // engine access to a queue data register
  assign eng_q_data = io_sel && (d_addr[7:6] == 2'b00) && (d_addr[3:2] == 2'b00);

  for (genvar q = 0; q < NQ; q++) begin : g_q
    mte_hw_queue #(.WIDTH(32), .DEPTH(QUEUE_DEPTH)) u_q (
      .clk, .rst,
      .push(q_push[q]), .din(q_din[q]), .full(q_full[q]),
      .pop(q_pop[q]), .dout(q_dout[q]), .empty(q_empty[q]), .count(q_count[q])
    );
  end

  // queue 0: external push, engine pop
  assign q_push[0] = in_valid;
  assign q_din[0]  = in_data;
  assign in_ready  = !q_full[0];
  assign q_pop[0]  = eng_q_data && !d_we && io_q == 2'd0;
  // queue 1: engine push, external pop
  assign q_push[1] = eng_q_data && d_we && io_q == 2'd1;
  assign q_din[1]  = d_wdata;
  assign q_pop[1]  = out_ready;
  assign out_valid = !q_empty[1];
  assign out_data  = q_dout[1];
  // queue 2: engine push and pop
  assign q_push[2] = eng_q_data && d_we && io_q == 2'd2;
  assign q_din[2]  = d_wdata;
  assign q_pop[2]  = eng_q_data && !d_we && io_q == 2'd2;

  // ---- thread control ----
  logic [NTHREADS-1:0] ten_q;
  assign thread_en = ten_q;
  always_ff @(posedge clk) begin
    if (rst) ten_q <= '1;
    else if (io_sel && d_we && d_addr[7:0] == 8'h40) ten_q <= d_wdata[NTHREADS-1:0] | 4'b0001;
  end
  assign ks_valid = io_sel && d_we && d_addr[7:4] == 4'h5;
  assign ks_tid   = tid_t'(d_addr[3:2]);
  assign ks_pc    = d_wdata;

  // ---- I/O read data, returned in WB ----
  word_t io_rdata_q;
  logic  rd_io_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_io_q    <= 1'b0;
      io_rdata_q <= '0;
    end else begin
      rd_io_q <= io_sel;
      if (io_sel) begin
        io_rdata_q <= '0;
        if (d_addr[7:6] == 2'b00 && io_q != 2'd3) begin
          if (io_word == 2'b00)
            io_rdata_q <= q_empty[io_q] ? '0 : q_dout[io_q];
          else if (io_word == 2'b01)
            io_rdata_q <= {16'h0, 8'(q_count[io_q]), 6'h0, q_full[io_q], !q_empty[io_q]};
        end else if (d_addr[7:0] == 8'h40) begin
          io_rdata_q <= {28'h0, ten_q};
        end
      end
    end
  end

  assign d_rdata = rd_io_q ? io_rdata_q : dm_rdata;
endmodule
