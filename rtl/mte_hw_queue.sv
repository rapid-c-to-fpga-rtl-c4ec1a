// Hardware queue: a synchronous FIFO between two tasks.
//
// When a design moves from the untimed task/queue model to the bus
// functional model, the software FIFO queues between tasks become hardware
// queues; this is that queue. DEPTH x WIDTH storage with a circular buffer,
// valid/ready on both sides: a word is written when push && !full and read
// when pop && !empty; pushing and popping in one cycle is allowed when the
// queue is neither empty nor full. dout shows the head word whenever
// !empty (first-word fall-through). count gives the fill level. The queue
// itself follows the description; depth, width and handshake are this
// design's choices.
module mte_hw_queue #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   push,
  input  logic [WIDTH-1:0]       din,
  output logic                   full,
  input  logic                   pop,
  output logic [WIDTH-1:0]       dout,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign full    = (count == DEPTH[AW:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = buf_q[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        buf_q[wr_ptr] <= din;
        wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

`ifndef SYNTHESIS
  a_count_in_range: assert property (@(posedge clk) disable iff (rst) count <= DEPTH[AW:0]);
`endif
endmodule
