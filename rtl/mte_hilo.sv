// Multiply unit with per-thread HI/LO registers (EX -> MEM).
//
// MULT/MULTU operands are registered at the end of EX and the 32x32 -> 64-bit
// product is formed during MEM and written to that thread's HI/LO at the end
// of MEM. This uses the freedom the interleaving gives: the same thread's
// next instruction reaches EX only four cycles later, so work started in EX
// may finish in MEM without lengthening the EX stage or needing an interlock.
// MTHI/MTLO write through the same path. MFHI/MFLO read combinationally in
// EX. Splitting EX work into MEM follows the description; applying it to the
// multiplier, and having per-thread HI/LO, are this design's choices. Divide
// is not provided.
module mte_hilo
  import mte_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // EX side: start an operation
  input  logic   ex_valid,
  input  tid_t   ex_tid,
  input  md_op_e ex_op,
  input  word_t  ex_a,
  input  word_t  ex_b,
  // EX side: read
  input  tid_t   rd_tid,
  output word_t  hi,
  output word_t  lo,
  // MEM side: completion pulse (for observation)
  output logic   mem_done
);
  word_t  hi_r [NTHREADS];
  word_t  lo_r [NTHREADS];

  // EX/MEM operand register
  logic   m_valid;
  tid_t   m_tid;
  md_op_e m_op;
  word_t  m_a, m_b;
  logic [63:0] prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_op    <= MD_NONE;
      m_tid   <= '0;
      m_a     <= '0;
      m_b     <= '0;
      for (int t = 0; t < NTHREADS; t++) begin
        hi_r[t] <= '0;
        lo_r[t] <= '0;
      end
    end else begin
      m_valid <= ex_valid && (ex_op != MD_NONE);
      m_op    <= ex_op;
      m_tid   <= ex_tid;
      m_a     <= ex_a;
      m_b     <= ex_b;
      if (m_valid) begin
        unique case (m_op)
          MD_MULT, MD_MULTU: begin hi_r[m_tid] <= prod[63:32]; lo_r[m_tid] <= prod[31:0]; end
          MD_MTHI: hi_r[m_tid] <= m_a;
          MD_MTLO: lo_r[m_tid] <= m_a;
          default: ;
        endcase
      end
    end
  end

  // MEM-stage product
  always_comb begin
    if (m_op == MD_MULT) prod = {{32{m_a[31]}}, m_a} * {{32{m_b[31]}}, m_b};
    else                 prod = {32'h0, m_a} * {32'h0, m_b};
  end

  assign hi       = hi_r[rd_tid];
  assign lo       = lo_r[rd_tid];
  assign mem_done = m_valid;
endmodule
