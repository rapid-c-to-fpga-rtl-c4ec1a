// Self-checking testbench for mte_hilo: issues MULT, MULTU, MTHI and MTLO
// for rotating threads one per cycle, as the pipeline does, and checks each
// thread's HI/LO when it is read back, against 64-bit products computed
// here. The result must be visible two cycles after issue (end of MEM).
module tb_mte_hilo;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic v; tid_t tid, rtid; md_op_e op; word_t a, b, hi, lo; logic done;
  word_t m_hi[4], m_lo[4];
  longint p;
  mte_hilo dut (.clk, .rst, .ex_valid(v), .ex_tid(tid), .ex_op(op), .ex_a(a), .ex_b(b),
                .rd_tid(rtid), .hi, .lo, .mem_done(done));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    v = 0; tid = 0; op = MD_NONE; a = 0; b = 0; rtid = 0;
    for (int t = 0; t < 4; t++) begin m_hi[t] = 0; m_lo[t] = 0; end
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 4000; i++) begin
      tid = tid_t'(i);
      // read: thread tid's earlier op (issued 4 cycles ago) must be complete
      rtid = tid; #1;
      checks++;
      if (hi !== m_hi[tid] || lo !== m_lo[tid]) begin
        failures++; $display("FAIL t%0d hi=%h lo=%h exp %h %h", tid, hi, lo, m_hi[tid], m_lo[tid]);
      end
      v = 1; op = md_op_e'($urandom_range(0, 4)); a = $urandom; b = $urandom;
      if (i % 9 == 0) a = 32'hFFFF_FFFF;
      case (op)
        MD_MULT:  begin p = longint'(signed'(a)) * longint'(signed'(b)); m_hi[tid] = p[63:32]; m_lo[tid] = p[31:0]; end
        MD_MULTU: begin p = longint'({32'h0, a}) * longint'({32'h0, b}); m_hi[tid] = p[63:32]; m_lo[tid] = p[31:0]; end
        MD_MTHI:  m_hi[tid] = a;
        MD_MTLO:  m_lo[tid] = a;
        default: ;
      endcase
      @(negedge clk);
    end
    // latency: one op, complete after exactly two clock edges
    tid = 0; op = MD_MULTU; a = 3; b = 5; v = 1;
    @(negedge clk); v = 0; op = MD_NONE; rtid = 0; #1;
    checks++; if (lo === 32'd15) begin failures++; $display("FAIL product visible after one cycle"); end
    @(negedge clk); #1;
    checks++; if (lo !== 32'd15 || hi !== 0) begin failures++; $display("FAIL product not visible after two cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
