// Branch and jump resolution of the multithreaded emulation engine (EX stage).
//
// Combinational. Compares rs/rt for the six MIPS conditional branches and
// forms the target: pc+4+(imm<<2) for branches, {pc+4[31:28], index, 2'b00}
// for J/JAL, rs for JR/JALR. `taken` is 1 when control moves to `target`.
// Because the four threads are interleaved, a thread's next instruction is
// fetched four cycles after the current one, so resolving the branch here, in
// EX, needs neither prediction nor flush: it only rewrites the thread's
// next-PC register. `link` is the MIPS return address pc+8 (past the delay
// slot), which this design keeps for compatibility.
module mte_branch_unit
  import mte_pkg::*;
(
  input  br_op_e      op,
  input  word_t       pc,
  input  word_t       rs_val,
  input  word_t       rt_val,
  input  word_t       imm,
  input  logic [25:0] jindex,
  output logic        taken,
  output word_t       target,
  output word_t       link
);
  word_t pc4;
  always_comb begin
    pc4  = pc + 32'd4;
    link = pc + 32'd8;
    unique case (op)
      BR_EQ:   taken = (rs_val == rt_val);
      BR_NE:   taken = (rs_val != rt_val);
      BR_LEZ:  taken = ($signed(rs_val) <= 0);
      BR_GTZ:  taken = ($signed(rs_val) > 0);
      BR_LTZ:  taken = rs_val[31];
      BR_GEZ:  taken = !rs_val[31];
      BR_J:    taken = 1'b1;
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
    unique case (op)
      BR_J:    target = {pc4[31:28], jindex, 2'b00};
      BR_JR:   target = rs_val;
      default: target = pc4 + {imm[29:0], 2'b00};
    endcase
  end
endmodule
