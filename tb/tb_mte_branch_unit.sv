// Self-checking testbench for mte_branch_unit: random register values and
// offsets for every branch kind; the taken flag, target and link address are
// compared with values computed here from the MIPS definitions.
module tb_mte_branch_unit;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  br_op_e op; word_t pc, rs, rt, imm, target, link; logic [25:0] ji; logic taken;
  logic e_taken; word_t e_target;
  mte_branch_unit dut (.op, .pc, .rs_val(rs), .rt_val(rt), .imm, .jindex(ji), .taken, .target, .link);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1800; i++) begin
      op = br_op_e'(i % 9);
      pc = $urandom & ~32'h3; rs = $urandom; rt = (i % 3 == 0) ? rs : $urandom;
      if (i % 5 == 0) rs = 0;
      imm = {{16{1'b0}}, 16'($urandom)}; imm = {{16{imm[15]}}, imm[15:0]};
      ji = 26'($urandom);
      #1;
      case (op)
        BR_EQ:  e_taken = rs == rt;
        BR_NE:  e_taken = rs != rt;
        BR_LEZ: e_taken = int'(rs) <= 0;
        BR_GTZ: e_taken = int'(rs) > 0;
        BR_LTZ: e_taken = int'(rs) < 0;
        BR_GEZ: e_taken = int'(rs) >= 0;
        BR_NONE: e_taken = 0;
        default: e_taken = 1;
      endcase
      if (op == BR_J)       e_target = ((pc + 4) & 32'hF000_0000) | (word_t'(ji) * 4);
      else if (op == BR_JR) e_target = rs;
      else                  e_target = pc + 4 + imm * 4;
      checks++;
      if (taken !== e_taken || (op != BR_NONE && target !== e_target) || link !== pc + 8) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s rs=%h rt=%h taken=%b/%b target=%h/%h", op.name(), rs, rt, taken, e_taken, target, e_target);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
