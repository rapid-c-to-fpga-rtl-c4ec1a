// Self-checking testbench for mte_decoder: encodes one instruction of each
// supported kind with random register fields and checks the decoded control
// word (operation, destination, memory size, write-back source) against the
// MIPS meaning of that instruction.
module tb_mte_decoder;
  import mte_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  word_t instr, imm; ctrl_t c; logic ill;
  mte_decoder dut (.instr, .ctrl(c), .imm, .illegal(ill));

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int rs, rt, rd, im;
    for (int i = 0; i < 40; i++) begin
      rs = $urandom_range(1, 31); rt = $urandom_range(1, 31); rd = $urandom_range(1, 31);
      im = $urandom_range(0, 65535);
      instr = addu(rd, rs, rt); #1;
      chk("addu", c.alu_op == ALU_ADD && c.reg_write && c.dest == 5'(rd) && !c.b_is_imm && c.wb_sel == WB_ALU && c.br_op == BR_NONE && !ill);
      instr = subu(rd, rs, rt); #1; chk("subu", c.alu_op == ALU_SUB && c.dest == 5'(rd));
      instr = nor_(rd, rs, rt); #1; chk("nor", c.alu_op == ALU_NOR);
      instr = sltu(rd, rs, rt); #1; chk("sltu", c.alu_op == ALU_SLTU);
      instr = sra(rd, rt, 7);   #1; chk("sra", c.alu_op == ALU_SRA && !c.shamt_var && c.dest == 5'(rd));
      instr = sllv(rd, rt, rs); #1; chk("sllv", c.alu_op == ALU_SLL && c.shamt_var);
      instr = addiu(rt, rs, im); #1;
      chk("addiu", c.alu_op == ALU_ADD && c.b_is_imm && c.dest == 5'(rt) && imm == {{16{im[15]}}, 16'(im)});
      instr = ori(rt, rs, im); #1;
      chk("ori", c.alu_op == ALU_OR && c.b_is_imm && imm == {16'h0, 16'(im)});
      instr = lui(rt, im); #1; chk("lui", c.alu_op == ALU_LUI && c.dest == 5'(rt));
      instr = lw(rt, im, rs); #1;
      chk("lw", c.mem_read && !c.mem_write && c.mem_size == MEM_W && c.wb_sel == WB_MEM && c.dest == 5'(rt));
      instr = lbu(rt, im, rs); #1; chk("lbu", c.mem_read && c.mem_size == MEM_B && c.mem_unsigned);
      instr = lh(rt, im, rs); #1; chk("lh", c.mem_read && c.mem_size == MEM_H && !c.mem_unsigned);
      instr = sb(rt, im, rs); #1; chk("sb", c.mem_write && !c.reg_write && c.mem_size == MEM_B);
      instr = sw(rt, im, rs); #1; chk("sw", c.mem_write && !c.reg_write && c.mem_size == MEM_W);
      instr = beq(rs, rt, im); #1; chk("beq", c.br_op == BR_EQ && !c.reg_write);
      instr = bne(rs, rt, im); #1; chk("bne", c.br_op == BR_NE);
      instr = bgezal(rs, im); #1; chk("bgezal", c.br_op == BR_GEZ && c.reg_write && c.dest == 5'd31 && c.wb_sel == WB_LINK);
      instr = jal(im * 4); #1; chk("jal", c.br_op == BR_J && c.dest == 5'd31 && c.wb_sel == WB_LINK);
      instr = jr(rs); #1; chk("jr", c.br_op == BR_JR && !c.reg_write);
      instr = jalr(rd, rs); #1; chk("jalr", c.br_op == BR_JR && c.reg_write && c.dest == 5'(rd));
      instr = mult(rs, rt); #1; chk("mult", c.md_op == MD_MULT && !c.reg_write);
      instr = multu(rs, rt); #1; chk("multu", c.md_op == MD_MULTU);
      instr = mfhi(rd); #1; chk("mfhi", c.wb_sel == WB_HI && c.reg_write && c.dest == 5'(rd));
      instr = mflo(rd); #1; chk("mflo", c.wb_sel == WB_LO);
      instr = mfc0(rt, 14); #1; chk("mfc0", c.wb_sel == WB_CP0 && c.dest == 5'(rt) && c.cp0_reg == 5'd14);
      instr = mtc0(rt, 12); #1; chk("mtc0", c.cp0_write && !c.reg_write && c.cp0_reg == 5'd12);
      instr = eret(); #1; chk("eret", c.eret && !c.reg_write);
      instr = {6'h3F, 26'($urandom)}; #1; chk("illegal", ill && !c.reg_write && !c.mem_write && c.br_op == BR_NONE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
