// Instruction decoder of the multithreaded emulation engine (ID stage).
//
// Turns one 32-bit MIPS instruction into the control word ctrl_t of mte_pkg
// and the 32-bit immediate. Purely combinational; it sits between the
// instruction memory output and the ID/EX pipeline register.
// The engine is described as MIPS-compatible; the supported subset is the
// MIPS-I integer instructions without divide (ALU, shifts, immediates,
// loads/stores of byte/half/word, branches incl. BLTZAL/BGEZAL, J/JAL/JR/JALR,
// MULT/MULTU/MFHI/MFLO/MTHI/MTLO) plus MFC0/MTC0/ERET for the system thread.
// ADD/ADDI/SUB behave as ADDU/ADDIU/SUBU (no overflow trap), and an
// unsupported instruction decodes as a no-operation: both are this design's
// choices. `illegal` flags such instructions for observation.
module mte_decoder
  import mte_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl,
  output word_t imm,
  output logic  illegal
);
  logic [5:0] op, fn;
  logic [4:0] rs, rt, rd;

  always_comb begin
    op = instr[31:26];
    rs = instr[25:21];
    rt = instr[20:16];
    rd = instr[15:11];
    fn = instr[5:0];
    ctrl    = CTRL_NOP;
    illegal = 1'b0;

    unique case (op)
      OP_SPECIAL: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rd;
        unique case (fn)
          FN_SLL:   ctrl.alu_op = ALU_SLL;
          FN_SRL:   ctrl.alu_op = ALU_SRL;
          FN_SRA:   ctrl.alu_op = ALU_SRA;
          FN_SLLV:  begin ctrl.alu_op = ALU_SLL; ctrl.shamt_var = 1'b1; end
          FN_SRLV:  begin ctrl.alu_op = ALU_SRL; ctrl.shamt_var = 1'b1; end
          FN_SRAV:  begin ctrl.alu_op = ALU_SRA; ctrl.shamt_var = 1'b1; end
          FN_JR:    begin ctrl.br_op = BR_JR; ctrl.reg_write = 1'b0; end
          FN_JALR:  begin ctrl.br_op = BR_JR; ctrl.wb_sel = WB_LINK; end
          FN_MFHI:  ctrl.wb_sel = WB_HI;
          FN_MFLO:  ctrl.wb_sel = WB_LO;
          FN_MTHI:  begin ctrl.md_op = MD_MTHI;  ctrl.reg_write = 1'b0; end
          FN_MTLO:  begin ctrl.md_op = MD_MTLO;  ctrl.reg_write = 1'b0; end
          FN_MULT:  begin ctrl.md_op = MD_MULT;  ctrl.reg_write = 1'b0; end
          FN_MULTU: begin ctrl.md_op = MD_MULTU; ctrl.reg_write = 1'b0; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:   ctrl.alu_op = ALU_AND;
          FN_OR:    ctrl.alu_op = ALU_OR;
          FN_XOR:   ctrl.alu_op = ALU_XOR;
          FN_NOR:   ctrl.alu_op = ALU_NOR;
          FN_SLT:   ctrl.alu_op = ALU_SLT;
          FN_SLTU:  ctrl.alu_op = ALU_SLTU;
          default:  begin ctrl = CTRL_NOP; illegal = 1'b1; end
        endcase
      end
      OP_REGIMM: begin
        unique case (rt)
          5'h00: ctrl.br_op = BR_LTZ;
          5'h01: ctrl.br_op = BR_GEZ;
          5'h10: begin ctrl.br_op = BR_LTZ; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.wb_sel = WB_LINK; end
          5'h11: begin ctrl.br_op = BR_GEZ; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.wb_sel = WB_LINK; end
          default: illegal = 1'b1;
        endcase
      end
      OP_J:    ctrl.br_op = BR_J;
      OP_JAL:  begin ctrl.br_op = BR_J; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.wb_sel = WB_LINK; end
      OP_BEQ:  ctrl.br_op = BR_EQ;
      OP_BNE:  ctrl.br_op = BR_NE;
      OP_BLEZ: ctrl.br_op = BR_LEZ;
      OP_BGTZ: ctrl.br_op = BR_GTZ;
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rt;
        ctrl.b_is_imm  = 1'b1;
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; ctrl.imm_kind = IMM_ZERO; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  ctrl.imm_kind = IMM_ZERO; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; ctrl.imm_kind = IMM_ZERO; end
          OP_LUI:   ctrl.alu_op = ALU_LUI;
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.reg_write    = 1'b1;
        ctrl.dest         = rt;
        ctrl.b_is_imm     = 1'b1;
        ctrl.mem_read     = 1'b1;
        ctrl.wb_sel       = WB_MEM;
        ctrl.mem_size     = (op == OP_LW) ? MEM_W : ((op == OP_LH || op == OP_LHU) ? MEM_H : MEM_B);
        ctrl.mem_unsigned = (op == OP_LBU || op == OP_LHU);
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.b_is_imm  = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.mem_size  = (op == OP_SW) ? MEM_W : ((op == OP_SH) ? MEM_H : MEM_B);
      end
      OP_COP0: begin
        ctrl.cp0_reg = rd;
        if (rs == C0_MF) begin
          ctrl.reg_write = 1'b1; ctrl.dest = rt; ctrl.wb_sel = WB_CP0;
        end else if (rs == C0_MT) begin
          ctrl.cp0_write = 1'b1;
        end else if (rs == 5'h10 && fn == FN_ERET) begin
          ctrl.eret = 1'b1;
        end else begin
          illegal = 1'b1;
        end
      end
      default: illegal = 1'b1;
    endcase

    // Immediate: sign- or zero-extended 16-bit field; LUI places it high
    // inside the ALU. Jumps use instr[25:0] directly in the branch unit.
    imm = (ctrl.imm_kind == IMM_ZERO) ? {16'h0, instr[15:0]}
                                      : {{16{instr[15]}}, instr[15:0]};
  end
endmodule
