// 32-bit integer ALU of the multithreaded emulation engine (EX stage).
//
// Combinational: add, subtract, the four logic operations, signed and
// unsigned set-less-than, the three shifts and load-upper-immediate, chosen
// by alu_op (mte_pkg::alu_op_e). The description names a single 32-bit ALU
// as the functional unit; the operation set is the one the MIPS-compatible
// instruction subset of this design needs.
module mte_alu
  import mte_pkg::*;
(
  input  alu_op_e    op,
  input  word_t      a,
  input  word_t      b,
  input  logic [4:0] shamt,
  output word_t      y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = word_t'($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'h0};
      default:  y = '0;
    endcase
  end
endmodule
