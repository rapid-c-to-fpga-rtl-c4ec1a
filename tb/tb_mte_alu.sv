// Self-checking testbench for mte_alu: random operands for every operation,
// compared with a reference model written with plain SystemVerilog operators.
module tb_mte_alu;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op; word_t a, b, y, exp_y; logic [4:0] sh;
  mte_alu dut (.op, .a, .b, .shamt(sh), .y);

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z, logic [4:0] s);
    longint sx, sz;
    sx = longint'(signed'(x)); sz = longint'(signed'(z));
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x + ~z + 1;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return ({1'b0, x} < {1'b0, z}) ? 1 : 0;
      ALU_SLL:  return word_t'(64'(z) << s);
      ALU_SRL:  return word_t'(64'(z) >> s);
      ALU_SRA:  return word_t'(sz >>> s);
      ALU_LUI:  return z * 65536;
      default:  return 0;
    endcase
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2400; i++) begin
      op = alu_op_e'(i % 12);
      a = $urandom; b = $urandom; sh = 5'($urandom);
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) a = 32'h8000_0000;
      #1;
      exp_y = ref_alu(op, a, b, sh);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h sh=%0d y=%h exp=%h", op.name(), a, b, sh, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
