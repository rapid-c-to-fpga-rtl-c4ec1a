// Interrupt control of the system thread (coprocessor-0 subset, EX stage).
//
// Only thread 0, the system thread, can be interrupted; the three
// computation threads never see a context switch, whatever irq does, which
// keeps their timing deterministic. Registers, MIPS32 numbering:
//   Status (12): bit0 IE (interrupt enable), bit1 EXL (in handler)
//   Cause  (13): bit10 IP2 (irq level, read-only), ExcCode bits 6:2 = 0
//   EPC    (14): address of the interrupted instruction
// An interrupt is taken on a system-thread instruction in EX when irq=1,
// IE=1, EXL=0 and that instruction is not in a branch delay slot. The
// instruction is squashed, EPC gets its PC, EXL is set and the thread is
// redirected to VECTOR. ERET clears EXL and returns to EPC. MTC0/ERET from
// computation threads are ignored. Restricting interrupts to thread 0 follows
// the description; the register layout, the vector and the delay-slot rule
// are this design's choices, following MIPS32 where possible.
module mte_cp0
  import mte_pkg::*;
#(
  parameter word_t VECTOR = 32'h0000_0180
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     irq,
  // instruction in EX
  input  logic     ex_valid,
  input  tid_t     ex_tid,
  input  word_t    ex_pc,
  input  logic     ex_in_delay_slot,
  input  logic     ex_mtc0,
  input  logic     ex_eret,
  input  reg_idx_t ex_reg,
  input  word_t    ex_wdata,
  output word_t    ex_rdata,
  // outcome
  output logic     take_irq,     // squash the EX instruction, go to VECTOR
  output logic     do_eret,      // go to EPC
  output word_t    redirect_pc,
  output word_t    status,
  output word_t    epc
);
  logic  ie, exl;
  word_t epc_r;
  logic  sys;

  assign sys      = ex_valid && (ex_tid == SYSTEM_TID);
  assign take_irq = sys && irq && ie && !exl && !ex_in_delay_slot;
  assign do_eret  = sys && ex_eret && !take_irq;
  assign redirect_pc = take_irq ? VECTOR : epc_r;
  assign status   = {30'h0, exl, ie};
  assign epc      = epc_r;

  always_comb begin
    unique case (ex_reg)
      CP0_STATUS: ex_rdata = {30'h0, exl, ie};
      CP0_CAUSE:  ex_rdata = {21'h0, irq, 10'h0};
      CP0_EPC:    ex_rdata = epc_r;
      default:    ex_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ie    <= 1'b0;
      exl   <= 1'b0;
      epc_r <= '0;
    end else if (take_irq) begin
      epc_r <= ex_pc;
      exl   <= 1'b1;
    end else if (do_eret) begin
      exl   <= 1'b0;
    end else if (sys && ex_mtc0) begin
      unique case (ex_reg)
        CP0_STATUS: begin ie <= ex_wdata[0]; exl <= ex_wdata[1]; end
        CP0_EPC:    epc_r <= ex_wdata;
        default: ;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_only_system_thread: assert property (@(posedge clk) disable iff (rst)
    take_irq |-> ex_tid == SYSTEM_TID);
`endif
endmodule
