// Multithreaded emulation engine: 4-thread interleaved MIPS-compatible core.
//
// A classical 5-stage pipeline (IF, ID, EX, MEM, WB) shared by four hardware
// threads that issue in fixed rotation 0,1,2,3,0,... One instruction enters
// per cycle, so the five stages always hold instructions of different threads
// (the thread in IF is the same as the one in WB, one round later). Hence
// there is no forwarding and no interlock: a result written in WB is in the
// register file before the same thread's next instruction reads it in ID, and
// a branch or jump resolved in EX rewrites the thread's next-PC before its
// next fetch, so branches cost nothing extra. Each thread keeps its own PC
// pair and register set; HI/LO are per thread as well.
// Thread 0 is the system thread and alone takes interrupts (mte_cp0);
// threads 1-3 are computation threads with deterministic timing: one
// instruction every four cycles, whatever irq does.
//
// Stage timing for an instruction fetched in cycle c:
//   c   IF  instruction memory address = thread PC (synchronous read)
//   c+1 ID  decode, register read
//   c+2 EX  ALU, branch resolution, interrupt decision, MULT operands latched
//   c+3 MEM data access on the d_* bus, multiply product formed
//   c+4 WB  load alignment, register write; d_rdata is sampled here
// Memory interfaces: imem_addr (byte address) with imem_rdata one cycle
// later; d_req/d_we/d_be/d_addr/d_wdata in MEM with d_rdata one cycle later.
// The pipeline organisation, the thread rotation, the removal of forwarding
// and interlocks and the interrupt restriction follow the description; the
// instruction subset, the delay slot, the memory interfaces and the
// per-thread run enables are this design's choices.
module mte_core
  import mte_pkg::*;
#(
  parameter word_t BOOT_PC       = 32'h0000_0000,
  parameter word_t THREAD_STRIDE = 32'h0000_0400,
  parameter word_t IRQ_VECTOR    = 32'h0000_0180
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                irq,
  input  logic [NTHREADS-1:0] thread_en,
  // kernel dispatch: set a thread's PC
  input  logic                ks_valid,
  input  tid_t                ks_tid,
  input  word_t               ks_pc,
  // instruction memory
  output word_t               imem_addr,
  input  word_t               imem_rdata,
  // data bus (MEM stage request, WB stage read data)
  output logic                d_req,
  output logic                d_we,
  output logic [3:0]          d_be,
  output word_t               d_addr,
  output word_t               d_wdata,
  input  word_t               d_rdata,
  // retirement trace (WB) and events, for observation
  output logic                wb_valid,
  output tid_t                wb_tid,
  output word_t               wb_pc,
  output logic                irq_taken,
  output logic                branch_taken
);
  // ---------------- IF ----------------
  tid_t  f_tid;
  word_t f_pc;
  logic  f_valid;

  // EX-stage redirect signals (declared early, used by the thread unit)
  logic  ex_set_npc, ex_set_pc;
  word_t ex_target;

  // pipeline registers
  logic  d_v;   tid_t d_tid;  word_t d_pc;                        // IF/ID
  logic  e_v;   tid_t e_tid;  word_t e_pc;  ctrl_t e_ctrl;        // ID/EX
  word_t e_rs, e_rt, e_imm;   logic [4:0] e_shamt; logic [25:0] e_jidx;
  logic  m_v;   tid_t m_tid;  word_t m_pc;  ctrl_t m_ctrl;        // EX/MEM
  word_t m_res, m_rt;
  logic  w_v;   tid_t w_tid;  word_t w_pc;  ctrl_t w_ctrl;        // MEM/WB
  word_t w_res; logic [1:0] w_off;

  mte_thread_ctrl #(.BOOT_PC(BOOT_PC), .THREAD_STRIDE(THREAD_STRIDE)) u_thr (
    .clk, .rst, .thread_en,
    .fetch_tid(f_tid), .fetch_pc(f_pc), .fetch_valid(f_valid),
    .ex_tid(e_tid), .ex_set_npc, .ex_set_pc, .ex_target,
    .ks_valid, .ks_tid, .ks_pc
  );

  assign imem_addr = f_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_v <= 1'b0; d_tid <= '0; d_pc <= '0;
    end else begin
      d_v <= f_valid; d_tid <= f_tid; d_pc <= f_pc;
    end
  end

  // ---------------- ID ----------------
  ctrl_t id_ctrl;
  word_t id_imm, id_rs, id_rt;
  logic  id_illegal;
  word_t wb_value;
  logic  wb_we;

  mte_decoder u_dec (.instr(imem_rdata), .ctrl(id_ctrl), .imm(id_imm), .illegal(id_illegal));

  mte_regfile u_rf (
    .clk,
    .rd_tid(d_tid), .ra1(imem_rdata[25:21]), .ra2(imem_rdata[20:16]),
    .rd1(id_rs), .rd2(id_rt),
    .we(wb_we), .wr_tid(w_tid), .wa(w_ctrl.dest), .wd(wb_value)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      e_v <= 1'b0; e_tid <= '0; e_pc <= '0; e_ctrl <= CTRL_NOP;
      e_rs <= '0; e_rt <= '0; e_imm <= '0; e_shamt <= '0; e_jidx <= '0;
    end else begin
      e_v     <= d_v;
      e_tid   <= d_tid;
      e_pc    <= d_pc;
      e_ctrl  <= d_v ? id_ctrl : CTRL_NOP;
      e_rs    <= id_rs;
      e_rt    <= id_rt;
      e_imm   <= id_imm;
      e_shamt <= imem_rdata[10:6];
      e_jidx  <= imem_rdata[25:0];
    end
  end

  // ---------------- EX ----------------
  word_t alu_y, br_target, br_link, hi, lo, cp0_rdata, cp0_redirect, ex_res;
  logic  br_taken, take_irq, do_eret, ex_in_ds;
  logic [NTHREADS-1:0] in_ds;   // next instruction of thread t is in a delay slot
  logic  ex_is_branch;

  assign ex_is_branch = (e_ctrl.br_op != BR_NONE);
  assign ex_in_ds     = in_ds[e_tid];

  mte_alu u_alu (
    .op(e_ctrl.alu_op), .a(e_rs), .b(e_ctrl.b_is_imm ? e_imm : e_rt),
    .shamt(e_ctrl.shamt_var ? e_rs[4:0] : e_shamt), .y(alu_y)
  );

  mte_branch_unit u_br (
    .op(e_ctrl.br_op), .pc(e_pc), .rs_val(e_rs), .rt_val(e_rt), .imm(e_imm),
    .jindex(e_jidx), .taken(br_taken), .target(br_target), .link(br_link)
  );

  mte_cp0 #(.VECTOR(IRQ_VECTOR)) u_cp0 (
    .clk, .rst, .irq,
    .ex_valid(e_v), .ex_tid(e_tid), .ex_pc(e_pc), .ex_in_delay_slot(ex_in_ds),
    .ex_mtc0(e_ctrl.cp0_write), .ex_eret(e_ctrl.eret), .ex_reg(e_ctrl.cp0_reg),
    .ex_wdata(e_rt), .ex_rdata(cp0_rdata),
    .take_irq, .do_eret, .redirect_pc(cp0_redirect), .status(), .epc()
  );

  mte_hilo u_hilo (
    .clk, .rst,
    .ex_valid(e_v && !take_irq), .ex_tid(e_tid), .ex_op(e_ctrl.md_op),
    .ex_a(e_rs), .ex_b(e_rt), .rd_tid(e_tid), .hi, .lo, .mem_done()
  );

  assign ex_set_pc  = take_irq || do_eret;
  assign ex_set_npc = e_v && !take_irq && br_taken;
  assign ex_target  = ex_set_pc ? cp0_redirect : br_target;

  always_comb begin
    unique case (e_ctrl.wb_sel)
      WB_LINK: ex_res = br_link;
      WB_HI:   ex_res = hi;
      WB_LO:   ex_res = lo;
      WB_CP0:  ex_res = cp0_rdata;
      default: ex_res = alu_y;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_ds <= '0;
      m_v <= 1'b0; m_tid <= '0; m_pc <= '0; m_ctrl <= CTRL_NOP; m_res <= '0; m_rt <= '0;
    end else begin
      if (e_v) in_ds[e_tid] <= ex_is_branch && !take_irq;
      m_v    <= e_v && !take_irq;
      m_tid  <= e_tid;
      m_pc   <= e_pc;
      m_ctrl <= (e_v && !take_irq) ? e_ctrl : CTRL_NOP;
      m_res  <= ex_res;
      m_rt   <= e_rt;
    end
  end

  assign irq_taken    = take_irq;
  assign branch_taken = ex_set_npc;

  // ---------------- MEM ----------------
  word_t st_wdata, ld_value;
  logic [3:0] st_be;

  mte_lsu u_lsu (
    .st_size(m_ctrl.mem_size), .st_off(m_res[1:0]), .st_data(m_rt),
    .st_wdata, .st_be,
    .ld_size(w_ctrl.mem_size), .ld_unsigned(w_ctrl.mem_unsigned), .ld_off(w_off),
    .ld_rdata(d_rdata), .ld_value
  );

  assign d_req   = m_v && (m_ctrl.mem_read || m_ctrl.mem_write);
  assign d_we    = m_v && m_ctrl.mem_write;
  assign d_be    = st_be;
  assign d_addr  = {m_res[31:2], 2'b00};
  assign d_wdata = st_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_v <= 1'b0; w_tid <= '0; w_pc <= '0; w_ctrl <= CTRL_NOP; w_res <= '0; w_off <= '0;
    end else begin
      w_v <= m_v; w_tid <= m_tid; w_pc <= m_pc; w_ctrl <= m_ctrl;
      w_res <= m_res; w_off <= m_res[1:0];
    end
  end

  // ---------------- WB ----------------
  assign wb_value = (w_ctrl.wb_sel == WB_MEM) ? ld_value : w_res;
  assign wb_we    = w_v && w_ctrl.reg_write;
  assign wb_valid = w_v;
  assign wb_tid   = w_tid;
  assign wb_pc    = w_pc;

`ifndef SYNTHESIS
  // Interleaving guarantees: the stages ID, EX and MEM never hold the same thread.
  a_no_same_thread: assert property (@(posedge clk) disable iff (rst)
    (d_v && e_v) |-> (d_tid != e_tid));
  a_no_same_thread2: assert property (@(posedge clk) disable iff (rst)
    (e_v && m_v) |-> (e_tid != m_tid));
`endif
endmodule
