// Self-checking testbench for mte_core, the 4-thread interleaved engine.
//
// Four programs run at once, one per thread. Computation threads 1-3 each
// run a counted loop with a branch delay slot, a dependent ALU chain (no
// forwarding exists, so this checks the interleaving), signed multiply with
// HI/LO, byte/half stores and loads, and a JAL/JR subroutine call; results go
// to data memory and are compared with values worked out here. The system
// thread enables interrupts and counts in a loop; irq is raised three times
// and its handler counts them and returns with ERET. Timing checks: one
// instruction retires every cycle in the fixed 0,1,2,3 rotation, and each
// computation thread reaches its final instruction at exactly
// t + 4 + 4*k cycles after reset (k = instructions executed), interrupts or
// not. Finally the kernel port stops thread 2, points it at a new routine and
// restarts it. Instruction and data memories are behavioural models here.
module tb_mte_core;
  import mte_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, irq = 0;
  logic [3:0] ten = 4'hF;
  logic ksv = 0; tid_t kst = 0; word_t ksp = 0;
  word_t imem_addr, imem_rdata, d_addr, d_wdata, d_rdata;
  logic d_req, d_we; logic [3:0] d_be;
  logic wbv, irq_taken, br_taken; tid_t wbt; word_t wbpc;

  word_t imem [4096];
  word_t dmem [4096];

  mte_core dut (.clk, .rst, .irq, .thread_en(ten), .ks_valid(ksv), .ks_tid(kst), .ks_pc(ksp),
    .imem_addr, .imem_rdata, .d_req, .d_we, .d_be, .d_addr, .d_wdata, .d_rdata,
    .wb_valid(wbv), .wb_tid(wbt), .wb_pc(wbpc), .irq_taken, .branch_taken(br_taken));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    imem_rdata <= imem[imem_addr[13:2]];
    if (d_req) begin
      if (d_we) for (int b = 0; b < 4; b++) if (d_be[b]) dmem[d_addr[13:2]][8*b +: 8] <= d_wdata[8*b +: 8];
      d_rdata <= dmem[d_addr[13:2]];
    end
  end

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---- program construction ----
  int pcw;  // word index while placing code
  task automatic put(word_t ins); imem[pcw] = ins; pcw++; endtask

  int idx_done [4];
  int n_iter [4];
  localparam int SUB_OFF = 'h100;  // subroutine offset within a thread's code

  task automatic build_comp(int t);
    int base, d, loop_i;
    base = t * 'h400 / 4; d = 'h2000 + t * 'h100; n_iter[t] = 10 + t;
    pcw = base;
    put(ori(8, 0, d));
    put(addiu(1, 0, 0));
    put(addiu(3, 0, 0));
    put(addiu(2, 0, n_iter[t]));
    loop_i = pcw - base;
    put(addu(1, 1, 2));
    put(addiu(2, 2, -1));
    put(bne(2, 0, loop_i - (pcw - base + 1)));
    put(addiu(3, 3, 1));                 // delay slot
    put(sw(1, 0, 8));
    put(sw(3, 4, 8));
    put(addiu(4, 0, 7 + t));
    put(addu(5, 4, 4));
    put(sll(5, 5, 2));
    put(sw(5, 8, 8));
    put(addiu(6, 0, -3));
    put(lui(7, 'h1234));
    put(ori(7, 7, 'h5678));
    put(mult(6, 7));
    put(mflo(9));
    put(mfhi(10));
    put(sw(9, 12, 8));
    put(sw(10, 16, 8));
    put(sb(7, 20, 8));
    put(sb(6, 21, 8));
    put(sh(7, 22, 8));
    put(lb(11, 21, 8));
    put(lhu(12, 22, 8));
    put(addu(13, 11, 12));
    put(sw(13, 24, 8));
    put(jal(t * 'h400 + SUB_OFF));
    put(addiu(14, 0, 1));                // delay slot
    put(sw(14, 28, 8));
    put(sw(31, 32, 8));
    idx_done[t] = pcw - base;
    put(j(t * 'h400 + idx_done[t] * 4));
    put(nop());
    pcw = base + SUB_OFF / 4;
    put(jr(31));
    put(addiu(14, 14, 100));             // delay slot
    // restart routine for the kernel-port test
    pcw = base + 'h200 / 4;
    put(ori(15, 0, 'hABCD));
    put(sw(15, 36, 8));
    put(j(t * 'h400 + 'h208));
    put(nop());
  endtask

  task automatic build_sys();
    pcw = 0;
    put(ori(20, 0, 'h3000));
    put(addiu(3, 0, 0));
    put(addiu(1, 0, 1));
    put(mtc0(1, 12));                    // Status.IE = 1
    put(addiu(3, 3, 1));                 // loop0 (word 4)
    put(sw(3, 0, 20));
    put(j(4 * 4));
    put(nop());
    pcw = 'h180 / 4;                     // interrupt handler
    put(lw(21, 4, 20));
    put(addiu(21, 21, 1));
    put(sw(21, 4, 20));
    put(mfc0(22, 14));
    put(sw(22, 8, 20));
    put(eret());
  endtask

  // ---- timing observation ----
  int cyc = 0, exp_tid = 0, started = 0;
  int first_done [4];
  int n_irq = 0, n_branch = 0, n_bubble = 0;
  logic rotation_check = 1;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (irq_taken) n_irq++;
    if (br_taken) n_branch++;
    if (rotation_check) begin
      if (wbv) started = 1;
      if (started) begin
        checks++;
        if (wbt != tid_t'(exp_tid)) begin
          failures++; $display("FAIL rotation at cycle %0d: tid=%0d exp %0d", cyc, wbt, exp_tid);
        end
        if (!wbv) n_bubble++;
        exp_tid = (exp_tid + 1) % 4;
      end else if (wbv) exp_tid = (int'(wbt) + 1) % 4;
    end
    for (int t = 1; t < 4; t++)
      if (wbv && wbt == tid_t'(t) && wbpc == word_t'(t * 'h400 + idx_done[t] * 4) && first_done[t] < 0)
        first_done[t] = cyc;
  end

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t e_sum, e_hi, e_lo, dbase; longint p;
    for (int i = 0; i < 4096; i++) begin imem[i] = 0; dmem[i] = 0; end
    for (int t = 0; t < 4; t++) first_done[t] = -1;
    build_sys();
    for (int t = 1; t < 4; t++) build_comp(t);
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    // three interrupts to the system thread, spread over the run
    for (int k = 0; k < 3; k++) begin
      repeat (40) @(negedge clk);
      irq = 1;
      do @(posedge clk); while (!irq_taken);
      @(negedge clk); irq = 0;
    end
    repeat (300) @(negedge clk);
    // ---- results of computation threads ----
    for (int t = 1; t < 4; t++) begin
      dbase = (32'h2000 + t * 'h100) / 4;
      e_sum = 0; for (int i = 1; i <= n_iter[t]; i++) e_sum += i;
      p = longint'(-3) * longint'(32'h12345678);
      chk($sformatf("t%0d loop sum", t), dmem[dbase] == e_sum);
      chk($sformatf("t%0d delay slot count", t), dmem[dbase + 1] == n_iter[t]);
      chk($sformatf("t%0d dependent chain", t), dmem[dbase + 2] == (7 + t) * 8);
      chk($sformatf("t%0d mflo", t), dmem[dbase + 3] == p[31:0]);
      chk($sformatf("t%0d mfhi", t), dmem[dbase + 4] == p[63:32]);
      chk($sformatf("t%0d sb/sh", t), dmem[dbase + 5] == 32'h5678FD78);
      chk($sformatf("t%0d lb+lhu", t), dmem[dbase + 6] == 32'hFFFFFFFD + 32'h5678);
      chk($sformatf("t%0d jal/jr", t), dmem[dbase + 7] == 101);
      chk($sformatf("t%0d link", t), dmem[dbase + 8] == t * 'h400 + (idx_done[t] - 4) * 4 + 8);
      // deterministic timing: k instructions, one every 4 cycles, no stalls
      chk($sformatf("t%0d cycle count %0d", t, first_done[t]),
          first_done[t] == t + 4 + 4 * (idx_done[t] + 4 * n_iter[t] - 2));
    end
    // ---- system thread ----
    chk($sformatf("irq count in handler %0d", dmem['h3004 / 4]), dmem['h3004 / 4] == 3);
    chk($sformatf("irq taken %0d times", n_irq), n_irq == 3);
    chk("EPC inside loop0", dmem['h3008 / 4] >= 32'h10 && dmem['h3008 / 4] <= 32'h1C);
    chk("system loop still running", dmem['h3000 / 4] > 20);
    chk("branches taken", n_branch > 30);
    // ---- kernel dispatch: stop thread 2, give it a new PC, restart ----
    // the only retirement bubbles are the instructions squashed by interrupts
    chk($sformatf("bubbles %0d = interrupts %0d", n_bubble, n_irq), n_bubble == n_irq);
    rotation_check = 0;
    @(negedge clk); ten = 4'b1011;
    repeat (8) @(negedge clk);
    ksv = 1; kst = 2; ksp = 2 * 'h400 + 'h200;
    @(negedge clk); ksv = 0; ten = 4'hF;
    repeat (40) @(negedge clk);
    chk("thread 2 restarted at new PC", dmem[(32'h2000 + 2 * 'h100) / 4 + 9] == 32'hABCD);
    chk("thread 1 untouched", dmem[(32'h2000 + 1 * 'h100) / 4 + 9] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
