// End-to-end testbench of mte_system at its default parameters.
//
// Runs a slice of the JPEG task/queue model on the engine:
//   input stream -> queue 0 -> [thread 1: colour space transformation,
//   RGB -> YCbCr with the usual 8-bit fixed-point JPEG coefficients, using the
//   multiplier] -> queue 2 -> [thread 3: level shift of each component by
//   128, the step ahead of the DCT] -> queue 1 -> output stream.
// Thread 0 acts as the kernel: it stops thread 3, points it at its task
// through the thread-control registers and restarts it, then enables
// interrupts and idles; its interrupt handler counts interrupts. Thread 2
// computes a sum on its own. The testbench streams random pixels in,
// drains the output with long stalls, and compares every output word with a
// reference computed here. It counts each mechanism (interleaved rotation,
// taken branches, multiplies finishing in MEM, interrupts, queue full and
// empty on all queues, kernel dispatch, stopped-thread bubbles) and fails
// any that never happened.
module tb_mte_system;
  import mte_pkg::*;
  import jpeg_slice_pkg::*;
  int checks = 0, failures = 0;
  localparam int NPIX = 64;

  logic clk = 0, rst = 1, irq = 0;
  logic prog_we = 0; logic [11:0] prog_addr = 0; word_t prog_wdata = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  word_t in_data = 0, out_data;
  logic wbv, irq_taken, br_taken; tid_t wbt; word_t wbpc; logic [3:0] ten;

  mte_system dut (.clk, .rst, .irq, .prog_we, .prog_addr, .prog_wdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .wb_valid(wbv), .wb_tid(wbt), .wb_pc(wbpc), .irq_taken, .branch_taken(br_taken),
    .thread_en(ten));

  always #5 clk = ~clk;

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---------------- mechanism counters ----------------
  int cyc = 0, exp_tid = 0;
  int n_rot_err = 0, n_branch = 0, n_mul = 0, n_irq = 0, n_ks = 0, n_bubble_off = 0;
  int n_q_full [3], n_q_empty_poll [3];
  logic rot_on = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (br_taken) n_branch++;
    if (irq_taken) n_irq++;
    if (dut.u_core.u_hilo.m_valid && (dut.u_core.u_hilo.m_op == MD_MULT)) n_mul++;
    if (dut.ks_valid) n_ks++;
    if (ten != 4'hF) n_bubble_off++;
    if (dut.g_q[0].u_q.full) n_q_full[0]++;
    if (dut.g_q[1].u_q.full) n_q_full[1]++;
    if (dut.g_q[2].u_q.full) n_q_full[2]++;
    if (dut.io_sel && !dut.d_we && dut.d_addr[7:0] == 8'h04 && dut.g_q[0].u_q.empty) n_q_empty_poll[0]++;
    if (dut.io_sel && !dut.d_we && dut.d_addr[7:0] == 8'h24 && dut.g_q[2].u_q.empty) n_q_empty_poll[2]++;
    if (rot_on) begin
      checks++;
      if (wbt != tid_t'(exp_tid)) begin failures++; n_rot_err++; if (n_rot_err < 4) $display("FAIL rotation cycle %0d tid %0d exp %0d", cyc, wbt, exp_tid); end
      exp_tid = (exp_tid + 1) % 4;
    end else begin
      exp_tid = (int'(wbt) + 1) % 4;   // the slot rotates even when a thread is stopped
    end
  end

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input stream
  word_t pix [NPIX];
  initial begin
    for (int i = 0; i < NPIX; i++) pix[i] = $urandom & 32'h00FF_FFFF;
    pix[0] = 32'h00FF_FFFF; pix[1] = 32'h0000_0000; pix[2] = 32'h00FF_0000;
    wait (!rst);
    repeat (300) @(negedge clk);
    for (int i = 0; i < NPIX; i++) begin
      in_valid = 1; in_data = pix[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
  end

  // interrupts
  initial begin
    wait (!rst);
    for (int k = 0; k < 4; k++) begin
      repeat (1500) @(negedge clk);
      irq = 1;
      do @(posedge clk); while (!irq_taken);
      @(negedge clk); irq = 0;
    end
  end

  initial begin
    int n_out = 0, t_first = 0, t_last = 0;
    word_t e;
    for (int q = 0; q < 3; q++) begin n_q_full[q] = 0; n_q_empty_poll[q] = 0; end
    clear(); build_kernel(1); build_csc(0, 2); build_sum();
    idle_loop('hC00); build_lshift(2, 1);
    // download the program while the engine is held in reset
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
    repeat (2) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk); rot_on = 1;
    // drain output: stall for a long time first so that queues 1 and 2 fill up
    repeat (14000) @(negedge clk);
    while (n_out < NPIX) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = ref_lshift(ref_csc(pix[n_out]));
        checks++;
        if (out_data !== e) begin failures++; $display("FAIL pixel %0d out=%h exp=%h (in %h)", n_out, out_data, e, pix[n_out]); end
        n_out++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    repeat (50) @(negedge clk);
    chk("no extra output", !out_valid);
    chk("thread 2 sum", dut.u_dmem.mem['h2200 / 4] == 5050);
    chk($sformatf("interrupts handled %0d", dut.u_dmem.mem['h3004 / 4]), dut.u_dmem.mem['h3004 / 4] == 4);
    chk("kernel loop running", dut.u_dmem.mem['h3000 / 4] > 100);
    // every mechanism must have happened
    chk($sformatf("taken branches %0d", n_branch), n_branch > 0);
    chk($sformatf("multiplies finished in MEM %0d", n_mul), n_mul >= 9 * NPIX);
    chk($sformatf("interrupts taken %0d", n_irq), n_irq == 4);
    chk($sformatf("kernel dispatches %0d", n_ks), n_ks == 1);
    chk($sformatf("cycles with a stopped thread %0d", n_bubble_off), n_bubble_off > 0);
    for (int q = 0; q < 3; q++) begin
      chk($sformatf("queue %0d full %0d cycles", q, n_q_full[q]), n_q_full[q] > 0);
      chk($sformatf("queue %0d polled empty %0d", q, n_q_empty_poll[q]), q == 1 || n_q_empty_poll[q] > 0);
    end
    chk("rotation never broken", n_rot_err == 0);
    $display("mechanisms: branches=%0d mul=%0d irq=%0d dispatch=%0d stopped_cycles=%0d qfull=%0d/%0d/%0d qempty_polls=%0d/%0d cycles=%0d",
             n_branch, n_mul, n_irq, n_ks, n_bubble_off, n_q_full[0], n_q_full[1], n_q_full[2],
             n_q_empty_poll[0], n_q_empty_poll[2], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
