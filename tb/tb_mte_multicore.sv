// End-to-end testbench of the top, mte_multicore, with two engines chained by
// a hardware queue (the multi-core stage where each task has a processor).
//
// Engine 0 runs the colour-space task on thread 1 and sends results over the
// link; engine 1's kernel dispatches the level-shift task to its thread 3,
// which reads the link and writes the chain output. Both engines also run a
// sum on thread 2 and take three interrupts each. The output is stalled for
// a long time so every queue on the path fills and the link stalls, then
// drained randomly; every word is compared with the reference model and
// each mechanism (interrupts, branches, multiplies, kernel dispatch, full
// queues on both engines, link transfers and stalls, thread rotation on
// both engines) must have happened.
module tb_mte_multicore;
  import mte_pkg::*;
  import jpeg_slice_pkg::*;
  int checks = 0, failures = 0;
  localparam int NC   = 2;
  localparam int NPIX = 64;

  logic clk = 0, rst = 1;
  logic [NC-1:0] irq = '0;
  logic [$clog2(NC+1)-1:0] prog_core = '0;
  logic prog_we = 0; logic [11:0] prog_addr = 0; word_t prog_wdata = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  word_t in_data = 0, out_data;
  logic [NC-1:0] wbv, irq_taken, br_taken; tid_t wbt [NC]; word_t wbpc [NC];
  logic [NC-1:0][3:0] ten;

  mte_multicore #(.NCORES(2)) dut (.clk, .rst, .irq, .prog_core, .prog_we, .prog_addr, .prog_wdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .wb_valid(wbv), .wb_tid(wbt), .wb_pc(wbpc), .irq_taken, .branch_taken(br_taken),
    .thread_en(ten));

  always #5 clk = ~clk;

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---------------- mechanism counters ----------------
  int cyc = 0;
  int exp_tid [NC];
  int n_rot_err = 0, n_branch [NC], n_mul [NC], n_irq [NC], n_stopped [NC];
  int n_in_full [NC], n_out_full [NC], n_link_stall = 0, n_link_xfer = 0;
  logic rot_on = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int c = 0; c < NC; c++) begin
      if (br_taken[c]) n_branch[c]++;
      if (irq_taken[c]) n_irq[c]++;
      if (ten[c] != 4'hF) n_stopped[c]++;
      if (rot_on) begin
        checks++;
        if (wbt[c] != tid_t'(exp_tid[c])) begin
          failures++; n_rot_err++;
          if (n_rot_err < 4) $display("FAIL rotation engine %0d cycle %0d", c, cyc);
        end
      end
      exp_tid[c] = (int'(wbt[c]) + 1) % 4;
    end
    if (dut.g_core[0].u_sys.u_core.u_hilo.m_valid && dut.g_core[0].u_sys.u_core.u_hilo.m_op == MD_MULT) n_mul[0]++;
    if (dut.g_core[0].u_sys.g_q[0].u_q.full) n_in_full[0]++;
    if (dut.g_core[0].u_sys.g_q[1].u_q.full) n_out_full[0]++;
    if (dut.g_core[1].u_sys.g_q[0].u_q.full) n_in_full[1]++;
    if (dut.g_core[1].u_sys.g_q[1].u_q.full) n_out_full[1]++;
    if (dut.l_valid[1] && !dut.l_ready[1]) n_link_stall++;
    if (dut.l_valid[1] && dut.l_ready[1]) n_link_xfer++;
  end

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  word_t pix [NPIX];
  initial begin
    for (int i = 0; i < NPIX; i++) pix[i] = $urandom & 32'h00FF_FFFF;
    pix[0] = 32'h00FF_FFFF; pix[1] = 32'h0000_0000; pix[2] = 32'h0000_00FF;
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

  // interrupts to every engine's system thread
  initial begin
    wait (!rst);
    for (int k = 0; k < 3; k++) begin
      repeat (2000) @(negedge clk);
      irq = '1;
      fork
        for (int c = 0; c < NC; c++) begin
          automatic int cc = c;
          fork begin
            do @(posedge clk); while (!irq_taken[cc]);
            @(negedge clk); irq[cc] = 0;
          end join_none
        end
      join
      wait (irq == '0);
    end
  end

  task automatic load(int c);
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); prog_core = ($clog2(NC+1))'(c); prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  initial begin
    int n_out = 0;
    word_t e;
    for (int c = 0; c < NC; c++) begin
      n_branch[c] = 0; n_mul[c] = 0; n_irq[c] = 0; n_stopped[c] = 0; n_in_full[c] = 0; n_out_full[c] = 0;
    end
    // engine 0: colour conversion on thread 1, result to the link (queue 1)
    clear(); build_kernel(0); build_csc(0, 1); build_sum(); idle_loop('hC00);
    load(0);
    // engine 1: kernel dispatches the level shift to thread 3, link in (queue 0)
    clear(); build_kernel(1); idle_loop('h400); build_sum(); idle_loop('hC00); build_lshift(0, 1);
    load(1);
    repeat (2) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk); rot_on = 1;
    repeat (14000) @(negedge clk);           // output stalled: queues back up
    while (n_out < NPIX) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = ref_lshift(ref_csc(pix[n_out]));
        checks++;
        if (out_data !== e) begin failures++; $display("FAIL pixel %0d out=%h exp=%h", n_out, out_data, e); end
        n_out++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    repeat (50) @(negedge clk);
    chk("no extra output", !out_valid);
    for (int c = 0; c < NC; c++) begin
      chk($sformatf("engine %0d interrupts taken %0d", c, n_irq[c]), n_irq[c] == 3);
      chk($sformatf("engine %0d branches %0d", c, n_branch[c]), n_branch[c] > 0);
      chk($sformatf("engine %0d input queue full %0d", c, n_in_full[c]), n_in_full[c] > 0);
      chk($sformatf("engine %0d output queue full %0d", c, n_out_full[c]), n_out_full[c] > 0);
    end
    chk("engine 0 sum", dut.g_core[0].u_sys.u_dmem.mem['h2200 / 4] == 5050);
    chk("engine 1 sum", dut.g_core[1].u_sys.u_dmem.mem['h2200 / 4] == 5050);
    chk("engine 0 interrupts handled", dut.g_core[0].u_sys.u_dmem.mem['h3004 / 4] == 3);
    chk("engine 1 interrupts handled", dut.g_core[1].u_sys.u_dmem.mem['h3004 / 4] == 3);
    chk($sformatf("engine 0 multiplies %0d", n_mul[0]), n_mul[0] >= 9 * NPIX);
    chk($sformatf("engine 1 kernel dispatch (stopped cycles %0d)", n_stopped[1]), n_stopped[1] > 0);
    chk($sformatf("link transfers %0d", n_link_xfer), n_link_xfer == NPIX);
    chk($sformatf("link stalls %0d", n_link_stall), n_link_stall > 0);
    $display("mechanisms: branches=%0d/%0d mul=%0d irq=%0d/%0d in_full=%0d/%0d out_full=%0d/%0d link_xfer=%0d link_stall=%0d cycles=%0d",
             n_branch[0], n_branch[1], n_mul[0], n_irq[0], n_irq[1], n_in_full[0], n_in_full[1],
             n_out_full[0], n_out_full[1], n_link_xfer, n_link_stall, cyc);
    chk("rotation never broken", n_rot_err == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
