// Self-checking testbench for mte_cp0: an interrupt is taken only on the
// system thread, only when enabled, not in handler mode and not in a delay
// slot; EPC capture, EXL set/clear by ERET, MTC0/MFC0 of Status/EPC and the
// Cause IP bit are checked.
module tb_mte_cp0;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic irq, v, ds, mtc0, er, take, doer; tid_t tid; word_t pc, wdat, rdat, rpc, st, epc;
  reg_idx_t rg;
  mte_cp0 #(.VECTOR(32'h180)) dut (.clk, .rst, .irq, .ex_valid(v), .ex_tid(tid), .ex_pc(pc),
    .ex_in_delay_slot(ds), .ex_mtc0(mtc0), .ex_eret(er), .ex_reg(rg), .ex_wdata(wdat), .ex_rdata(rdat),
    .take_irq(take), .do_eret(doer), .redirect_pc(rpc), .status(st), .epc);
  always #5 clk = ~clk;

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  task automatic idle(); v = 0; mtc0 = 0; er = 0; ds = 0; endtask

  initial begin
    repeat (1000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    irq = 0; idle(); tid = 0; pc = 0; wdat = 0; rg = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // disabled at reset: no interrupt
    irq = 1; v = 1; tid = 0; pc = 32'h40; #1; chk("no irq when IE=0", !take);
    // enable: MTC0 Status = 1
    mtc0 = 1; rg = CP0_STATUS; wdat = 1; @(negedge clk); idle();
    chk("status IE", st == 1);
    // computation threads never interrupted
    for (int t = 1; t < 4; t++) begin v = 1; tid = tid_t'(t); #1; chk("comp thread not interrupted", !take); end
    // system thread in delay slot: deferred
    tid = 0; ds = 1; #1; chk("deferred in delay slot", !take);
    // taken
    ds = 0; pc = 32'h1234; rg = CP0_CAUSE; #1;
    chk("taken", take && rpc == 32'h180);
    chk("cause IP2", rdat[10] == 1);
    @(negedge clk); idle();
    chk("EPC", epc == 32'h1234); chk("EXL", st[1] == 1);
    // in handler: not taken again
    v = 1; tid = 0; pc = 32'h184; #1; chk("masked by EXL", !take);
    // read EPC by MFC0
    rg = CP0_EPC; #1; chk("mfc0 epc", rdat == 32'h1234);
    // ERET from computation thread ignored
    tid = 2; er = 1; #1; chk("eret ignored on comp thread", !doer);
    // ERET from system thread
    tid = 0; irq = 0; #1; chk("eret", doer && rpc == 32'h1234);
    @(negedge clk); idle();
    chk("EXL cleared", st[1] == 0);
    // MTC0 EPC, then irq with IE=0 via MTC0
    v = 1; tid = 0; mtc0 = 1; rg = CP0_EPC; wdat = 32'h888; @(negedge clk); idle();
    chk("mtc0 epc", epc == 32'h888);
    v = 1; mtc0 = 1; rg = CP0_STATUS; wdat = 0; @(negedge clk); idle();
    irq = 1; v = 1; tid = 0; #1; chk("disabled again", !take);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
