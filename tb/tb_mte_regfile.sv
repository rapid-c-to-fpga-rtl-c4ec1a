// Self-checking testbench for mte_regfile: random writes to all four thread
// contexts tracked in a reference array; both read ports are checked every
// cycle, including register 0 staying zero and contexts staying separate.
module tb_mte_regfile;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  tid_t rtid, wtid; reg_idx_t ra1, ra2, wa; word_t rd1, rd2, wd; logic we;
  word_t model [4][32];
  mte_regfile dut (.clk, .rd_tid(rtid), .ra1, .ra2, .rd1, .rd2, .we, .wr_tid(wtid), .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wtid = 0; wa = 0; wd = 0; rtid = 0; ra1 = 0; ra2 = 0;
    // initialise every register through the write port
    for (int t = 0; t < 4; t++) for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wtid = tid_t'(t); wa = reg_idx_t'(r); wd = $urandom;
      model[t][r] = (r == 0) ? 0 : wd;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wtid = tid_t'($urandom); wa = reg_idx_t'($urandom); wd = $urandom;
      rtid = tid_t'($urandom); ra1 = reg_idx_t'($urandom); ra2 = reg_idx_t'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[rtid][ra1]) begin failures++; $display("FAIL rd1 t%0d r%0d %h exp %h", rtid, ra1, rd1, model[rtid][ra1]); end
      if (rd2 !== model[rtid][ra2]) begin failures++; $display("FAIL rd2 t%0d r%0d", rtid, ra2); end
      @(posedge clk);
      if (we && wa != 0) model[wtid][wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
