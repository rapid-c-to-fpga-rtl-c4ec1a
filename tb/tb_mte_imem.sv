// Self-checking testbench for mte_imem: writes random words through the
// download port, then reads them back; data must appear one cycle after the
// address (registered read).
module tb_mte_imem;
  int checks = 0, failures = 0;
  logic clk = 0, we; logic [7:0] ra, wa; logic [31:0] rd, wd;
  logic [31:0] model [256];
  mte_imem #(.WORDS(256)) dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; ra = 0; wa = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; wa = 8'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      ra = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd !== model[ra]) begin failures++; $display("FAIL a=%0d %h exp %h", ra, rd, model[ra]); end
      @(negedge clk);
      ra = ~ra; #1;
      checks++;  // data must not follow the address combinationally
      if (rd !== model[~ra]) begin failures++; $display("FAIL read not registered"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
