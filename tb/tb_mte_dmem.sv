// Self-checking testbench for mte_dmem: random byte-enabled writes and reads
// checked against a reference array; read data appears one cycle later.
module tb_mte_dmem;
  int checks = 0, failures = 0;
  logic clk = 0, en, we; logic [3:0] be; logic [7:0] a; logic [31:0] wd, rd;
  logic [31:0] model [256];
  mte_dmem #(.WORDS(256)) dut (.clk, .en, .we, .be, .addr(a), .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    en = 0; we = 0; be = 0; a = 0; wd = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; be = 4'hF; a = 8'(i); wd = $urandom; model[i] = wd;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = 1; we = 1'($urandom); be = 4'($urandom); a = 8'($urandom); wd = $urandom;
      if (!we) begin
        @(posedge clk); #1;
        checks++;
        if (rd !== model[a]) begin failures++; $display("FAIL rd a=%0d %h exp %h", a, rd, model[a]); end
      end else begin
        @(posedge clk);
        for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = wd[8*b +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
