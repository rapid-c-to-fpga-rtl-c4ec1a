// Self-checking testbench for mte_hw_queue: random push/pop traffic against
// a SystemVerilog queue model; checks order, full/empty flags and the fill
// count, and that the queue reaches both full and empty.
module tb_mte_hw_queue;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, push, pop, full, empty; logic [31:0] din, dout; logic [4:0] count;
  logic [31:0] model [$];
  int n_full = 0, n_empty = 0;
  mte_hw_queue #(.WIDTH(32), .DEPTH(16)) dut (.clk, .rst, .push, .din, .full, .pop, .dout, .empty, .count);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 6000; i++) begin
      // phases biased towards filling then draining
      push = ($urandom_range(0, 99) < ((i / 500) % 2 ? 25 : 75));
      pop  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 75 : 25));
      din = $urandom;
      #1;
      checks += 3;
      if (full !== (model.size() == 16)) begin failures++; $display("FAIL full"); end
      if (empty !== (model.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (count !== 5'(model.size())) begin failures++; $display("FAIL count %0d exp %0d", count, model.size()); end
      if (!empty) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL dout %h exp %h", dout, model[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !full) model.push_back(din);
      @(negedge clk);
    end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
