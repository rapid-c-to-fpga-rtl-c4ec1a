// Self-checking testbench for mte_lsu: random data and offsets for byte,
// half and word stores and loads; byte enables, lane placement and
// sign/zero extension are compared with a little-endian reference.
module tb_mte_lsu;
  import mte_pkg::*;
  int checks = 0, failures = 0;
  mem_size_e sz; logic [1:0] off; word_t sd, swd, rdat, lv; logic [3:0] be; logic uns;
  mte_lsu dut (.st_size(sz), .st_off(off), .st_data(sd), .st_wdata(swd), .st_be(be),
               .ld_size(sz), .ld_unsigned(uns), .ld_off(off), .ld_rdata(rdat), .ld_value(lv));
  logic [3:0] e_be; word_t e_lv; logic [7:0] bt; logic [15:0] hf;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1200; i++) begin
      sz = mem_size_e'(i % 3); off = 2'($urandom); uns = 1'($urandom);
      if (sz == MEM_H) off[0] = 0;
      if (sz == MEM_W) off = 0;
      sd = $urandom; rdat = $urandom;
      #1;
      bt = rdat >> (8 * off); hf = rdat >> (8 * off);
      case (sz)
        MEM_B: begin e_be = 4'(1 << off); e_lv = uns ? word_t'(bt) : word_t'(signed'(bt)); end
        MEM_H: begin e_be = 4'(3 << off); e_lv = uns ? word_t'(hf) : word_t'(signed'(hf)); end
        default: begin e_be = 4'hF; e_lv = rdat; end
      endcase
      checks++;
      if (be !== e_be || lv !== e_lv) begin failures++; $display("FAIL sz=%s off=%0d be=%b lv=%h exp %b %h", sz.name(), off, be, lv, e_be, e_lv); end
      // each enabled lane carries the right store byte
      for (int b = 0; b < 4; b++) if (e_be[b]) begin
        checks++;
        if (swd[8*b +: 8] !== sd[8*(b - off) +: 8]) begin failures++; $display("FAIL store lane %0d", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
