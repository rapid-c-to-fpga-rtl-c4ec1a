// Test workload: the first steps of a JPEG encoder written as tasks for the
// emulation engine, plus the reference model the testbenches check against.
//
// Tasks (hand-assembled MIPS, placed in a 4096-word program image `prog`):
//   kernel  thread 0 @0x000: optionally stops thread 3, sets its PC to the
//           level-shift task and restarts it; clears its counters, enables
//           interrupts and counts in a loop. Handler @0x180 counts interrupts
//           at data address 0x3004.
//   csc     thread 1 @0x400: pops 0x00RRGGBB pixels from queue `in_q`,
//           converts to YCbCr with 8-bit fixed-point coefficients
//             Y  = (77R + 150G + 29B) >> 8
//             Cb = ((-43R - 85G + 128B) >> 8) + 128   (arithmetic shift)
//             Cr = ((128R - 107G - 21B) >> 8) + 128
//           (nine MULTs) and pushes 0x00CrCbY to queue `out_q`.
//   sum     thread 2 @0x800: 1 + ... + 100 stored at 0x2200.
//   idle    thread 3 @0xC00 (and thread 1 when csc is off): jumps to itself.
//   lshift  @0xE00: pops a word from `in_q`, XORs 0x00808080 (each 8-bit
//           component minus 128, as before the DCT), pushes it to `out_q`.
// Queues are polled through their status words, as the memory map defines.
package jpeg_slice_pkg;
  import mips_asm_pkg::*;

  logic [31:0] prog [4096];
  int pcw;

  task automatic put(logic [31:0] ins); prog[pcw] = ins; pcw++; endtask
  function automatic int here(); return pcw * 4; endfunction
  function automatic int off(int a); return (a - (pcw * 4 + 4)) / 4; endfunction
  task automatic term(int rs, int c, int acc);
    put(addiu(17, 0, c)); put(mult(rs, 17)); put(mflo(18)); put(addu(acc, acc, 18));
  endtask
  task automatic idle_loop(int base);
    pcw = base / 4; put(j(base)); put(nop());
  endtask
  // wait until queue q is not empty (reg 9 scratch, reg 8 = I/O base)
  task automatic wait_not_empty(int q);
    int l; l = here();
    put(lw(9, 16 * q + 4, 8)); put(andi(9, 9, 1)); put(beq(9, 0, off(l))); put(nop());
  endtask
  task automatic wait_not_full(int q);
    int l; l = here();
    put(lw(9, 16 * q + 4, 8)); put(andi(9, 9, 2)); put(bne(9, 0, off(l))); put(nop());
  endtask

  // patch a branch or jump placed earlier once its target is known
  task automatic fix_branch(int idx, int target);
    prog[idx][15:0] = 16'((target - (idx * 4 + 4)) / 4);
  endtask
  task automatic fix_jump(int idx, int target);
    prog[idx][25:0] = 26'(target >> 2);
  endtask

  task automatic clear();
    for (int i = 0; i < 4096; i++) prog[i] = 0;
  endtask

  task automatic build_kernel(bit dispatch_lshift);
    int l;
    pcw = 0;
    put(lui(8, 'h8000));
    if (dispatch_lshift) begin
      put(addiu(1, 0, 7));   put(sw(1, 'h40, 8));      // stop thread 3
      put(ori(2, 0, 'hE00)); put(sw(2, 'h5C, 8));      // its PC = level-shift task
      put(addiu(1, 0, 15));  put(sw(1, 'h40, 8));      // restart it
    end
    put(ori(20, 0, 'h3000));
    put(sw(0, 4, 20)); put(addiu(3, 0, 0));
    put(addiu(1, 0, 1)); put(mtc0(1, 12));             // Status.IE = 1
    l = here();
    put(addiu(3, 3, 1)); put(sw(3, 0, 20)); put(j(l)); put(nop());
    pcw = 'h180 / 4;
    put(lw(21, 4, 20)); put(addiu(21, 21, 1)); put(sw(21, 4, 20)); put(eret());
  endtask

  task automatic build_csc(int in_q, int out_q);
    int l;
    pcw = 'h400 / 4;
    put(lui(8, 'h8000));
    l = here();
    wait_not_empty(in_q);
    put(lw(10, 16 * in_q, 8));
    put(andi(11, 10, 'hFF));
    put(srl(12, 10, 8));  put(andi(12, 12, 'hFF));
    put(srl(13, 10, 16)); put(andi(13, 13, 'hFF));
    put(addiu(14, 0, 0)); term(13, 77, 14); term(12, 150, 14); term(11, 29, 14); put(srl(14, 14, 8));
    put(addiu(15, 0, 0)); term(13, -43, 15); term(12, -85, 15); term(11, 128, 15);
    put(sra(15, 15, 8)); put(addiu(15, 15, 128));
    put(addiu(16, 0, 0)); term(13, 128, 16); term(12, -107, 16); term(11, -21, 16);
    put(sra(16, 16, 8)); put(addiu(16, 16, 128));
    put(andi(15, 15, 'hFF)); put(andi(16, 16, 'hFF));
    put(sll(15, 15, 8)); put(sll(16, 16, 16)); put(or_(14, 14, 15)); put(or_(14, 14, 16));
    wait_not_full(out_q);
    put(sw(14, 16 * out_q, 8));
    put(j(l)); put(nop());
  endtask

  task automatic build_sum();
    int l;
    pcw = 'h800 / 4;
    put(addiu(1, 0, 0)); put(addiu(2, 0, 100));
    l = here();
    put(addu(1, 1, 2)); put(addiu(2, 2, -1)); put(bne(2, 0, off(l))); put(nop());
    put(ori(3, 0, 'h2200)); put(sw(1, 0, 3));
    idle_loop(here());
  endtask

  task automatic build_lshift(int in_q, int out_q);
    int l;
    pcw = 'hE00 / 4;
    put(lui(8, 'h8000));
    put(lui(11, 'h0080)); put(ori(11, 11, 'h8080));
    l = here();
    wait_not_empty(in_q);
    put(lw(10, 16 * in_q, 8));
    put(xor_(10, 10, 11));
    wait_not_full(out_q);
    put(sw(10, 16 * out_q, 8));
    put(j(l)); put(nop());
  endtask

  function automatic logic [31:0] ref_csc(logic [31:0] p);
    int r, g, b, y, cb, cr;
    r = int'(p[23:16]); g = int'(p[15:8]); b = int'(p[7:0]);
    y  = (77 * r + 150 * g + 29 * b) / 256;
    cb = ((-43 * r - 85 * g + 128 * b) >>> 8) + 128;
    cr = ((128 * r - 107 * g - 21 * b) >>> 8) + 128;
    return {8'h0, 8'(cr), 8'(cb), 8'(y)};
  endfunction
  function automatic logic [31:0] ref_lshift(logic [31:0] w);
    return w ^ 32'h0080_8080;
  endfunction
endpackage
