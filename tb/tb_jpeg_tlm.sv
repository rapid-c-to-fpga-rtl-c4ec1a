// Workload testbench: the whole JPEG encoder task graph (colour space
// transformation, DCT, quantisation + zigzag + run-length coding, Huffman
// coding, each a task, joined by queues) run as software on the top with
// two emulation engines, fed by an RGB stream and checked against a
// reference model. Engine 0 plays the prototype of the encoder's front end,
// engine 1 takes the Huffman task, the way a partitioned design is spread
// over several engines linked by hardware queues.
//
//   in -> engine 0 queue 0 -> [thread 1: Y = (77R+150G+29B)>>8, minus 128]
//      -> queue 2 -> [thread 2: 8x8 2-D DCT, two integer matrix passes with
//                     C[u][x] = round(4096 * c(u)/2 * cos((2x+1)u*pi/16)),
//                     each pass rounded and shifted right by 12]
//      -> one-block mailbox in data memory (a software queue with a flag)
//      -> [thread 3: q = (F*R + 32768) >> 16, R = round(65536/Q) for the
//          JPEG example luminance table; zigzag scan; run-length coding]
//      -> engine 0 queue 1 -> link -> engine 1 queue 0
//      -> [engine 1 thread 1: DC difference to the previous block and its
//          category code, AC (run, size) codes with a 16-zero escape, value
//          bits, packed MSB first into 32-bit words] -> engine 1 queue 1 -> out
// Run-length words: the DC value (16 bits), then (run << 16 | value) for each
// non-zero AC coefficient in zigzag order, then 0 as end of block. They are
// checked word for word on the link; every completed output word is checked
// against a reference bit writer. Each engine's kernel (thread 0) writes its
// tables into data memory, stops its computation threads, points them at
// their tasks and starts them.
//
// Besides the data, the testbench checks the timing promised for
// computation threads: the DCT of each block (which waits on nothing) must
// take exactly 4 cycles per instruction retired, 47,592 cycles.
//
// The split into four tasks joined by queues is the encoder's published task
// graph. Only luminance is coded; the fixed-point formulas, table layout,
// word formats, the mailbox, the AC code lengths (an example rule, not the
// standard's table), always sending an end-of-block code and leaving out
// byte stuffing and headers are choices made for this test.
module tb_jpeg_tlm;
  import mte_pkg::*;
  import mips_asm_pkg::*;
  import jpeg_slice_pkg::*;
  int checks = 0, failures = 0;
  localparam int NBLK = 5;

  logic clk = 0, rst = 1;
  logic [1:0] irq = '0;
  logic [1:0] prog_core = '0;
  logic prog_we = 0; logic [11:0] prog_addr = 0; word_t prog_wdata = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  word_t in_data = 0, out_data;
  logic [1:0] wbv, irq_taken, br_taken; tid_t wbt [2]; word_t wbpc [2];
  logic [1:0][3:0] ten;

  mte_multicore #(.NCORES(2)) dut (.clk, .rst, .irq, .prog_core, .prog_we, .prog_addr, .prog_wdata,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .wb_valid(wbv), .wb_tid(wbt), .wb_pc(wbpc), .irq_taken, .branch_taken(br_taken),
    .thread_en(ten));

  always #5 clk = ~clk;

  // ---------------- tables ----------------
  localparam int QLUM [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,   12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,   14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68, 109, 103, 77, 24, 35, 55, 64, 81, 104, 113, 92,
    49, 64, 78, 87, 103, 121, 120, 101, 72, 92, 95, 98, 112, 100, 103, 99};
  int cdct [64];   // [u*8 + x]
  int rq   [64];   // natural order
  int zz   [64];   // zz[k] = natural index of the k-th coefficient in zigzag order

  task automatic make_tables();
    int k, r, c;
    real pi, cu;
    pi = 3.14159265358979;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        cu = (u == 0) ? 0.70710678118655 : 1.0;
        cdct[u * 8 + x] = int'($floor(4096.0 * cu / 2.0 * $cos((2 * x + 1) * u * pi / 16.0) + 0.5));
      end
    for (int i = 0; i < 64; i++) rq[i] = (65536 + QLUM[i] / 2) / QLUM[i];
    // zigzag: walk the anti-diagonals, alternating direction
    k = 0;
    for (int s = 0; s < 15; s++)
      for (int t = 0; t <= s; t++) begin
        if (s % 2 == 0) begin r = s - t; c = t; end else begin r = t; c = s - t; end
        if (r < 8 && c < 8) begin zz[k] = r * 8 + c; k++; end
      end
  endtask

  // ---------------- program ----------------
  localparam int C_TAB = 'h1000, R_TAB = 'h1100, Z_TAB = 'h1200;
  localparam int A_BUF = 'h1300, T_BUF = 'h1400, F_BOX = 'h1500, F_FLAG = 'h1600;

  int dct_start_pc, dct_done_pc;

  task automatic build();
    int l, l2, l3, l4, b1, b2, b3, jn1, jn2;
    clear();
    // boot: thread 0 jumps to the kernel body, threads 1-3 idle
    pcw = 0; put(j('h1000)); put(nop());
    pcw = 'h180 / 4; put(eret());
    idle_loop('h400); idle_loop('h800); idle_loop('hC00);
    // ---- kernel ----
    pcw = 'h1000 / 4;
    for (int i = 0; i < 64; i++) begin
      put(addiu(1, 0, cdct[i])); put(sw(1, C_TAB + 4 * i, 0));
      put(addiu(1, 0, rq[i]));   put(sw(1, R_TAB + 4 * i, 0));
      put(addiu(1, 0, 4 * zz[i])); put(sw(1, Z_TAB + 4 * i, 0));
    end
    put(sw(0, F_FLAG, 0));
    put(lui(8, 'h8000));
    put(addiu(1, 0, 1));        put(sw(1, 'h40, 8));     // stop threads 1-3
    put(ori(2, 0, 'h1800));     put(sw(2, 'h54, 8));     // thread 1: colour space
    put(ori(2, 0, 'h2000));     put(sw(2, 'h58, 8));     // thread 2: DCT
    put(ori(2, 0, 'h2800));     put(sw(2, 'h5C, 8));     // thread 3: quant/zigzag/RLC
    put(addiu(1, 0, 15));       put(sw(1, 'h40, 8));     // start them
    idle_loop(here());
    // ---- thread 1: colour space transformation (luma) ----
    pcw = 'h1800 / 4;
    put(lui(8, 'h8000));
    l = here();
    wait_not_empty(0);
    put(lw(10, 0, 8));
    put(andi(11, 10, 'hFF));
    put(srl(12, 10, 8));  put(andi(12, 12, 'hFF));
    put(srl(13, 10, 16)); put(andi(13, 13, 'hFF));
    put(addiu(14, 0, 0)); term(13, 77, 14); term(12, 150, 14); term(11, 29, 14);
    put(srl(14, 14, 8)); put(addiu(14, 14, -128));
    wait_not_full(2);
    put(sw(14, 'h20, 8));
    put(j(l)); put(nop());
    // ---- thread 2: 8x8 DCT ----
    pcw = 'h2000 / 4;
    put(lui(8, 'h8000));
    put(ori(20, 0, C_TAB)); put(ori(21, 0, A_BUF)); put(ori(22, 0, T_BUF));
    put(ori(23, 0, F_BOX)); put(ori(24, 0, F_FLAG));
    l = here();                                          // next block
    put(addu(1, 21, 0)); put(addiu(2, 0, 64));
    l2 = here();
    wait_not_empty(2);
    put(lw(10, 'h20, 8)); put(sw(10, 0, 1)); put(addiu(1, 1, 4)); put(addiu(2, 2, -1));
    put(bne(2, 0, off(l2))); put(nop());
    // row pass: T[y][u] = (sum_x C[u][x] A[y][x] + 2048) >> 12
    dct_start_pc = here();
    put(addu(3, 21, 0)); put(addu(4, 22, 0)); put(addiu(11, 0, 8));
    l2 = here();
    put(addu(5, 20, 0)); put(addu(6, 4, 0)); put(addiu(12, 0, 8));
    l3 = here();
    put(addiu(13, 0, 0)); put(addu(1, 3, 0)); put(addu(7, 5, 0)); put(addiu(2, 0, 8));
    l4 = here();
    put(lw(14, 0, 1)); put(lw(15, 0, 7)); put(mult(14, 15)); put(mflo(16)); put(addu(13, 13, 16));
    put(addiu(1, 1, 4)); put(addiu(7, 7, 4)); put(addiu(2, 2, -1));
    put(bne(2, 0, off(l4))); put(nop());
    put(addiu(13, 13, 2048)); put(sra(13, 13, 12)); put(sw(13, 0, 6)); put(addiu(6, 6, 4));
    put(addiu(5, 5, 32)); put(addiu(12, 12, -1)); put(bne(12, 0, off(l3))); put(nop());
    put(addiu(3, 3, 32)); put(addiu(4, 4, 32)); put(addiu(11, 11, -1)); put(bne(11, 0, off(l2))); put(nop());
    // wait until the mailbox is free
    l2 = here();
    put(lw(9, 0, 24)); put(bne(9, 0, off(l2))); put(nop());
    // column pass: F[v][u] = (sum_y C[v][y] T[y][u] + 2048) >> 12
    put(addu(5, 20, 0)); put(addu(6, 23, 0)); put(addiu(11, 0, 8));
    l2 = here();
    put(addu(3, 22, 0)); put(addiu(12, 0, 8));
    l3 = here();
    put(addiu(13, 0, 0)); put(addu(1, 3, 0)); put(addu(7, 5, 0)); put(addiu(2, 0, 8));
    l4 = here();
    put(lw(14, 0, 1)); put(lw(15, 0, 7)); put(mult(14, 15)); put(mflo(16)); put(addu(13, 13, 16));
    put(addiu(1, 1, 32)); put(addiu(7, 7, 4)); put(addiu(2, 2, -1));
    put(bne(2, 0, off(l4))); put(nop());
    put(addiu(13, 13, 2048)); put(sra(13, 13, 12)); put(sw(13, 0, 6)); put(addiu(6, 6, 4));
    put(addiu(3, 3, 4)); put(addiu(12, 12, -1)); put(bne(12, 0, off(l3))); put(nop());
    put(addiu(5, 5, 32)); put(addiu(11, 11, -1)); put(bne(11, 0, off(l2))); put(nop());
    put(addiu(9, 0, 1)); dct_done_pc = here(); put(sw(9, 0, 24));   // mailbox full
    put(j(l)); put(nop());
    // ---- thread 3: quantisation + zigzag + run-length coding ----
    pcw = 'h2800 / 4;
    put(lui(8, 'h8000));
    put(ori(23, 0, F_BOX)); put(ori(24, 0, F_FLAG)); put(ori(25, 0, R_TAB)); put(ori(26, 0, Z_TAB));
    put(ori(19, 0, 'h8000));
    l = here();
    put(lw(9, 0, 24)); put(beq(9, 0, off(l))); put(nop());
    put(addu(1, 26, 0)); put(addiu(2, 0, 64)); put(addiu(17, 0, 0)); put(addiu(18, 0, 1));
    l2 = here();
    put(lw(3, 0, 1)); put(addu(4, 23, 3)); put(lw(5, 0, 4)); put(addu(6, 25, 3)); put(lw(7, 0, 6));
    put(mult(5, 7)); put(mflo(10)); put(addu(10, 10, 19)); put(sra(10, 10, 16));
    b1 = pcw; put(bne(18, 0, 0)); put(nop());             // -> DC
    b2 = pcw; put(beq(10, 0, 0)); put(nop());             // -> zero
    put(sll(12, 17, 16)); put(andi(13, 10, 'hFFFF)); put(or_(12, 12, 13));
    wait_not_full(1);
    put(sw(12, 'h10, 8)); put(addiu(17, 0, 0));
    jn1 = pcw; put(j(0)); put(nop());                     // -> next
    fix_branch(b2, here());
    put(addiu(17, 17, 1));
    jn2 = pcw; put(j(0)); put(nop());                     // -> next
    fix_branch(b1, here());
    put(andi(13, 10, 'hFFFF));
    wait_not_full(1);
    put(sw(13, 'h10, 8)); put(addiu(18, 0, 0));
    fix_jump(jn1, here()); fix_jump(jn2, here());
    put(addiu(1, 1, 4)); put(addiu(2, 2, -1)); put(bne(2, 0, off(l2))); put(nop());
    wait_not_full(1);
    put(sw(0, 'h10, 8));                                  // end of block
    put(sw(0, 0, 24));                                    // mailbox free
    put(j(l)); put(nop());
  endtask


  // ---------------- Huffman stage (engine 1) ----------------
  // Code tables: DC categories 0..11 use the usual luminance DC code lengths
  // 2,3,3,3,3,3,4,5,6,7,8,9; AC symbols (run << 4 | size) use an example
  // length rule defined here, EOB 4 bits, ZRL 11 bits, otherwise
  // min(16, 2 + run + size). Both tables are canonical Huffman codes built
  // from those lengths. Table words hold (length << 16) | code.
  localparam int DC_LEN [12] = '{2, 3, 3, 3, 3, 3, 4, 5, 6, 7, 8, 9};
  int dc_tab [12];
  int ac_tab [256];
  localparam int DC_TAB = 'h1000, AC_TAB = 'h1100;

  task automatic canon(input int n, input int len [256], output int tab [256]);
    int code;
    code = 0;
    for (int l = 1; l <= 16; l++) begin
      for (int i = 0; i < n; i++)
        if (len[i] == l) begin tab[i] = (l << 16) | code; code++; end
      code = code << 1;
    end
  endtask

  task automatic make_huff();
    int len [256], tab [256];
    for (int i = 0; i < 256; i++) len[i] = 0;
    for (int i = 0; i < 12; i++) len[i] = DC_LEN[i];
    canon(12, len, tab);
    for (int i = 0; i < 12; i++) dc_tab[i] = tab[i];
    for (int r = 0; r < 16; r++)
      for (int sz = 0; sz < 16; sz++)
        len[r * 16 + sz] = (sz == 0) ? ((r == 0) ? 4 : (r == 15) ? 11 : 16)
                                     : ((2 + r + sz > 16) ? 16 : 2 + r + sz);
    canon(256, len, tab);
    ac_tab = tab;
  endtask

  // r5 = number of significant bits of |r4| (uses r6)
  task automatic emit_size();
    int l, b;
    put(bgez(4, 2)); put(addu(6, 4, 0)); put(subu(6, 0, 4));
    put(addiu(5, 0, 0));
    l = here();
    b = pcw; put(beq(6, 0, 0)); put(nop());
    put(srl(6, 6, 1)); put(addiu(5, 5, 1)); put(beq(0, 0, off(l))); put(nop());
    fix_branch(b, here());
  endtask
  // r4 = the r5 low bits of r4, one less first if negative (uses r6)
  task automatic emit_valuebits();
    put(bgez(4, 2)); put(nop()); put(addiu(4, 4, -1));
    put(addiu(6, 0, 1)); put(sllv(6, 6, 5)); put(addiu(6, 6, -1)); put(and_(4, 4, 6));
  endtask
  // r4/r5 = code and length from the table word in r14
  task automatic split_entry();
    put(srl(5, 14, 16)); put(andi(4, 14, 'hFFFF));
  endtask

  localparam int PUTBITS = 'h3000, HUFF_PC = 'h2800;

  task automatic build_huff();
    int l, zl, bdc, beob, bz, b1, b2;
    clear();
    pcw = 0; put(j('h1000)); put(nop());
    pcw = 'h180 / 4; put(eret());
    idle_loop('h400); idle_loop('h800); idle_loop('hC00);
    // kernel: tables, then dispatch the Huffman task to thread 1
    pcw = 'h1000 / 4;
    for (int i = 0; i < 12; i++) begin
      put(lui(1, dc_tab[i] >> 16)); put(ori(1, 1, dc_tab[i] & 'hFFFF)); put(sw(1, DC_TAB + 4 * i, 0));
    end
    for (int i = 0; i < 256; i++) begin
      put(lui(1, ac_tab[i] >> 16)); put(ori(1, 1, ac_tab[i] & 'hFFFF)); put(sw(1, AC_TAB + 4 * i, 0));
    end
    put(lui(8, 'h8000));
    put(addiu(1, 0, 1));    put(sw(1, 'h40, 8));
    put(ori(2, 0, HUFF_PC)); put(sw(2, 'h54, 8));
    put(addiu(1, 0, 15));   put(sw(1, 'h40, 8));
    assert (here() < HUFF_PC);
    idle_loop(here());
    // bit writer: append the r5 low bits of r4 (r5 <= 26), MSB first, and
    // push each completed 32-bit word to queue 1. r20 = pending bits,
    // r21 = their count. Uses r6, r7, r9, r10; returns through r31.
    pcw = PUTBITS / 4;
    b1 = pcw; put(beq(5, 0, 0)); put(nop());
    put(addu(6, 21, 5)); put(slti(7, 6, 33));
    b2 = pcw; put(beq(7, 0, 0)); put(nop());
    put(sllv(20, 20, 5)); put(or_(20, 20, 4)); put(addu(21, 6, 0));
    put(addiu(7, 0, 32)); put(bne(6, 7, 0)); put(nop());
    bz = pcw - 2;
    wait_not_full(1);
    put(sw(20, 'h10, 8)); put(addiu(20, 0, 0)); put(addiu(21, 0, 0));
    fix_branch(b1, here()); fix_branch(bz, here());
    put(jr(31)); put(nop());
    fix_branch(b2, here());
    put(addiu(7, 0, 32)); put(subu(7, 7, 21)); put(subu(10, 5, 7));
    put(sllv(20, 20, 7)); put(srlv(6, 4, 10)); put(or_(20, 20, 6));
    wait_not_full(1);
    put(sw(20, 'h10, 8));
    put(addiu(6, 0, 1)); put(sllv(6, 6, 10)); put(addiu(6, 6, -1)); put(and_(20, 4, 6));
    put(addu(21, 10, 0));
    put(jr(31)); put(nop());
    // Huffman task on thread 1
    pcw = HUFF_PC / 4;
    put(lui(8, 'h8000));
    put(addiu(20, 0, 0)); put(addiu(21, 0, 0)); put(addiu(22, 0, 0)); put(addiu(23, 0, 1));
    put(ori(24, 0, DC_TAB)); put(ori(25, 0, AC_TAB));
    l = here();
    wait_not_empty(0);
    put(lw(11, 0, 8));
    bdc = pcw; put(bne(23, 0, 0)); put(nop());
    beob = pcw; put(beq(11, 0, 0)); put(nop());
    // AC term: run r12, value r13
    put(srl(12, 11, 16)); put(sll(13, 11, 16)); put(sra(13, 13, 16));
    zl = here();
    put(slti(7, 12, 16)); b1 = pcw; put(bne(7, 0, 0)); put(nop());
    put(lw(14, 'h3C0, 25)); split_entry(); put(jal(PUTBITS)); put(nop());
    put(addiu(12, 12, -16)); put(j(zl)); put(nop());
    fix_branch(b1, here());
    put(addu(4, 13, 0)); emit_size(); put(addu(15, 5, 0));
    put(sll(6, 12, 4)); put(addu(6, 6, 15)); put(sll(6, 6, 2)); put(addu(6, 6, 25)); put(lw(14, 0, 6));
    split_entry(); put(jal(PUTBITS)); put(nop());
    put(addu(4, 13, 0)); put(addu(5, 15, 0)); emit_valuebits(); put(jal(PUTBITS)); put(nop());
    put(j(l)); put(nop());
    // end of block
    fix_branch(beob, here());
    put(lw(14, 0, 25)); split_entry(); put(jal(PUTBITS)); put(nop());
    put(addiu(23, 0, 1)); put(j(l)); put(nop());
    // DC term: difference to the previous block's DC
    fix_branch(bdc, here());
    put(addiu(23, 0, 0)); put(sll(13, 11, 16)); put(sra(13, 13, 16));
    put(subu(16, 13, 22)); put(addu(22, 13, 0));
    put(addu(4, 16, 0)); emit_size(); put(addu(15, 5, 0));
    put(sll(6, 15, 2)); put(addu(6, 6, 24)); put(lw(14, 0, 6));
    split_entry(); put(jal(PUTBITS)); put(nop());
    put(addu(4, 16, 0)); put(addu(5, 15, 0)); emit_valuebits(); put(jal(PUTBITS)); put(nop());
    put(j(l)); put(nop());
    assert (here() < PUTBITS);
  endtask

  // reference bit writer
  bit    refbits [$];
  int    n_zrl = 0, n_neg = 0;
  word_t exph [$];
  function automatic int nbits(int v);
    int a, n;
    a = (v < 0) ? -v : v; n = 0;
    while (a != 0) begin a = a >> 1; n++; end
    return n;
  endfunction
  task automatic put_ref(int code, int n);
    for (int i = n - 1; i >= 0; i--) refbits.push_back(code[i]);
  endtask
  task automatic put_val(int v, int n);
    put_ref((v < 0) ? v - 1 : v, n);
  endtask
  task automatic huff_reference(word_t rlc [$]);
    int prev, first, v, run, sz, d;
    prev = 0; first = 1;
    foreach (rlc[i]) begin
      v = int'(signed'(rlc[i][15:0])); run = int'(rlc[i][31:16]);
      if (first) begin
        d = v - prev; prev = v; sz = nbits(d);
        put_ref(dc_tab[sz] & 'hFFFF, dc_tab[sz] >> 16); put_val(d, sz); first = 0;
      end else if (rlc[i] == 0) begin
        put_ref(ac_tab[0] & 'hFFFF, ac_tab[0] >> 16); first = 1;
      end else begin
        while (run > 15) begin put_ref(ac_tab['hF0] & 'hFFFF, ac_tab['hF0] >> 16); run -= 16; n_zrl++; end
        if (v < 0) n_neg++;
        sz = nbits(v);
        put_ref(ac_tab[run * 16 + sz] & 'hFFFF, ac_tab[run * 16 + sz] >> 16); put_val(v, sz);
      end
    end
    for (int i = 0; i + 32 <= refbits.size(); i += 32) begin
      word_t w;
      for (int k = 0; k < 32; k++) w[31 - k] = refbits[i + k];
      exph.push_back(w);
    end
  endtask

  // ---------------- reference model ----------------
  word_t pix [NBLK * 64];
  word_t expq [$];

  task automatic reference();
    int a [64], t [64], f [64], q, run, s;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) begin
        word_t p; p = pix[b * 64 + i];
        a[i] = (77 * int'(p[23:16]) + 150 * int'(p[15:8]) + 29 * int'(p[7:0])) / 256 - 128;
      end
      for (int y = 0; y < 8; y++) for (int u = 0; u < 8; u++) begin
        s = 0; for (int x = 0; x < 8; x++) s += cdct[u * 8 + x] * a[y * 8 + x];
        t[y * 8 + u] = (s + 2048) >>> 12;
      end
      for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
        s = 0; for (int y = 0; y < 8; y++) s += cdct[v * 8 + y] * t[y * 8 + u];
        f[v * 8 + u] = (s + 2048) >>> 12;
      end
      run = 0;
      for (int k = 0; k < 64; k++) begin
        q = (f[zz[k]] * rq[zz[k]] + 32768) >>> 16;
        if (k == 0) expq.push_back({16'h0, 16'(q)});
        else if (q == 0) run++;
        else begin expq.push_back({16'(run), 16'(q)}); run = 0; end
      end
      expq.push_back(32'h0);
    end
  endtask

  initial begin
    repeat (1200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  word_t outw [$];
  always @(posedge clk) if (!rst && out_valid && out_ready) outw.push_back(out_data);

  // completion times of the DCT task, taken from the retirement trace
  int t_dct [$], t_dct0 [$];
  always @(posedge clk)
    if (!rst && wbv[0] && wbt[0] == 2'd2) begin
      if (wbpc[0] == word_t'(dct_start_pc)) t_dct0.push_back(cyc);
      if (wbpc[0] == word_t'(dct_done_pc))  t_dct.push_back(cyc);
    end
  // Instructions thread 2 retires from the first row-pass instruction to the
  // mailbox store, with the mailbox found free: row pass 3 + 8*(3 + 8*92 + 5)
  // = 5955, mailbox test 3, column pass 3 + 8*(2 + 8*92 + 4) = 5939, flag 1.
  // Each inner step is 10 instructions (two loads, multiply, move from LO,
  // add, three pointer/count updates, branch, delay slot).
  localparam int DCT_INSNS = 5955 + 3 + 5939 + 1;

  initial begin
    int n_out = 0, n_eob = 0, t_eob [NBLK], n_ac = 0, n_run = 0;
    bit first = 1;
    word_t e;
    make_tables();
    // test image: gradients plus random texture, then a checkerboard
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        int r, g, bl;
        r  = 40 + 20 * b + 8 * (i % 8) + $urandom_range(0, 12);
        g  = 90 + 10 * (i / 8) + (b == 3 ? $urandom_range(0, 120) : $urandom_range(0, 6));
        bl = 200 - 12 * (i % 8) - 5 * b;
        // last block: grey, the (7,7) DCT basis pattern: one coefficient, last in zigzag order
        if (b == 4) begin
          r = 128 + int'($floor(100.0 * $cos((2 * (i % 8) + 1) * 7 * 3.14159265358979 / 16.0)
                                       * $cos((2 * (i / 8) + 1) * 7 * 3.14159265358979 / 16.0) + 0.5));
          g = r; bl = r;
        end
        pix[b * 64 + i] = {8'h0, 8'(r), 8'(g), 8'(bl)};
      end
    make_huff();
    reference();
    huff_reference(expq);
    build();
    prog_core = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    build_huff();
    @(negedge clk); prog_core = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0;
    repeat (2) @(negedge clk); rst = 0;
    fork
      for (int i = 0; i < NBLK * 64; i++) begin
        in_valid = 1; in_data = pix[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      while (n_eob < NBLK) begin
        @(posedge clk);
        if (dut.l_valid[1] && dut.l_ready[1]) begin
          checks++;
          e = (expq.size() > 0) ? expq.pop_front() : 32'hDEAD_BEEF;
          if (dut.l_data[1] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d out=%h exp=%h", n_out, dut.l_data[1], e);
          end
          if (!first && e == 0) begin t_eob[n_eob] = cyc; n_eob++; first = 1; end
          else begin
            if (!first) n_ac++;
            if (!first && e[31:16] != 0) n_run++;
            first = 0;
          end
          n_out++;
        end
        @(negedge clk);
      end
    join
    in_valid = 0;
    repeat (20000) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL run-length word count"); end
    // Huffman coded stream from engine 1: every completed 32-bit word
    checks++;
    if (outw.size() != exph.size()) begin
      failures++; $display("FAIL %0d coded words, expected %0d", outw.size(), exph.size());
    end
    foreach (exph[i]) begin
      checks++;
      if (i >= outw.size() || outw[i] !== exph[i]) begin
        failures++;
        if (failures < 10) $display("FAIL coded word %0d out=%h exp=%h", i, (i < outw.size()) ? outw[i] : 32'h0, exph[i]);
      end
    end
    $display("Huffman stage: %0d bits, %0d complete words, %0d zero-run escapes, %0d negative AC terms",
             refbits.size(), outw.size(), n_zrl, n_neg);
    checks++; if (n_zrl == 0 || n_neg == 0) begin failures++; $display("FAIL Huffman coverage"); end
    // the image must exercise non-zero AC terms and zero runs
    checks++; if (n_ac < NBLK || n_run < 2) begin failures++; $display("FAIL coverage ac=%0d runs=%0d", n_ac, n_run); end
    // A computation thread is never interrupted and issues exactly every
    // fourth cycle, so the DCT of each block takes a fixed, predictable time.
    checks++;
    if (t_dct.size() != NBLK || t_dct0.size() < NBLK) begin
      failures++; $display("FAIL DCT task ran %0d times", t_dct.size());
    end else
      for (int b = 0; b < NBLK; b++) begin
        checks++;
        if (t_dct[b] - t_dct0[b] != 4 * DCT_INSNS) begin
          failures++; $display("FAIL DCT of block %0d took %0d cycles, expected %0d", b, t_dct[b] - t_dct0[b], 4 * DCT_INSNS);
        end
      end
    $display("DCT task: %0d cycles per 8x8 block (%0d instructions)", 4 * DCT_INSNS, DCT_INSNS);
    $display("AC terms %0d, of which after a zero run %0d", n_ac, n_run);
    $display("JPEG: %0d blocks, %0d run-length words, block done at cycles %p", NBLK, n_out, t_eob);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
