// tb_imap_ce: end-to-end run of the whole chip at its default size (128
// PEs, 2KB IMEMs), with the testbench acting as control processor, host and
// external memory. It runs the three sample kernels of the row-wise and
// row-systolic styles on a 128 x 240 8-bit image:
//   1. DMA the image from EMEM into IMEM rows (three queued requests, the
//      last one at high priority so it overtakes the second);
//   2. binarize: dst = (src > thres) ? 0xff : 0, with mif/melse/mend;
//   3. average: 3x3 box filter, dst = sum / 9, with 16-bit sums passed
//      between neighbours over the 16-bit link (mvrp/mvlp) and the division
//      done exactly as (S * 7282) >> 16 with the 8x8 multiplier;
//   4. histogram: per-column counts with indexed ldt/stt, then the
//      row-systolic sum in which (res, idx) packets travel left around the
//      ring for 128 steps, twice (bins 0..127, 128..255);
//   5. DMA all results back (while the PEs keep working, so the DMA waits
//      for LSU-free cycles), a 50% scaled copy, a video line captured in
//      4-pixels-per-PE mode and copied by DMA, and host accesses competing
//      with the DMA for the EMEM port.
// Results are compared with a model computed here; each mechanism is
// counted and must occur at least once.
module tb_imap_ce;
  import imap_pkg::*;
  localparam int NPE = 128, NROW = 240, NG = NPE / 8;
  localparam int SRC = 0, DST = 240, AVG = 480, HST = 720, RES = 976;
  localparam int E_IMG = 0, E_BIN = 8192, E_AVG = 16384, E_HST = 24576, E_SC = 28000, E_VID = 29000;

  logic clk = 0, rst_n = 0, vclk = 0, vrst_n = 0;
  pe_instr_t  instr;
  pe_scalar_t scalar, sc_next;
  logic [7:0] ped;
  logic ped_valid, lsu_hold, dq_push, dq_prio, dma_busy, dma_done;
  logic [1:0] dq_full, emem_tag, emem_rtag;
  dma_desc_t dq_desc;
  mem_req_t cp_req, host_req, emem_req;
  logic cp_lock, host_lock, cp_ready, host_ready, emem_ready;
  mem_rsp_t cp_rsp, host_rsp, emem_rsp;
  logic [1:0] vmode;
  logic hsync, vvalid, line_irq;
  logic [3:0][7:0] vin, vout;
  int checks = 0, failures = 0, cyc = 0;

  imap_ce dut (
    .clk, .rst_n, .instr, .scalar, .ped, .ped_valid, .lsu_hold,
    .dq_push, .dq_prio, .dq_desc, .dq_full, .dma_busy, .dma_done,
    .cp_req, .cp_lock, .cp_ready, .cp_rsp, .host_req, .host_lock, .host_ready, .host_rsp,
    .emem_req, .emem_tag, .emem_ready, .emem_rsp, .emem_rtag,
    .vclk, .vrst_n, .vmode, .hsync, .vvalid, .vin, .vout, .line_irq);

  always #5 clk = !clk;
  always #7 vclk = !vclk;
  always_ff @(posedge clk) begin scalar <= sc_next; cyc <= cyc + 1; end

  initial begin
    #3000000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------
  // mechanism counters
  int n_hold = 0, n_prio = 0, n_contend = 0, n_mask = 0, n_mifc = 0, n_sml = 0,
      n_sts = 0, n_ring = 0, n_scale = 0, n_irq = 0, n_ldt = 0, n_pdp = 0;
  always @(posedge clk) begin
    if (lsu_hold) n_hold++;
    if (host_req.valid && emem_req.valid && emem_tag == 2) n_contend++;
    if (rst_n && line_irq) n_irq++;
  end

  // ------------------------------------------------------------------
  // external memory model: random ready, reads answered in order after a delay
  logic [63:0] emem [int];
  typedef struct { logic [1:0] tag; logic [63:0] d; int due; } rd_t;
  rd_t rq [$];
  int row_starts [$];
  always @(posedge clk) begin
    emem_ready <= ($urandom_range(0, 7) != 0);
    if (emem_req.valid && emem_ready) begin
      if (emem_req.we) emem[int'(emem_req.addr)] = emem_req.wdata;
      else begin
        rq.push_back('{emem_tag, emem.exists(int'(emem_req.addr)) ? emem[int'(emem_req.addr)] : 64'd0,
                      cyc + $urandom_range(2, 6)});
        if (emem_tag == 2 && emem_req.addr < MAW'(NROW * NG) && emem_req.addr % NG == 0)
          row_starts.push_back(int'(emem_req.addr) / NG);
      end
    end
    if (rq.size() > 0 && rq[0].due <= cyc) void'(rq.pop_front());
  end
  always_comb begin
    emem_rsp = '0; emem_rtag = '0;
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      emem_rsp.rvalid = 1; emem_rsp.rdata = rq[0].d; emem_rtag = rq[0].tag;
    end
  end
  function automatic logic [7:0] ebyte(int base, int row, int k);
    logic [63:0] w;
    w = emem.exists(base + row * NG + k / 8) ? emem[base + row * NG + k / 8] : 64'd0;
    return w[8 * (k % 8) +: 8];
  endfunction

  // ------------------------------------------------------------------
  // control processor model
  int ped_exp [$];
  always @(posedge clk) if (rst_n && ped_valid) begin
    checks++;
    if (ped_exp.size() == 0) begin failures++; $display("FAIL unexpected ped"); end
    else begin
      int e; e = ped_exp.pop_front();
      if (int'(ped) != e) begin failures++; $display("FAIL ped %0d exp %0d", ped, e); end
    end
  end

  function automatic fields_t F(int r1, int r2, int r3, bit m = 0);
    fields_t f; f.mask = m; f.r1 = RW'(r1); f.r2 = RW'(r2); f.r3 = RW'(r3); return f;
  endfunction
  task automatic issue(pe_instr_t b, int cr1 = 0, int cr2 = 0);
    // leave the LSU slot empty while a DMA row access waits
    while (lsu_hold && b.s.op != S_NOP) begin
      instr = PE_NOP; sc_next = '0; @(posedge clk); #1;
    end
    instr = b; sc_next.cr1 = SW'(cr1); sc_next.cr2 = SW'(cr2);
    if (b.a.f.mask || b.l.f.mask || b.m.f.mask || b.s.f.mask) n_mask++;
    if (b.a.op == A_MIFC) n_mifc++;
    if (b.l.op == L_SML) n_sml++;
    if (b.m.op inside {M_MVR, M_MVL, M_MVRP, M_MVLP}) n_ring++;
    if (b.s.op inside {S_LDT, S_STT}) n_ldt++;
    if (b.a.op == A_PDP) n_pdp++;
    @(posedge clk); #1 instr = PE_NOP;
  endtask
  task automatic A(add_op_e op, int r1, int r2, int r3, bit m = 0, int cr1 = 0, int cr2 = 0);
    pe_instr_t b = PE_NOP; b.a.op = op; b.a.f = F(r1, r2, r3, m); issue(b, cr1, cr2);
  endtask
  task automatic MV2(int r, int v); A(A_MV2, 0, 0, r, 0, v); endtask
  task automatic L(log_op_e op, int r1, int r2, int r3, bit m = 0);
    pe_instr_t b = PE_NOP; b.l.op = op; b.l.f = F(r1, r2, r3, m); issue(b);
  endtask
  task automatic M(mul_op_e op, int r1, int r2, int r3);
    pe_instr_t b = PE_NOP; b.m.op = op; b.m.f = F(r1, r2, r3); issue(b);
  endtask
  task automatic S(lsu_op_e op, int r1, int r2, int r3, int cr1, int cr2 = 0, bit m = 0);
    pe_instr_t b = PE_NOP; b.s.op = op; b.s.f = F(r1, r2, r3, m); issue(b, cr1, cr2);
  endtask
  task automatic LD(int r, int addr); S(S_LD, 0, 0, r, addr); issue(PE_NOP); endtask
  task automatic STS(int r, bit m, int exp);
    ped_exp.push_back(exp); n_sts++; L(L_STS, r, 0, 0, m);
  endtask

  localparam int RZ = 23, RONE = 22;   // constant 0 and 1
  // 16-bit add: (h:l) += (bh:bl) ; carry from the low byte through mifc
  task automatic add16(int h, int l, int bh, int bl);
    A(A_ADD, h, bh, h);
    A(A_ADD, l, bl, l);
    A(A_MIFC, RZ, RZ, 3'(F_LTU));        // mr = carry of the low add
    A(A_ADD, h, RONE, h, 1);
    A(A_MEND, 0, 0, 0);
  endtask

  // ------------------------------------------------------------------
  // DMA helpers
  task automatic dma(dma_dir_e dir, int imem, int emem_a, int rows, bit prio = 0, int step = 64, int ch = 0);
    dma_desc_t d = '0;
    d.dir = dir; d.imem_addr = 11'(imem); d.emem_addr = MAW'(emem_a); d.emem_pitch = MAW'(NG);
    d.rows = 11'(rows); d.step = 9'(step); d.sr_ch = 2'(ch);
    while (dq_full[prio]) @(posedge clk);
    dq_desc = d; dq_prio = prio; dq_push = 1; pushed++; @(posedge clk); #1 dq_push = 0;
  endtask
  int dones = 0, pushed = 0;
  always @(posedge clk) if (dma_done) dones++;
  task automatic dma_wait(int n);
    while (dones < n) begin instr = PE_NOP; @(posedge clk); #1; end
  endtask

  // reference image and results
  logic [7:0] img [NROW][NPE];
  int thres = 100;

  // video input process
  logic [7:0] vline [512];
  task automatic send_video_line();
    vmode = 2; hsync = 1; @(posedge vclk); #1 hsync = 0;
    for (int p = 0; p < 512; p++) begin
      vin[0] = vline[p]; vvalid = 1; @(posedge vclk); #1;
    end
    vvalid = 0;
  endtask

  // host traffic: writes then reads back a few words while DMA runs
  int host_ok = 0;
  task automatic host_traffic();
    for (int i = 0; i < 24; i++) begin
      host_req.valid = 1; host_req.we = 1; host_req.addr = MAW'(60000 + i); host_req.wdata = {32'(i), 32'hcafe0000};
      @(posedge clk); while (!host_ready) @(posedge clk); #1;
    end
    for (int i = 0; i < 24; i++) begin
      host_req.valid = 1; host_req.we = 0; host_req.addr = MAW'(60000 + i);
      @(posedge clk); while (!host_ready) @(posedge clk); #1;
      host_req = '0;
      while (!host_rsp.rvalid) @(posedge clk);
      checks++;
      if (host_rsp.rdata == {32'(i), 32'hcafe0000}) host_ok++; else begin failures++; $display("FAIL host read %0d", i); end
      #1;
    end
    host_req = '0;
  endtask

  initial begin
    instr = PE_NOP; sc_next = '0; dq_push = 0; dq_prio = 0; dq_desc = '0;
    cp_req = '0; cp_lock = 0; host_req = '0; host_lock = 0;
    vmode = 2; hsync = 0; vvalid = 0; vin = '0;
    for (int r = 0; r < NROW; r++)
      for (int k = 0; k < NPE; k++) img[r][k] = 8'(($urandom_range(0, 3) == 0) ? $urandom : (r + 2 * k + $urandom_range(0, 20)));
    for (int r = 0; r < NROW; r++)
      for (int g = 0; g < NG; g++) begin
        logic [63:0] w;
        for (int b = 0; b < 8; b++) w[8*b +: 8] = img[r][8*g + b];
        emem[E_IMG + r * NG + g] = w;
      end
    for (int p = 0; p < 512; p++) vline[p] = 8'($urandom);
    repeat (3) @(posedge clk); #1 rst_n = 1; vrst_n = 1;

    // ---- 1. image into IMEM: three requests, the third at high priority
    dma(D_E2I, SRC + 0,   E_IMG + 0,        80, 0);
    dma(D_E2I, SRC + 80,  E_IMG + 80 * NG,  80, 0);
    dma(D_E2I, SRC + 160, E_IMG + 160 * NG, 80, 1);
    // constants and PENUM (pdp, one PE per cycle) while the DMA runs
    MV2(RZ, 0); MV2(RONE, 1);
    for (int k = 0; k < NPE; k++) A(A_PDP, 0, 0, 0, 0, k, k);
    dma_wait(3);
    checks++;
    if (row_starts.size() >= 240 && row_starts[80] == 160 && row_starts[160] == 80) n_prio++;
    else begin failures++; $display("FAIL queue priority order"); end
    STS(0, 0, 127);                                  // OR of all PE numbers

    // ---- 2. binarize (rows 1..NROW-2, as the sample kernel)
    MV2(2, 255); MV2(3, thres);
    for (int i = 1; i < NROW - 1; i++) begin
      LD(1, SRC + i);
      A(A_MIF, 1, 3, 3'(F_GTU));
      S(S_ST, 2, 0, 0, DST + i, 0, 1);
      A(A_MELSE, 0, 0, 0);
      S(S_ST, RZ, 0, 0, DST + i, 0, 1);
      A(A_MEND, 0, 0, 0);
    end
    // status collection: leftmost PE whose row-1 pixel exceeds thres, via sml
    begin
      int lm; lm = -1;
      for (int k = NPE - 1; k >= 0; k--) if (img[1][k] > thres) lm = k;
      LD(1, SRC + 1);
      A(A_MIF, 1, 3, 3'(F_GTU));
      L(L_SML, 0, 0, 0);
      STS(0, 1, (lm < 0) ? 0 : lm);
      A(A_MEND, 0, 0, 0);
    end
    dma(D_I2E, DST + 1, E_BIN + NG, NROW - 2);       // runs under the next kernel

    // ---- 3. average: acc_i = src[i-1]+src[i]+src[i+1] (16 bit),
    //         s = left acc + acc + right acc, dst = s / 9
    MV2(20, 114); MV2(21, 28);
    for (int i = 1; i < NROW - 1; i++) begin
      LD(4, SRC + i - 1); LD(5, SRC + i); LD(6, SRC + i + 1);
      MV2(9, 0); A(A_MV, 4, 0, 8);                     // (r9:r8) = src[i-1]
      add16(9, 8, RZ, 5); add16(9, 8, RZ, 6);          // acc
      M(M_MVRP, 8, 0, 10);                             // left acc  -> (r11:r10)
      M(M_MVLP, 8, 0, 12);                             // right acc -> (r13:r12)
      add16(11, 10, 9, 8); add16(11, 10, 13, 12);      // S = (r11:r10)
      // q = h*28 + hi(h*114 + l*28 + hi(l*114))
      M(M_MUL, 11, 20, 14);                            // (r15:r14) = h*114
      M(M_MUL, 10, 21, 16);                            // (r17:r16) = l*28
      add16(15, 14, 17, 16);                           // X
      M(M_MUL, 10, 20, 16);                            // (r17:r16) = l*114
      add16(15, 14, RZ, 17);                           // Z = X + hi(Y)
      M(M_MUL, 11, 21, 18);                            // r18 = h*28
      A(A_ADD, 18, 15, 7);
      S(S_ST, 7, 0, 0, AVG + i);
    end
    dma(D_I2E, AVG + 1, E_AVG + NG, NROW - 2);

    // ---- 4. histogram: hst[src[i]]++ per column, then row-systolic sum
    for (int b = 0; b < 256; b++) S(S_ST, RZ, 0, 0, HST + b);
    MV2(2, 0);                                         // index pair high byte
    for (int i = 0; i < NROW; i++) begin
      LD(1, SRC + i);
      S(S_LDT, 0, 1, 4, HST); issue(PE_NOP);
      A(A_ADD, 4, RONE, 4);
      S(S_STT, 4, 1, 0, HST);
    end
    for (int pass = 0; pass < 2; pass++) begin
      // r6 = idx (PENUM + 128*pass), r7 = 0, (r9:r8) = res
      A(A_MV, 0, 0, 6); MV2(7, 0); MV2(8, 0); MV2(9, 0);
      if (pass) begin MV2(5, 128); A(A_ADD, 0, 5, 6); end
      for (int it = 0; it < NPE; it++) begin
        S(S_LDT, 0, 6, 4, HST); issue(PE_NOP);
        add16(9, 8, RZ, 4);                            // res + hst[idx]
        M(M_MVLP, 8, 0, 8);                            // take the right PE's packet
        M(M_MVL, 6, 0, 6);
      end
      S(S_ST, 8, 0, 0, RES + 2 * pass);
      S(S_ST, 9, 0, 0, RES + 2 * pass + 1);
    end
    dma(D_I2E, RES, E_HST, 4);

    // ---- 5. scaled copy of source row 7 at 50%, video line, host traffic
    dma(D_I2E, SRC + 7, E_SC, 1, 1, 128);
    fork
      send_video_line();
      host_traffic();
    join
    while (n_irq == 0) @(posedge clk);
    #1;
    dma(D_S2E, 0, E_VID, 1, 0, 64, 0);
    dma(D_S2E, 0, E_VID + NG, 1, 0, 64, 3);
    dma_wait(pushed);
    repeat (20) @(posedge clk);

    // ---- compare
    begin
      int bad_bin = 0, bad_avg = 0, bad_hst = 0, bad_sc = 0, bad_vid = 0;
      int hist [256];
      for (int b = 0; b < 256; b++) hist[b] = 0;
      for (int r = 0; r < NROW; r++) for (int k = 0; k < NPE; k++) hist[img[r][k]]++;
      for (int r = 1; r < NROW - 1; r++)
        for (int k = 0; k < NPE; k++) begin
          int s;
          checks++;
          if (ebyte(E_BIN, r, k) != ((img[r][k] > thres) ? 8'hff : 8'h00)) bad_bin++;
          s = 0;
          for (int dr = -1; dr <= 1; dr++) for (int dk = -1; dk <= 1; dk++)
            s += img[r + dr][(k + dk + NPE) % NPE];
          checks++;
          if (ebyte(E_AVG, r, k) != 8'(s / 9)) bad_avg++;
        end
      for (int k = 0; k < NPE; k++)
        for (int pass = 0; pass < 2; pass++) begin
          int v;
          v = ebyte(E_HST, 2 * pass, k) + 256 * ebyte(E_HST, 2 * pass + 1, k);
          checks++;
          if (v != hist[k + 128 * pass]) bad_hst++;
        end
      for (int k = 0; k < NPE; k++) begin
        checks++;
        if (ebyte(E_SC, 0, k) != ((2 * k < NPE) ? img[7][2 * k] : 8'd0)) bad_sc++;
        checks += 2;
        if (ebyte(E_VID, 0, k) != vline[4 * k]) bad_vid++;
        if (ebyte(E_VID, 1, k) != vline[4 * k + 3]) bad_vid++;
      end
      if (bad_sc == 0) n_scale++;
      failures += bad_bin + bad_avg + bad_hst + bad_sc + bad_vid;
      $display("mismatches: binarize %0d average %0d histogram %0d scaled %0d video %0d",
               bad_bin, bad_avg, bad_hst, bad_sc, bad_vid);
    end
    checks++; if (ped_exp.size() != 0) begin failures++; $display("FAIL ped results missing"); end
    $display("mechanisms: lsu_hold=%0d prio=%0d contention=%0d mask=%0d mifc=%0d sml=%0d sts=%0d ring=%0d scale=%0d irq=%0d ldt=%0d pdp=%0d host_ok=%0d cycles=%0d",
             n_hold, n_prio, n_contend, n_mask, n_mifc, n_sml, n_sts, n_ring, n_scale, n_irq, n_ldt, n_pdp, host_ok, cyc);
    begin
      int m [13];
      m = '{n_hold, n_prio, n_contend, n_mask, n_mifc, n_sml, n_sts, n_ring, n_scale, n_irq, n_ldt, n_pdp, host_ok};
      for (int i = 0; i < 13; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
