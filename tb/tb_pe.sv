// tb_pe: directed program on a single PE with its ring neighbours driven by
// the testbench. Covers back-to-back forwarding (EX and iWB), all four
// slots in one bundle, mul to a register pair, ld/st/ldt/stt with the load
// delay slot, mif/mifc/melse/mend masking, sml, pdp and mv2 scalar
// substitution, mvr/mvl/mvrp/mvlp, sts and the DMA IMEM port. Register
// values are read back through the sts output (LOG slot), which shows ir1
// in the EX stage, two cycles after issue.
module tb_pe;
  import imap_pkg::*;
  logic clk = 0, rst_n = 0;
  pe_instr_t  instr;
  pe_scalar_t scalar, sc_next;
  logic [15:0] comm_out, left_in, right_in;
  logic mr_out, left_any, lsu_busy, dma_en, dma_we;
  logic [7:0] sts_out, dma_wdata, dma_rdata;
  logic [10:0] dma_addr;
  int checks = 0, failures = 0;

  pe #(.NREG(24), .DEPTH(2048), .IDW(7)) dut (
    .clk, .rst_n, .my_id(7'd3), .instr, .scalar, .comm_out, .left_in, .right_in,
    .mr_out, .left_any, .sts_out, .lsu_busy, .dma_en, .dma_we, .dma_addr, .dma_wdata, .dma_rdata);

  always #5 clk = !clk;
  always_ff @(posedge clk) scalar <= sc_next;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic fields_t F(int r1, int r2, int r3, bit m = 0);
    fields_t f; f.mask = m; f.r1 = RW'(r1); f.r2 = RW'(r2); f.r3 = RW'(r3); return f;
  endfunction

  // issue one bundle this cycle with its scalars next cycle
  task automatic issue(pe_instr_t b, int cr1 = 0, int cr2 = 0);
    instr = b; sc_next.cr1 = SW'(cr1); sc_next.cr2 = SW'(cr2);
    @(posedge clk); #1;
    instr = PE_NOP;
  endtask
  task automatic A(add_op_e op, int r1, int r2, int r3, bit m = 0, int cr1 = 0, int cr2 = 0);
    pe_instr_t b = PE_NOP; b.a.op = op; b.a.f = F(r1, r2, r3, m); issue(b, cr1, cr2);
  endtask
  task automatic M(mul_op_e op, int r1, int r2, int r3, bit m = 0);
    pe_instr_t b = PE_NOP; b.m.op = op; b.m.f = F(r1, r2, r3, m); issue(b);
  endtask
  task automatic S(lsu_op_e op, int r1, int r2, int r3, int cr1, int cr2, bit m = 0);
    pe_instr_t b = PE_NOP; b.s.op = op; b.s.f = F(r1, r2, r3, m); issue(b, cr1, cr2);
  endtask
  task automatic L(log_op_e op, int r1, int r2, int r3, bit m = 0);
    pe_instr_t b = PE_NOP; b.l.op = op; b.l.f = F(r1, r2, r3, m); issue(b);
  endtask
  task automatic nop(int n = 1); repeat (n) issue(PE_NOP); endtask

  // read register r: sts in EX one cycle after issue completes
  task automatic peek(int r, int exp, string what);
    L(L_STS, r, 0, 0);
    #0; checks++;
    if (sts_out != 8'(exp)) begin failures++; $display("FAIL %s: r%0d=%0d exp %0d", what, r, sts_out, exp); end
  endtask

  initial begin
    instr = PE_NOP; sc_next = '0; left_in = 16'h1234; right_in = 16'hbeef; left_any = 0;
    dma_en = 0; dma_we = 0; dma_addr = '0; dma_wdata = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;

    // scalar substitution and forwarding from EX (back-to-back)
    A(A_MV2, 0, 0, 0, 0, 5);
    A(A_MV2, 0, 0, 1, 0, 7);
    A(A_ADD, 0, 1, 2);          // r1 comes from EX, r0 from iWB
    A(A_SUB, 2, 0, 3);          // 12 - 5 = 7
    peek(2, 12, "add fwd"); peek(3, 7, "sub fwd");
    // multiply to a pair
    A(A_MV2, 0, 0, 6, 0, 200);
    A(A_MV2, 0, 0, 7, 0, 3);
    M(M_MUL, 6, 7, 8);
    peek(8, 600 % 256, "mul lo"); peek(9, 600 / 256, "mul hi");
    // saturation, abs, max/min with three operands
    A(A_SADD, 6, 6, 10); A(A_SSUB, 0, 6, 11); A(A_ABS, 0, 6, 12);
    A(A_MV2, 0, 0, 13, 0, 150); A(A_MAX, 0, 1, 13); A(A_MV2, 0, 0, 14, 0, 2); A(A_MIN, 0, 1, 14);
    peek(10, 255, "sadd"); peek(11, 0, "ssub"); peek(12, 195, "abs"); peek(13, 150, "max3"); peek(14, 2, "min3");
    // logic slot
    L(L_XOR, 6, 7, 15); L(L_SLL, 7, 0, 16);
    peek(15, 200 ^ 3, "xor"); peek(16, 6, "sll");

    // store, load, load delay slot, indexed load/store
    S(S_ST, 2, 0, 0, 100, 5);              // IMEM[105] = 12
    checks++; if (lsu_busy !== 1'b1) failures++;   // st now in EX
    S(S_LD, 0, 0, 17, 100, 5);
    nop();                                  // delay slot
    peek(17, 12, "ld");
    A(A_MV2, 0, 0, 18, 0, 55); A(A_MV2, 0, 0, 19, 0, 0);
    S(S_LDT, 0, 18, 20, 50, 0);             // IMEM[50 + r19:r18] = IMEM[105]
    nop();
    peek(20, 12, "ldt");
    S(S_STT, 6, 18, 0, 60, 0);              // IMEM[115] = 200
    S(S_LD, 0, 0, 21, 115, 0); nop();
    peek(21, 200, "stt/ld");

    // grouping: r0=5, r1=7
    A(A_MIF, 0, 1, 3'(F_LTU));              // 5<7 -> mr stays 1
    A(A_MV, 1, 0, 15, 1);                   // masked, writes
    peek(15, 7, "mif true");
    A(A_MIF, 0, 1, 3'(F_EQ));               // false -> mr=0, mf=1
    A(A_MV, 0, 0, 16, 1);                   // masked, suppressed (r16 was 6)
    checks++; #0 if (mr_out !== 1'b0) begin failures++; $display("FAIL mr after mif"); end
    S(S_ST, 0, 0, 0, 105, 0, 1);            // masked store suppressed
    L(L_NOT, 0, 0, 22);                     // unmasked, writes
    A(A_MELSE, 0, 0, 0);                    // mr=1
    A(A_MV, 0, 0, 23, 1);                   // masked, writes 5
    A(A_MEND, 0, 0, 0);
    peek(16, 6, "masked suppressed"); peek(22, 8'(~5), "unmasked"); peek(23, 5, "melse");
    S(S_LD, 0, 0, 17, 105, 0); nop(); peek(17, 12, "masked st suppressed");
    // 16-bit compare with mifc: {r9,r8}=0x0258 vs {r7,r6}=0x03c8 : 600 < 968
    A(A_SUB, 8, 6, 0); A(A_MIFC, 9, 7, 3'(F_LTU));
    A(A_MV, 7, 0, 10, 1); peek(10, 3, "mifc true");
    A(A_MEND, 0, 0, 0);
    A(A_SUB, 8, 6, 0); A(A_MIFC, 9, 7, 3'(F_GEU));
    A(A_MV, 7, 0, 11, 1); A(A_MEND, 0, 0, 0); peek(11, 0, "mifc false");
    A(A_MV2, 0, 0, 0, 0, 5);                // restore r0

    // sml: a PE to the left has mr=1 -> this PE drops out until mend
    left_any = 1; L(L_SML, 0, 0, 0);
    A(A_MV, 1, 0, 12, 1); left_any = 0; A(A_MEND, 0, 0, 0); A(A_MV, 1, 0, 13, 1);
    peek(12, 195, "sml cleared"); peek(13, 7, "mend after sml");

    // pdp: only PE 3 takes the value
    A(A_PDP, 0, 0, 14, 0, 3, 77); A(A_PDP, 0, 0, 15, 0, 4, 99);
    peek(14, 77, "pdp hit"); peek(15, 7, "pdp miss");

    // COMM: neighbour values and our own outgoing pair
    M(M_MVR, 0, 0, 16); M(M_MVLP, 0, 0, 18);
    peek(16, 8'h34, "mvr"); peek(18, 8'hef, "mvlp lo"); peek(19, 8'hbe, "mvlp hi");
    M(M_MVRP, 0, 0, 20); peek(20, 8'h34, "mvrp lo"); peek(21, 8'h12, "mvrp hi");
    left_in = 16'h00aa; M(M_MVL, 0, 0, 22); M(M_MVR, 0, 0, 23); peek(22, 8'hef, "mvl"); peek(23, 8'haa, "mvr 2");
    begin
      pe_instr_t b = PE_NOP; b.m.op = M_MUL; b.m.f = F(8, 0, 22); b.m.f.mask = 0;
      instr = b; @(posedge clk); #1 instr = PE_NOP;   // now in EX
      checks++; if (comm_out != 16'h0258) begin failures++; $display("FAIL comm_out %h", comm_out); end
    end

    // full bundle: four slots at once
    begin
      pe_instr_t b = PE_NOP;
      b.a.op = A_ADD; b.a.f = F(0, 1, 10);       // 12
      b.l.op = L_OR;  b.l.f = F(0, 1, 11);       // 7
      b.m.op = M_MUL; b.m.f = F(0, 1, 12);       // 35 -> r12, 0 -> r13
      b.s.op = S_LD;  b.s.f = F(0, 0, 14);       // IMEM[115] = 200
      issue(b, 115, 0); nop();
      peek(10, 12, "vliw add"); peek(11, 7, "vliw or"); peek(12, 35, "vliw mul"); peek(14, 200, "vliw ld");
    end

    // DMA port: write then read IMEM[7] while no LSU op is in EX
    dma_en = 1; dma_we = 1; dma_addr = 11'd7; dma_wdata = 8'h5a; @(posedge clk); #1;
    dma_we = 0; @(posedge clk); #1;
    checks++; if (dma_rdata != 8'h5a) begin failures++; $display("FAIL dma read"); end
    dma_en = 0;
    S(S_LD, 0, 0, 15, 7, 0); nop(); peek(15, 8'h5a, "ld after dma");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
