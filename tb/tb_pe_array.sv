// tb_pe_array: a 16-PE array (two PE8 groups) driven as the control
// processor would. Loads the PE number into every PE with back-to-back pdp,
// rotates it around the ring with mvr/mvl, and reads single PEs back by
// masking with mif and collecting with sts. Checks the sts latency (ped
// valid four cycles after the bundle is presented) and one-per-cycle
// throughput, the OR over all PEs, sml leftmost selection, and a DMA row
// write/read that has to wait while LSU ops occupy EX.
module tb_pe_array;
  import imap_pkg::*;
  localparam int NPE = 16;
  logic clk = 0, rst_n = 0;
  pe_instr_t  instr;
  pe_scalar_t scalar, sc_next;
  logic [7:0] ped;
  logic ped_valid, dma_req, dma_we, dma_gnt, lsu_hold;
  logic [10:0] dma_addr;
  logic [NPE-1:0][7:0] dma_wdata, dma_rdata;
  int checks = 0, failures = 0, cyc = 0;

  pe_array #(.NPE(NPE), .GRP(8), .NREG(24), .DEPTH(2048)) dut (
    .clk, .rst_n, .instr, .scalar, .ped, .ped_valid,
    .dma_req, .dma_we, .dma_addr, .dma_wdata, .dma_gnt, .dma_rdata, .lsu_hold);

  always #5 clk = !clk;
  always_ff @(posedge clk) begin scalar <= sc_next; cyc <= cyc + 1; end

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sts results in order, with the cycle their bundle was presented
  int exp_q [$], iss_q [$];
  always @(posedge clk) if (rst_n && ped_valid) begin
    int e, ic;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected ped"); end
    else begin
      e = exp_q.pop_front(); ic = iss_q.pop_front();
      if (ped != 8'(e) || cyc - ic != 4) begin
        failures++; $display("FAIL ped %0d exp %0d latency %0d", ped, e, cyc - ic);
      end
    end
  end

  function automatic fields_t F(int r1, int r2, int r3, bit m = 0);
    fields_t f; f.mask = m; f.r1 = RW'(r1); f.r2 = RW'(r2); f.r3 = RW'(r3); return f;
  endfunction
  task automatic issue(pe_instr_t b, int cr1 = 0, int cr2 = 0);
    instr = b; sc_next.cr1 = SW'(cr1); sc_next.cr2 = SW'(cr2);
    @(posedge clk); #1 instr = PE_NOP;
  endtask
  task automatic A(add_op_e op, int r1, int r2, int r3, bit m = 0, int cr1 = 0, int cr2 = 0);
    pe_instr_t b = PE_NOP; b.a.op = op; b.a.f = F(r1, r2, r3, m); issue(b, cr1, cr2);
  endtask
  task automatic M(mul_op_e op, int r1, int r2, int r3);
    pe_instr_t b = PE_NOP; b.m.op = op; b.m.f = F(r1, r2, r3); issue(b);
  endtask
  task automatic STS(int r, bit m, int exp);
    pe_instr_t b = PE_NOP; b.l.op = L_STS; b.l.f = F(r, 0, 0, m);
    exp_q.push_back(exp); iss_q.push_back(cyc);
    issue(b);
  endtask
  // value of register r in PE k (r0 holds the PE number)
  task automatic read_pe(int r, int k, int exp);
    A(A_MV2, 0, 0, 23, 0, k);
    A(A_MIF, 0, 23, 3'(F_EQ));
    STS(r, 1, exp);
    A(A_MEND, 0, 0, 0);
  endtask

  initial begin
    instr = PE_NOP; sc_next = '0; dma_req = 0; dma_we = 0; dma_addr = '0; dma_wdata = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // PENUM by pdp, one PE per cycle
    for (int k = 0; k < NPE; k++) A(A_PDP, 0, 0, 0, 0, k, k);
    STS(0, 0, NPE - 1);                      // OR of 0..15
    // ring: r1 = left's r0, r2 = right's r0, r4P = left's r0P (r1 of left = its left)
    M(M_MVR, 0, 0, 1);
    M(M_MVL, 0, 0, 2);
    M(M_MVRP, 0, 0, 4);
    for (int k = 0; k < NPE; k++) begin
      read_pe(1, k, (k + NPE - 1) % NPE);
      read_pe(2, k, (k + 1) % NPE);
      read_pe(4, k, (k + NPE - 1) % NPE);
      read_pe(5, k, (k + NPE - 2) % NPE);
    end
    // back-to-back sts (one result per cycle)
    for (int k = 0; k < 8; k++) STS(0, 0, NPE - 1);
    // sml: PEs >= 5 active, keep only the leftmost (PE 5)
    A(A_MV2, 0, 0, 6, 0, 5);
    A(A_MIF, 0, 6, 3'(F_GEU));
    begin pe_instr_t b = PE_NOP; b.l.op = L_SML; issue(b); end
    STS(0, 1, 5);
    A(A_MEND, 0, 0, 0);     // one mend undoes sml and the mif
    read_pe(2, 0, 1); read_pe(2, 3, 4); read_pe(2, 6, 7);

    // DMA row write while the LSU slot is busy: the grant must wait
    for (int k = 0; k < NPE; k++) dma_wdata[k] = 8'(3 * k + 1);
    dma_req = 1; dma_we = 1; dma_addr = 11'd300;
    begin
      pe_instr_t b = PE_NOP;
      int waited = 0;
      b.s.op = S_LD; b.s.f = F(0, 0, 7);
      issue(b, 0, 0); issue(b, 0, 0);           // two loads in flight
      checks++; if (!lsu_hold) failures++;
      while (!dma_gnt) begin waited++; @(posedge clk); #1; end
      checks++; if (waited < 2) begin failures++; $display("FAIL DMA granted under an LSU op"); end
      @(posedge clk); #1;
    end
    dma_we = 0; dma_addr = 11'd300;
    while (!dma_gnt) @(posedge clk);
    @(posedge clk); #1 dma_req = 0;
    checks++; if (dma_rdata != dma_wdata) begin failures++; $display("FAIL DMA row read back"); end
    // PEs load the row written by DMA
    begin
      pe_instr_t b = PE_NOP; b.s.op = S_LD; b.s.f = F(0, 0, 8); issue(b, 300, 0);
    end
    A(A_NOP, 0, 0, 0);
    for (int k = 0; k < NPE; k += 5) read_pe(8, k, 3 * k + 1);
    repeat (8) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL missing ped results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
