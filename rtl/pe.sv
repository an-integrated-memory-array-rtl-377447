// pe: one 4-way VLIW processing element with its local memory (IMEM).
//
// Three pipeline stages, as in the PE array pipeline: iRF reads operands,
// EX runs the ADD, LOG, MUL, LSU and COMM units, iWB writes the register
// file. The four slots of the broadcast bundle execute together, so a PE can
// do three register operations and one IMEM access per cycle.
//
// Timing: `instr` is the bundle in the iRF stage this cycle; `scalar` (cr1,
// cr2 from the control processor) arrives one cycle later, aligned with the
// same bundle's EX stage. Results are forwarded from EX and iWB to iRF, so a
// dependent register operation can issue in the very next cycle. A load
// returns its byte in iWB: the bundle right after a load must not read the
// loaded register (one load delay slot, left to the code generator).
//
// Grouping: mr and mf are one-bit registers updated in EX by mif/mifc
// (mr = fs & mr, mf = ~fs & mr), melse (swap) and mend (mr |= mf), and by
// sml from the LOG slot (mr is kept only in the leftmost PE with mr=1; the
// cleared bits are ORed into mf, so one mend restores the mask that was in
// force before the enclosing mif together with the sml). A slot whose mask bit
// is 1 does not write back (register or IMEM) in PEs whose mr is 0. mr
// resets to 1.
//
// COMM: every PE drives the register pair read by its MUL slot on comm_out;
// mvr/mvl(p) take the left/right neighbour's value in EX (16-bit link).
// Status: for sts the LOG slot's ir1 is driven on sts_out (0 where masked).
// IMEM: the DMA port (dma_*) takes the RAM in a cycle where it is granted;
// the array grants it only when lsu_busy is 0, i.e. no LSU op is in EX.
//
// The stage names, unit set, register count, 16-bit neighbour link and the
// instruction formulas follow the document. Slot assignment of each
// operation, forwarding paths, the load delay slot, the write priority
// between slots (LSU > MUL > LOG > ADD) and mask-register handling beyond
// mif/mifc are this design's choices.
module pe
  import imap_pkg::*;
#(
  parameter int unsigned NREG  = 24,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned IDW   = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [IDW-1:0]           my_id,
  input  pe_instr_t                instr,     // iRF stage
  input  pe_scalar_t               scalar,    // EX stage
  // ring
  output logic [15:0]              comm_out,
  input  logic [15:0]              left_in,
  input  logic [15:0]              right_in,
  // status collection / sml
  output logic                     mr_out,
  input  logic                     left_any,  // some PE to the left has mr=1
  output logic [7:0]               sts_out,
  // DMA access to IMEM
  output logic                     lsu_busy,
  input  logic                     dma_en,
  input  logic                     dma_we,
  input  logic [$clog2(DEPTH)-1:0] dma_addr,
  input  logic [7:0]               dma_wdata,
  output logic [7:0]               dma_rdata
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned NWP = 5;           // A, L, Mlo, Mhi, S
  typedef logic [RW-1:0] ra_t;

  // ---------------- register file --------------------------------------
  logic [NWP-1:0]          wb_we;
  logic [NWP-1:0][RW-1:0]  wb_wa;
  logic [NWP-1:0][7:0]     wb_wd;
  logic [NREG-1:0][7:0]    regs;

  pe_regfile #(.NREG(NREG), .NWP(NWP)) u_rf (
    .clk, .rst_n, .we(wb_we), .waddr(wb_wa), .wdata(wb_wd), .regs
  );

  // EX-stage write intents (port 4, the load, is only known in iWB)
  logic [NWP-1:0]          ex_we;
  logic [NWP-1:0][RW-1:0]  ex_wa;
  logic [NWP-1:0][7:0]     ex_wd;

  function automatic logic [7:0] rd(
    input ra_t                      r,
    input logic [NREG-1:0][7:0]     rf,
    input logic [NWP-1:0]           w1e, input logic [NWP-1:0][RW-1:0] w1a, input logic [NWP-1:0][7:0] w1d,
    input logic [NWP-1:0]           w2e, input logic [NWP-1:0][RW-1:0] w2a, input logic [NWP-1:0][7:0] w2d
  );
    logic [7:0] v;
    v = (32'(r) < NREG) ? rf[r] : 8'd0;
    for (int p = 0; p < NWP; p++) if (w1e[p] && w1a[p] == r) v = w1d[p];   // iWB
    for (int p = 0; p < NWP; p++) if (w2e[p] && w2a[p] == r) v = w2d[p];   // EX
    return v;
  endfunction

  // ---------------- iRF stage -----------------------------------------
  logic [7:0]  rf_a1, rf_a2, rf_a3, rf_l1, rf_l2, rf_m2, rf_s1;
  logic [15:0] rf_m1p, rf_s2p;

  always_comb begin
    rf_a1  = rd(instr.a.f.r1, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_a2  = rd(instr.a.f.r2, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_a3  = rd(instr.a.f.r3, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_l1  = rd(instr.l.f.r1, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_l2  = rd(instr.l.f.r2, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_m1p = {rd(instr.m.f.r1 + ra_t'(1), regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd),
              rd(instr.m.f.r1,            regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd)};
    rf_m2  = rd(instr.m.f.r2, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_s1  = rd(instr.s.f.r1, regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd);
    rf_s2p = {rd(instr.s.f.r2 + ra_t'(1), regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd),
              rd(instr.s.f.r2,            regs, wb_we, wb_wa, wb_wd, ex_we, ex_wa, ex_wd)};
  end

  pe_instr_t   ex_i;
  logic [7:0]  ex_a1, ex_a2, ex_a3, ex_l1, ex_l2, ex_m2, ex_s1;
  logic [15:0] ex_m1p, ex_s2p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_i <= PE_NOP;
      {ex_a1, ex_a2, ex_a3, ex_l1, ex_l2, ex_m2, ex_s1} <= '0;
      {ex_m1p, ex_s2p} <= '0;
    end else begin
      ex_i   <= instr;
      ex_a1  <= rf_a1;  ex_a2 <= rf_a2;  ex_a3 <= rf_a3;
      ex_l1  <= rf_l1;  ex_l2 <= rf_l2;
      ex_m1p <= rf_m1p; ex_m2 <= rf_m2;
      ex_s1  <= rf_s1;  ex_s2p <= rf_s2p;
    end
  end

  // ---------------- EX stage ------------------------------------------
  logic mr, mf, cf, zf;

  function automatic logic allowed(input logic mask_bit, input logic m);
    return !mask_bit || m;
  endfunction

  logic [7:0]  alu_y;
  logic        alu_we, alu_c, alu_z, alu_fwe, alu_cond;
  logic [7:0]  log_y, log_sts;
  logic        log_we;
  logic [15:0] mul_p;

  pe_alu u_alu (
    .op(ex_i.a.op), .a(ex_a1), .b(ex_a2), .c(ex_a3), .fsel(ex_i.a.f.r3[2:0]),
    .scalar(scalar.cr1[7:0]), .cin(cf), .zin(zf),
    .y(alu_y), .y_we(alu_we), .cout(alu_c), .zout(alu_z), .flags_we(alu_fwe), .cond(alu_cond)
  );
  pe_log u_log (.op(ex_i.l.op), .a(ex_l1), .b(ex_l2), .y(log_y), .y_we(log_we), .sts_v(log_sts));
  pe_mul u_mul (.a(ex_m1p[7:0]), .b(ex_m2), .p(mul_p));

  logic a_ok, l_ok, m_ok, s_ok, pdp_hit;
  always_comb begin
    a_ok    = allowed(ex_i.a.f.mask, mr);
    l_ok    = allowed(ex_i.l.f.mask, mr);
    m_ok    = allowed(ex_i.m.f.mask, mr);
    s_ok    = allowed(ex_i.s.f.mask, mr);
    pdp_hit = (ex_i.a.op == A_PDP) && (scalar.cr1 == SW'(my_id));

    ex_we = '0; ex_wa = '0; ex_wd = '0;
    // port 0: ADD unit (and pdp)
    ex_wa[0] = ex_i.a.f.r3;
    ex_we[0] = a_ok && (alu_we || pdp_hit);
    ex_wd[0] = pdp_hit ? scalar.cr2[7:0] : alu_y;
    // port 1: LOG unit
    ex_wa[1] = ex_i.l.f.r3;
    ex_we[1] = l_ok && log_we;
    ex_wd[1] = log_y;
    // ports 2/3: MUL unit or COMM (register pair ir3P)
    ex_wa[2] = ex_i.m.f.r3;
    ex_wa[3] = ex_i.m.f.r3 + ra_t'(1);
    unique case (ex_i.m.op)
      M_MUL:  begin ex_we[2] = m_ok; ex_we[3] = m_ok; ex_wd[2] = mul_p[7:0];     ex_wd[3] = mul_p[15:8];    end
      M_MVR:  begin ex_we[2] = m_ok;                  ex_wd[2] = left_in[7:0];                               end
      M_MVL:  begin ex_we[2] = m_ok;                  ex_wd[2] = right_in[7:0];                              end
      M_MVRP: begin ex_we[2] = m_ok; ex_we[3] = m_ok; ex_wd[2] = left_in[7:0];   ex_wd[3] = left_in[15:8];  end
      M_MVLP: begin ex_we[2] = m_ok; ex_we[3] = m_ok; ex_wd[2] = right_in[7:0];  ex_wd[3] = right_in[15:8]; end
      default: ;
    endcase
    // port 4 (load) is written from the IMEM output in iWB
  end

  assign comm_out = ex_m1p;
  assign mr_out   = mr;
  assign sts_out  = l_ok ? log_sts : 8'd0;
  assign lsu_busy = (ex_i.s.op != S_NOP);

  // mask and flag registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mr <= 1'b1; mf <= 1'b0; cf <= 1'b0; zf <= 1'b1;
    end else begin
      if (alu_fwe && (a_ok || ex_i.a.op inside {A_MIF, A_MIFC})) begin
        cf <= alu_c; zf <= alu_z;
      end
      unique case (ex_i.a.op)
        A_MIF, A_MIFC: begin mr <= alu_cond & mr; mf <= !alu_cond & mr; end
        A_MELSE:       begin mr <= mf;            mf <= mr;             end
        A_MEND:        begin mr <= mr | mf;       mf <= 1'b0;           end
        default: ;
      endcase
      if (ex_i.l.op == L_SML) begin
        mr <= mr & !left_any;
        mf <= mf | (mr & left_any);
      end
    end
  end

  // LSU and IMEM
  logic          lsu_ld, lsu_st;
  logic [AW-1:0] lsu_addr;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [7:0]    mem_wd, mem_rd;

  always_comb begin
    lsu_ld   = ex_i.s.op inside {S_LD, S_LDT};
    lsu_st   = (ex_i.s.op inside {S_ST, S_STT}) && s_ok;
    lsu_addr = AW'(scalar.cr1 + ((ex_i.s.op inside {S_LDT, S_STT}) ? ex_s2p : scalar.cr2));
    if (dma_en) begin
      mem_en = 1'b1; mem_we = dma_we; mem_addr = dma_addr; mem_wd = dma_wdata;
    end else begin
      mem_en = lsu_ld || lsu_st; mem_we = lsu_st; mem_addr = lsu_addr; mem_wd = ex_s1;
    end
  end

  pe_imem #(.DEPTH(DEPTH)) u_imem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wd), .rdata(mem_rd)
  );
  assign dma_rdata = mem_rd;

  // ---------------- iWB stage -----------------------------------------
  logic [3:0]          wb_we_r;
  logic [3:0][RW-1:0]  wb_wa_r;
  logic [3:0][7:0]     wb_wd_r;
  logic                wb_ld;
  logic [RW-1:0]       wb_ld_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_we_r <= '0; wb_wa_r <= '0; wb_wd_r <= '0; wb_ld <= 1'b0; wb_ld_r <= '0;
    end else begin
      wb_we_r <= ex_we[3:0];
      wb_wa_r <= ex_wa[3:0];
      wb_wd_r <= ex_wd[3:0];
      wb_ld   <= lsu_ld && s_ok && !dma_en;
      wb_ld_r <= ex_i.s.f.r3;
    end
  end

  always_comb begin
    wb_we = {wb_ld,   wb_we_r};
    wb_wa = {wb_ld_r, wb_wa_r};
    wb_wd = {mem_rd,  wb_wd_r};
  end

  // The DMA port may only take the IMEM while no LSU op is in EX.
  a_dma_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) dma_en |-> !lsu_busy)
    else $error("pe: DMA IMEM access collides with an LSU op");
endmodule
