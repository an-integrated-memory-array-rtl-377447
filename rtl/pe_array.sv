// pe_array: the SIMD array of NPE PEs connected in a ring, with the
// broadcast and reduction stages that couple it to the control processor.
//
// Pipeline (one bundle per cycle, no stalls):
//   cycle t   : `instr` presented (CP register-read stage)
//   cycle t+1 : BC1 register drives the bundle to every PE (PE iRF)
//               `scalar` for that bundle presented (CP execute stage)
//   cycle t+2 : BC2 register drives the scalar; PEs execute (EX)
//   cycle t+3 : PEs write back (iWB); RDU group level
//   cycle t+4 : `ped`/`ped_valid` hold the sts result (CP status write-back)
// PE i's left neighbour is PE i-1 and its right neighbour PE i+1, modulo
// NPE (ring). PE 0 is the leftmost.
//
// DMA row access: with dma_req=1 the DMA engine asks for one IMEM cycle in
// which every PE's IMEM is accessed at the same row `dma_addr` (one byte per
// PE, NPE bytes in all). It is granted (dma_gnt) in a cycle where no LSU op
// is in EX; read data is on dma_rdata in the following cycle. `lsu_hold`
// asks the instruction source to issue bundles with an empty LSU slot while
// a DMA request waits.
//
// The ring, the broadcast/reduction stages (BC1, BC2, RDU) and the single
// shared IMEM cycle per row transfer follow the document; the exact cycle
// placement and the grant rule are this design's choices.
module pe_array
  import imap_pkg::*;
#(
  parameter int unsigned NPE   = 128,
  parameter int unsigned GRP   = 8,
  parameter int unsigned NREG  = 24,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  pe_instr_t                instr,
  input  pe_scalar_t               scalar,
  output logic [7:0]               ped,
  output logic                     ped_valid,
  // DMA row port
  input  logic                     dma_req,
  input  logic                     dma_we,
  input  logic [$clog2(DEPTH)-1:0] dma_addr,
  input  logic [NPE-1:0][7:0]      dma_wdata,
  output logic                     dma_gnt,
  output logic [NPE-1:0][7:0]      dma_rdata,
  output logic                     lsu_hold
);
  localparam int unsigned IDW = (NPE > 1) ? $clog2(NPE) : 1;

  pe_instr_t  bc1;
  pe_scalar_t bc2;
  logic       sts_ex;   // an sts bundle is in EX

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bc1 <= PE_NOP; bc2 <= '0; sts_ex <= 1'b0;
    end else begin
      bc1    <= instr;
      bc2    <= scalar;
      sts_ex <= (bc1.l.op == L_STS);
    end
  end

  logic [NPE-1:0][15:0] comm;
  logic [NPE-1:0]       mr, left_any, busy;
  logic [NPE-1:0][7:0]  sts;

  assign dma_gnt  = dma_req && !(|busy);
  assign lsu_hold = dma_req;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    pe #(.NREG(NREG), .DEPTH(DEPTH), .IDW(IDW)) u_pe (
      .clk, .rst_n,
      .my_id    (IDW'(i)),
      .instr    (bc1),
      .scalar   (bc2),
      .comm_out (comm[i]),
      .left_in  (comm[(i + NPE - 1) % NPE]),
      .right_in (comm[(i + 1) % NPE]),
      .mr_out   (mr[i]),
      .left_any (left_any[i]),
      .sts_out  (sts[i]),
      .lsu_busy (busy[i]),
      .dma_en   (dma_gnt),
      .dma_we   (dma_we),
      .dma_addr (dma_addr),
      .dma_wdata(dma_wdata[i]),
      .dma_rdata(dma_rdata[i])
    );
  end

  rdu #(.NPE(NPE), .GRP(GRP)) u_rdu (
    .clk, .rst_n, .sts_vld(sts_ex), .sts_in(sts), .mr_in(mr),
    .left_any, .ped, .ped_valid
  );
endmodule
