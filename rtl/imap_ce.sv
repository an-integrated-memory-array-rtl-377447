// imap_ce: a single-chip memory-array SIMD processor for image recognition.
//
// NPE 8-bit 4-way VLIW PEs, each with a 2KB local memory (IMEM), form a ring
// (pe_array). Together the IMEMs are a 2-D memory plane: image column k
// lives in PE k, and a row address broadcast to all PEs selects one image
// row. The control processor (outside this module) issues one PE bundle per
// cycle on `instr` and the bundle's scalar operands one cycle later on
// `scalar`; status collection results return on `ped`.
//
// The external memory interface connects the IMEMs to external memory
// (EMEM): a DMA engine fed by two priority request queues moves rows through
// the line buffers and the line scaler, costing the PE array one IMEM cycle
// per row. A fixed-priority arbiter shares the EMEM word port between the
// control processor (cp_*), the host bus (host_*) and the DMA engine; the
// arbiter's memory side (emem_*) goes to the SDRAM controller. Four video
// shift registers run on `vclk`, capture complete lines, and raise
// `line_irq`; the DMA engine can copy a captured line to EMEM.
//
// Ports to the control processor, host bus and SDRAM controller are brought
// out because those parts are not described in enough detail to build
// (instruction set, bus protocols, device timing). `lsu_hold` asks the
// control processor to leave the LSU slot empty until a DMA row access has
// been granted.
module imap_ce
  import imap_pkg::*;
#(
  parameter int unsigned NPE   = 128,
  parameter int unsigned NREG  = 24,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned QDEPTH = 32,
  parameter int unsigned NCH   = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control processor: broadcast and status collection
  input  pe_instr_t            instr,
  input  pe_scalar_t           scalar,
  output logic [7:0]           ped,
  output logic                 ped_valid,
  output logic                 lsu_hold,
  // DMA request queues (written by control processor software)
  input  logic                 dq_push,
  input  logic                 dq_prio,
  input  dma_desc_t            dq_desc,
  output logic [1:0]           dq_full,
  output logic                 dma_busy,
  output logic                 dma_done,
  // EMEM masters outside this module: control processor caches and host
  input  mem_req_t             cp_req,
  input  logic                 cp_lock,
  output logic                 cp_ready,
  output mem_rsp_t             cp_rsp,
  input  mem_req_t             host_req,
  input  logic                 host_lock,
  output logic                 host_ready,
  output mem_rsp_t             host_rsp,
  // to the SDRAM controller
  output mem_req_t             emem_req,
  output logic [1:0]           emem_tag,
  input  logic                 emem_ready,
  input  mem_rsp_t             emem_rsp,
  input  logic [1:0]           emem_rtag,
  // video
  input  logic                 vclk,
  input  logic                 vrst_n,
  input  logic [1:0]           vmode,
  input  logic                 hsync,
  input  logic                 vvalid,
  input  logic [NCH-1:0][7:0]  vin,
  output logic [NCH-1:0][7:0]  vout,
  output logic                 line_irq
);
  localparam int unsigned AW = $clog2(DEPTH);

  // PE array <-> DMA
  logic                dma_req, dma_we, dma_gnt;
  logic [AW-1:0]       dma_addr;
  logic [NPE-1:0][7:0] dma_wdata, dma_rdata;

  pe_array #(.NPE(NPE), .GRP(8), .NREG(NREG), .DEPTH(DEPTH)) u_array (
    .clk, .rst_n, .instr, .scalar, .ped, .ped_valid,
    .dma_req, .dma_we, .dma_addr, .dma_wdata, .dma_gnt, .dma_rdata, .lsu_hold
  );

  // DMA request queues
  logic      q_nonempty, q_pop;
  dma_desc_t q_head;
  dma_queue #(.DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .push(dq_push), .prio(dq_prio), .desc(dq_desc), .full(dq_full),
    .pop(q_pop), .nonempty(q_nonempty), .head(q_head)
  );

  // video shift registers
  logic [NCH-1:0][NPE-1:0][7:0] sr_line;
  video_sr #(.NPE(NPE), .NCH(NCH)) u_vsr (
    .vclk, .vrst_n, .mode(vmode), .hsync, .vvalid, .vin, .vout,
    .clk, .rst_n, .line(sr_line), .line_irq
  );

  // DMA engine
  mem_req_t dma_mreq;
  logic     dma_mlock, dma_mready;
  mem_rsp_t dma_mrsp;
  dma_engine #(.NPE(NPE), .NCH(NCH), .DEPTH(DEPTH)) u_dma (
    .clk, .rst_n, .q_nonempty, .q_head, .q_pop,
    .imem_req(dma_req), .imem_we(dma_we), .imem_addr(dma_addr), .imem_wdata(dma_wdata),
    .imem_gnt(dma_gnt), .imem_rdata(dma_rdata), .sr_line,
    .m_req(dma_mreq), .m_lock(dma_mlock), .m_ready(dma_mready), .m_rsp(dma_mrsp),
    .busy(dma_busy), .done(dma_done)
  );

  // EMEM arbiter: 0 = CP, 1 = host, 2 = DMA
  mem_req_t [2:0] m_req;
  logic     [2:0] m_lock, m_ready;
  mem_rsp_t [2:0] m_rsp;
  always_comb begin
    m_req  = {dma_mreq, host_req, cp_req};
    m_lock = {dma_mlock, host_lock, cp_lock};
    {dma_mready, host_ready, cp_ready} = m_ready;
    cp_rsp   = m_rsp[0];
    host_rsp = m_rsp[1];
    dma_mrsp = m_rsp[2];
  end

  mem_arbiter #(.NM(3)) u_arb (
    .clk, .rst_n, .m_req, .m_lock, .m_ready, .m_rsp,
    .s_req(emem_req), .s_tag(emem_tag), .s_ready(emem_ready), .s_rsp(emem_rsp), .s_rtag(emem_rtag)
  );
endmodule
