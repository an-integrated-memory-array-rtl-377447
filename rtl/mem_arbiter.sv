// mem_arbiter: shares the external memory (EMEM) word port between the
// control processor (master 0, cache misses), the host bus (master 1) and
// the DMA engine (master 2).
//
// Each master offers a request (valid, we, address, 64-bit data) and sees
// `ready` when the memory takes it. Among the valid masters the lowest index
// wins. A master that raises `lock` with a request keeps the port, without
// re-arbitration, until a request with `lock` low has been taken; the DMA engine does this for a
// 16-word line burst. Every request leaves with the master's index as its
// tag, and a read response comes back with that tag and is routed to that
// master only, so the memory side may take several reads before it answers.
//
// The three requesters are the document's; the fixed priority (in the
// order the document lists them), the lock and the tagged responses are
// this design's choices. Read data is fanned out to every master unchanged;
// only `rvalid` is steered by the tag, so a master must look at rdata only
// when its own rvalid is high.
module mem_arbiter
  import imap_pkg::*;
#(
  parameter int unsigned NM = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mem_req_t [NM-1:0]        m_req,
  input  logic     [NM-1:0]        m_lock,
  output logic     [NM-1:0]        m_ready,
  output mem_rsp_t [NM-1:0]        m_rsp,
  // to the memory controller
  output mem_req_t                 s_req,
  output logic [$clog2(NM)-1:0]    s_tag,
  input  logic                     s_ready,
  input  mem_rsp_t                 s_rsp,
  input  logic [$clog2(NM)-1:0]    s_rtag
);
  localparam int unsigned TW = $clog2(NM);

  logic          locked;
  logic [TW-1:0] owner, sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    if (locked) begin
      sel = owner;
      any = m_req[owner].valid;
    end else begin
      for (int m = NM-1; m >= 0; m--)
        if (m_req[m].valid) begin sel = TW'(m); any = 1'b1; end
    end
    s_req       = any ? m_req[sel] : '0;
    s_tag       = sel;
    m_ready     = '0;
    m_ready[sel] = any && s_ready;
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].rvalid = s_rsp.rvalid && (s_rtag == TW'(m));
      m_rsp[m].rdata  = s_rsp.rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0; owner <= '0;
    end else if (locked) begin
      if (!m_lock[owner] && (!m_req[owner].valid || s_ready)) locked <= 1'b0;
    end else if (any && m_lock[sel]) begin
      locked <= 1'b1; owner <= sel;
    end
  end
endmodule
