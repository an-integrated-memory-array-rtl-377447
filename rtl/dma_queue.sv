// dma_queue: the DMA engine's two priority request queues.
//
// Two FIFOs of DEPTH descriptors each. A request is pushed into the high
// (prio=1) or low (prio=0) queue; the DMA engine pops with `pop` and always
// receives the oldest high-priority request when there is one, otherwise the
// oldest low-priority one. `head` is valid while `nonempty` is 1. A push
// into a full queue is dropped and counted as a protocol error by an
// assertion. Software-scheduled transfers are queued here while the DMA
// engine works on earlier ones.
//
// The two queues and the depth of 32 follow the document; strict priority
// between them is this design's reading of "priority request queues".
module dma_queue
  import imap_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  logic       prio,
  input  dma_desc_t  desc,
  output logic [1:0] full,       // [1] high queue, [0] low queue
  input  logic       pop,
  output logic       nonempty,
  output dma_desc_t  head
);
  localparam int unsigned PW = $clog2(DEPTH);

  dma_desc_t         mem [2][DEPTH];
  logic [1:0][PW-1:0] rp, wp;
  logic [1:0][PW:0]   cnt;
  logic              sel;    // queue at the head: 1 high, 0 low

  always_comb begin
    sel      = (cnt[1] != 0);
    nonempty = (cnt[1] != 0) || (cnt[0] != 0);
    head     = mem[sel][rp[sel]];
    full[1]  = (cnt[1] == (PW+1)'(DEPTH));
    full[0]  = (cnt[0] == (PW+1)'(DEPTH));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
    end else begin
      for (int q = 0; q < 2; q++) begin
        logic pu, po;
        pu = push && (prio == q[0]) && !full[q];
        po = pop && nonempty && (sel == q[0]);
        if (pu) begin
          mem[q][wp[q]] <= desc;
          wp[q] <= wp[q] + 1'b1;
        end
        if (po) rp[q] <= rp[q] + 1'b1;
        cnt[q] <= cnt[q] + (PW+1)'(pu) - (PW+1)'(po);
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full[prio])
    else $error("dma_queue: push into a full queue");
endmodule
