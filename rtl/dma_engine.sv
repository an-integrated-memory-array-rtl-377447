// dma_engine: moves image rows between the PE array's IMEMs (or a video
// shift-register line) and the external memory (EMEM) through the line
// buffers and the line scaler.
//
// It takes descriptors from the DMA request queues (see dma_queue) and
// transfers `rows` consecutive IMEM rows, one row (NPE bytes, one per PE)
// at a time, with EMEM rows `emem_pitch` words apart:
//   IMEM -> EMEM : one IMEM cycle loads the whole row into the line buffers
//                  (through the scaler), then NG write bursts of one 64-bit
//                  word each shift it out, the port locked for the burst.
//   EMEM -> IMEM : NG reads are issued and their answers shifted into the
//                  line buffers; one IMEM cycle then stores the scaled row.
//   SR   -> EMEM : the captured line of video channel `sr_ch` is loaded into
//                  the line buffers and written out like an IMEM row.
// With an always-ready memory an IMEM->EMEM row costs the PE array one IMEM
// cycle and the memory port NG consecutive cycles. `done` pulses for one
// cycle when a descriptor is finished.
//
// The line-buffer based sharing of the IMEMs (one IMEM cycle per row, NG
// shift cycles to the external side) follows the document. The descriptor
// format, the whole-row (full width) rectangles and the state sequence are
// this design's choices. The register `d` keeps the whole descriptor, but
// after the start of a transfer only its direction, channel and step are
// read again (addresses and the row count live in their own counters), so
// lint reports the other bits of `d` as unused; that is expected.
module dma_engine
  import imap_pkg::*;
#(
  parameter int unsigned NPE   = 128,
  parameter int unsigned NCH   = 4,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // request queues
  input  logic                         q_nonempty,
  input  dma_desc_t                    q_head,
  output logic                         q_pop,
  // PE array IMEM row port
  output logic                         imem_req,
  output logic                         imem_we,
  output logic [$clog2(DEPTH)-1:0]     imem_addr,
  output logic [NPE-1:0][7:0]          imem_wdata,
  input  logic                         imem_gnt,
  input  logic [NPE-1:0][7:0]          imem_rdata,
  // captured video lines
  input  logic [NCH-1:0][NPE-1:0][7:0] sr_line,
  // EMEM master port
  output mem_req_t                     m_req,
  output logic                         m_lock,
  input  logic                         m_ready,
  input  mem_rsp_t                     m_rsp,
  // status
  output logic                         busy,
  output logic                         done
);
  localparam int unsigned NG = NPE / 8;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(NG) + 1;

  typedef enum logic [2:0] {IDLE, ROW_RD, ROW_CAP, SR_CAP, SEND, FETCH, ROW_WR, NEXT} st_e;
  st_e st;

  dma_desc_t      d;
  logic [10:0]    rows_left;
  logic [AW-1:0]  row;
  logic [MAW-1:0] base;
  logic [CW-1:0]  wi, ri;

  // line buffers and scaler
  logic                lb_load, lb_shift;
  logic [NG-1:0][63:0] lb_ld_data, lb_q;
  logic [63:0]         lb_in, lb_out;
  logic [NPE-1:0][7:0] sc_in, sc_out;

  line_buffer #(.NG(NG)) u_lb (
    .clk, .rst_n, .load(lb_load), .load_data(lb_ld_data), .shift(lb_shift),
    .in_word(lb_in), .out_word(lb_out), .q(lb_q)
  );
  line_scaler #(.NPE(NPE)) u_sc (.step(d.step), .in_line(sc_in), .out_line(sc_out));

  always_comb begin
    if (st == ROW_WR)       sc_in = lb_q;
    else if (d.dir == D_S2E) sc_in = sr_line[d.sr_ch[$clog2(NCH)-1:0]];
    else                    sc_in = imem_rdata;
    lb_ld_data = sc_out;
    lb_load    = (st == ROW_CAP) || (st == SR_CAP);
    lb_shift   = ((st == SEND) && m_ready) || ((st == FETCH) && m_rsp.rvalid);
    lb_in      = m_rsp.rdata;

    imem_req   = (st == ROW_RD) || (st == ROW_WR);
    imem_we    = (st == ROW_WR);
    imem_addr  = row;
    imem_wdata = sc_out;

    m_req       = '0;
    m_lock      = (st == SEND) || (st == FETCH);
    if (st == SEND) begin
      m_req.valid = 1'b1;
      m_req.we    = 1'b1;
      m_req.addr  = base + MAW'(wi);
      m_req.wdata = lb_out;
    end else if (st == FETCH && wi < CW'(NG)) begin
      m_req.valid = 1'b1;
      m_req.addr  = base + MAW'(wi);
    end
    q_pop = (st == IDLE) && q_nonempty;
    busy  = (st != IDLE);
  end

  function automatic st_e first_state(input dma_dir_e dir);
    unique case (dir)
      D_I2E:   return ROW_RD;
      D_E2I:   return FETCH;
      default: return SR_CAP;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE; d <= '0; rows_left <= '0; row <= '0; base <= '0;
      wi <= '0; ri <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (q_nonempty) begin
          d         <= q_head;
          rows_left <= (q_head.rows == 0) ? 11'd1 : q_head.rows;
          row       <= AW'(q_head.imem_addr);
          base      <= q_head.emem_addr;
          wi <= '0; ri <= '0;
          st        <= first_state(q_head.dir);
        end
        ROW_RD:  if (imem_gnt) st <= ROW_CAP;
        ROW_CAP: st <= SEND;
        SR_CAP:  st <= SEND;
        SEND: if (m_ready) begin
          wi <= wi + 1'b1;
          if (wi == CW'(NG - 1)) st <= NEXT;
        end
        FETCH: begin
          if (m_ready && wi < CW'(NG)) wi <= wi + 1'b1;
          if (m_rsp.rvalid) begin
            ri <= ri + 1'b1;
            if (ri == CW'(NG - 1)) st <= ROW_WR;
          end
        end
        ROW_WR: if (imem_gnt) st <= NEXT;
        NEXT: begin
          wi <= '0; ri <= '0;
          if (rows_left == 11'd1) begin
            done <= 1'b1;
            st   <= IDLE;
          end else begin
            rows_left <= rows_left - 1'b1;
            row       <= row + 1'b1;
            base      <= base + d.emem_pitch;
            st        <= first_state(d.dir);
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
