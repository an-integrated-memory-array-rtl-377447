// video_sr: the video input/output shift registers SR0..SR3 (NCH channels of
// NPE 8-bit elements, element k of every channel belonging to PE k), with
// the line-complete interrupt logic.
//
// Video clock domain: on every vclk edge with `vvalid` one pixel enters each
// active chain at its tail and every element takes its successor's value;
// the pixel leaving the head of channel c appears on vout[c]. The chaining
// is set by `mode` (pixels per PE, 1 << mode):
//   mode 0: four independent 128-pixel chains, one per channel, fed by
//           vin[c];
//   mode 1: two 256-pixel chains, SR0/SR1 fed by vin[0] and SR2/SR3 fed by
//           vin[2]; PE k receives pixels 2k and 2k+1 (in SR0 and SR1);
//   mode 2: one 512-pixel chain through all four channels fed by vin[0];
//           PE k receives pixels 4k..4k+3 in SR0..SR3.
// `hsync` restarts the pixel count; when a whole line (NPE << mode valid
// pixels) has been shifted in, the contents are copied to `line` on the next
// vclk edge and a toggle is sent to the system clock domain, where it
// becomes a one-cycle `line_irq` pulse (for the interrupt routine that
// starts the DMA transfer). `line` stays stable until the next line has been
// shifted in, so the system domain reads it as quasi-static data; `mode`
// must only change while video is idle.
//
// Four channels of NPE x 8b, the video clock, the 1..4 pixel-per-PE
// reconfiguration and the interrupt on a completed line, counted from the
// sync and valid inputs, follow the document. The chain order, the capture
// register and the synchroniser are this design's choices.
module video_sr #(
  parameter int unsigned NPE = 128,
  parameter int unsigned NCH = 4
) (
  input  logic                         vclk,
  input  logic                         vrst_n,
  input  logic [1:0]                   mode,
  input  logic                         hsync,
  input  logic                         vvalid,
  input  logic [NCH-1:0][7:0]          vin,
  output logic [NCH-1:0][7:0]          vout,
  // system clock side
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [NCH-1:0][NPE-1:0][7:0] line,
  output logic                         line_irq
);
  localparam int unsigned CNTW = $clog2(NPE * NCH) + 1;

  logic [NCH-1:0][NPE-1:0][7:0] sr, sr_nx;
  logic [CNTW-1:0]              cnt;
  logic                         cap, tgl;
  int unsigned                  g;

  always_comb begin
    g = 1 << mode;
    if (g > NCH) g = NCH;
    for (int c = 0; c < NCH; c++) begin
      for (int k = 0; k < NPE; k++) begin
        if ((c % g) != g - 1)   sr_nx[c][k] = sr[c+1][k];
        else if (k < NPE - 1)   sr_nx[c][k] = sr[c-g+1][k+1];
        else                    sr_nx[c][k] = vin[c-g+1];
      end
      vout[c] = sr[c][0];
    end
  end

  always_ff @(posedge vclk) begin
    if (!vrst_n) begin
      sr <= '0; cnt <= '0; cap <= 1'b0; tgl <= 1'b0; line <= '0;
    end else begin
      cap <= 1'b0;
      if (hsync) begin
        cnt <= '0;
      end else if (vvalid) begin
        sr <= sr_nx;
        if (cnt == CNTW'(NPE * g - 1)) begin
          cnt <= '0;
          cap <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (cap) begin
        line <= sr;
        tgl  <= !tgl;
      end
    end
  end

  // toggle synchroniser into the system clock domain
  logic [2:0] sync;
  always_ff @(posedge clk) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], tgl};
  end
  assign line_irq = sync[2] ^ sync[1];
endmodule
