// line_scaler: resamples one image line of NPE 8-bit pixels on the DMA path.
//
// Output pixel j takes input pixel floor(j * step / 64), or 0 when that index
// falls past the end of the line (nearest-neighbour resampling). `step` is
// the number of input pixels per output pixel in units of 1/64 and is
// clamped to 16..256: 16 enlarges the line 4 times (400%), 64 copies it
// unchanged, 256 reduces it to a quarter (25%). Purely combinational.
//
// The document gives only the unit's purpose and its 25% to 400% range;
// nearest-neighbour resampling and the fixed-point step are this design's
// choices.
module line_scaler #(
  parameter int unsigned NPE = 128
) (
  input  logic [8:0]           step,
  input  logic [NPE-1:0][7:0]  in_line,
  output logic [NPE-1:0][7:0]  out_line
);
  logic [8:0]  st;
  logic [31:0] pos;
  always_comb begin
    st = (step < 9'd16) ? 9'd16 : step;
    for (int j = 0; j < NPE; j++) begin
      pos = (32'(j) * 32'(st)) >> 6;
      out_line[j] = (pos < NPE) ? in_line[pos[$clog2(NPE)-1:0]] : 8'd0;
    end
  end
endmodule
