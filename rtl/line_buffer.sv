// line_buffer: the DMA line buffers, NG shift registers of 64 bits, one per
// group of eight PEs (PE8), together holding one full IMEM row.
//
// `load` copies a whole row (NG x 64b) in one cycle, as in the single IMEM
// access cycle the DMA engine takes from the PE array. `shift` moves the
// chain one word towards word 0: `out_word` is word 0 (PE8 group 0, PEs 0..7
// with PE 0 in bits 7:0) and `in_word` enters at word NG-1. NG shifts move a
// whole row out to, or in from, the external memory side, so a row read out
// in order 0..NG-1 is rebuilt in the same order when shifted back in.
// `load` takes precedence over `shift`.
//
// The 16 x 64b organisation, one register per PE8, follows the document;
// the shift direction and word order are this design's choices.
module line_buffer #(
  parameter int unsigned NG = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [NG-1:0][63:0]  load_data,
  input  logic                 shift,
  input  logic [63:0]          in_word,
  output logic [63:0]          out_word,
  output logic [NG-1:0][63:0]  q
);
  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= load_data;
    else if (shift) q <= {in_word, q[NG-1:1]};
  end
  assign out_word = q[0];
endmodule
