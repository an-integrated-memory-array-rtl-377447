// pe_mul: the MUL unit of one PE, an unsigned 8b x 8b multiplier.
//
// Combinational, in the EX stage; the 16-bit product is written to the
// register pair ir3P (ir3 holds the low byte, ir3+1 the high byte). Operand
// signedness is not stated in the document; unsigned is this design's choice.
module pe_mul (
  input  logic [7:0]  a,   // ir1
  input  logic [7:0]  b,   // ir2
  output logic [15:0] p    // ir3P
);
  always_comb p = 16'(a) * 16'(b);
endmodule
