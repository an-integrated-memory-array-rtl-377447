// pe_alu: the ADD unit of one PE (8-bit arithmetic and PE grouping compare).
//
// Purely combinational; it sits in the EX stage of the PE pipeline. It
// computes add, subtract, unsigned saturating add/subtract, absolute
// difference, three-operand max/min and moves, and evaluates the compare
// flag used by the grouping instructions mif/mifc: the flag type is selected
// by the instruction's ir3 field, and the flag is taken from ir1 - ir2
// (minus the stored borrow for mifc). The PE keeps a carry/borrow flag and a
// zero flag from the last add/sub/mif so that mifc can extend a compare to
// 16 bits; the zero flag is chained the same way.
//
// Operations and formulas follow the representative PE instruction table.
// The flag types, unsigned saturation and the use of the borrow for both mr
// and mf in mifc are this design's choices.
module pe_alu
  import imap_pkg::*;
(
  input  add_op_e    op,
  input  logic [7:0] a,        // ir1
  input  logic [7:0] b,        // ir2
  input  logic [7:0] c,        // ir3 (third operand of max/min)
  input  logic [2:0] fsel,     // ir3 field as flag type for mif/mifc
  input  logic [7:0] scalar,   // cr1 low byte for mv2
  input  logic       cin,      // stored carry/borrow flag
  input  logic       zin,      // stored zero flag
  output logic [7:0] y,
  output logic       y_we,     // op writes ir3
  output logic       cout,     // new carry/borrow flag
  output logic       zout,     // new zero flag
  output logic       flags_we, // op updates the stored flags
  output logic       cond      // fs(ir3, ir1-ir2) for mif/mifc
);
  logic [8:0] sum, dif;
  logic       use_c;
  logic       z, n, v, brw;

  always_comb begin
    use_c = (op == A_MIFC) && cin;
    sum   = {1'b0, a} + {1'b0, b};
    dif   = {1'b0, a} - {1'b0, b} - {8'd0, use_c};
    brw   = dif[8];
    z     = (dif[7:0] == 8'd0) && ((op == A_MIFC) ? zin : 1'b1);
    n     = dif[7];
    v     = (a[7] ^ b[7]) & (a[7] ^ dif[7]);
    unique case (flag_e'(fsel))
      F_EQ:  cond = z;
      F_NE:  cond = !z;
      F_LTU: cond = brw;
      F_GEU: cond = !brw;
      F_LT:  cond = n ^ v;
      F_GE:  cond = !(n ^ v);
      F_GTU: cond = !brw && !z;
      F_LEU: cond = brw || z;
      default: cond = 1'b0;
    endcase

    y        = 8'd0;
    y_we     = 1'b1;
    flags_we = 1'b0;
    cout     = cin;
    zout     = zin;
    unique case (op)
      A_ADD:  begin y = sum[7:0]; flags_we = 1'b1; cout = sum[8]; zout = (sum[7:0] == 8'd0); end
      A_SUB:  begin y = dif[7:0]; flags_we = 1'b1; cout = brw;    zout = z; end
      A_SADD: y = sum[8] ? 8'hff : sum[7:0];
      A_SSUB: y = brw ? 8'h00 : dif[7:0];
      A_ABS:  y = brw ? (b - a) : dif[7:0];
      A_MAX:  begin y = (a > b) ? a : b; if (c > y) y = c; end
      A_MIN:  begin y = (a < b) ? a : b; if (c < y) y = c; end
      A_MV:   y = a;
      A_MV2:  y = scalar;
      A_MIF, A_MIFC: begin y_we = 1'b0; flags_we = 1'b1; cout = brw; zout = z; end
      default: y_we = 1'b0;   // nop, pdp (handled by the PE), melse, mset
    endcase
  end
endmodule
