// pe_log: the LOG unit of one PE (8-bit logic and one-bit shifts).
//
// Purely combinational, in the EX stage. and/or/xor/not and shifts by one
// bit. For the status-collection operation sts it passes ir1 through as the
// value the PE contributes to the array-wide OR; sml produces no register
// result (it only changes mr, which the PE handles).
//
// The document only names this unit; the operation set is this design's
// choice. The shift by one bit follows the "sll" entry of the instruction
// table, read as a left shift as its name says, with srl/sra added.
module pe_log
  import imap_pkg::*;
(
  input  log_op_e    op,
  input  logic [7:0] a,      // ir1
  input  logic [7:0] b,      // ir2
  output logic [7:0] y,
  output logic       y_we,   // op writes ir3
  output logic [7:0] sts_v   // contribution to the status OR
);
  always_comb begin
    y    = 8'd0;
    y_we = 1'b1;
    unique case (op)
      L_AND: y = a & b;
      L_OR:  y = a | b;
      L_XOR: y = a ^ b;
      L_NOT: y = ~a;
      L_SLL: y = {a[6:0], 1'b0};
      L_SRL: y = {1'b0, a[7:1]};
      L_SRA: y = {a[7], a[7:1]};
      default: y_we = 1'b0;
    endcase
    sts_v = (op == L_STS) ? a : 8'd0;
  end
endmodule
