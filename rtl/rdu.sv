// rdu: reduction unit between the PE array and the control processor.
//
// Status collection (sts): every PE offers one byte (0 where masked off);
// the RDU forms the bit-wise OR of all of them in two registered levels, as
// a hierarchy over PE groups: first one OR per group of GRP PEs (a PE8),
// then one OR over the groups. `ped` therefore appears two cycles after the
// PEs' EX stage, with `ped_valid` marking a completed sts.
//
// sml support: `left_any[i]` tells PE i whether any PE to its left
// (lower index) has mr = 1. It is computed combinationally with the same
// group hierarchy (OR per group, prefix over groups, prefix within the
// group) so that sml completes in the EX stage.
//
// The hierarchical OR and the single-cycle throughput follow the document;
// the two-level split, the register placement and the sml prefix network are
// this design's choices.
module rdu #(
  parameter int unsigned NPE = 128,
  parameter int unsigned GRP = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sts_vld,      // an sts is in EX this cycle
  input  logic [NPE-1:0][7:0] sts_in,
  input  logic [NPE-1:0]      mr_in,
  output logic [NPE-1:0]      left_any,
  output logic [7:0]          ped,
  output logic                ped_valid
);
  localparam int unsigned NG = NPE / GRP;

  // ---- status OR, level 1: per group (registered) ----
  logic [NG-1:0][7:0] grp_or, grp_q;
  logic               vld_q;
  always_comb begin
    grp_or = '0;
    for (int g = 0; g < NG; g++)
      for (int k = 0; k < GRP; k++)
        grp_or[g] |= sts_in[g*GRP + k];
  end

  // ---- level 2: over groups (registered) ----
  logic [7:0] all_or;
  always_comb begin
    all_or = '0;
    for (int g = 0; g < NG; g++) all_or |= grp_q[g];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grp_q <= '0; vld_q <= 1'b0; ped <= '0; ped_valid <= 1'b0;
    end else begin
      grp_q     <= grp_or;
      vld_q     <= sts_vld;
      ped_valid <= vld_q;
      if (vld_q) ped <= all_or;
    end
  end

  // ---- leftmost-one prefix for sml ----
  logic [NG-1:0] g_any, g_left;
  logic          acc;
  always_comb begin
    for (int g = 0; g < NG; g++) g_any[g] = |mr_in[g*GRP +: GRP];
    acc = 1'b0;
    for (int g = 0; g < NG; g++) begin
      g_left[g] = acc;
      acc       = acc | g_any[g];
    end
    for (int g = 0; g < NG; g++) begin
      acc = g_left[g];
      for (int k = 0; k < GRP; k++) begin
        left_any[g*GRP + k] = acc;
        acc                 = acc | mr_in[g*GRP + k];
      end
    end
  end
endmodule
