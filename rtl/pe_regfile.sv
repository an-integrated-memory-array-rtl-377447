// pe_regfile: the 24 x 8b general purpose registers of one PE.
//
// NWP byte-wide write ports are applied in one clock edge; when two ports
// write the same register in the same cycle the higher-numbered port wins.
// All registers are visible on `regs` so the PE can read any number of
// operands (and register pairs) in its iRF stage. Synchronous active-low
// reset clears every register.
//
// The register count and width are the document's; the port arrangement,
// the write priority and the reset are this design's choices.
module pe_regfile #(
  parameter int unsigned NREG = 24,
  parameter int unsigned NWP  = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NWP-1:0]                we,
  input  logic [NWP-1:0][$clog2(NREG)-1:0] waddr,
  input  logic [NWP-1:0][7:0]           wdata,
  output logic [NREG-1:0][7:0]          regs
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      regs <= '0;
    end else begin
      for (int p = 0; p < NWP; p++)
        if (we[p] && (32'(waddr[p]) < NREG)) regs[waddr[p]] <= wdata[p];
    end
  end
endmodule
