// pe_imem: one PE's local memory (IMEM), a single-port synchronous RAM.
//
// One access per cycle: with en=1 and we=1 the byte is written, with en=1
// and we=0 the byte at addr appears on rdata after the clock edge (one-cycle
// read latency). rdata holds its value when en=0. The 2KB size and the
// single port are the document's; the timing is this design's choice. No
// reset: the contents are undefined until written.
module pe_imem #(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
