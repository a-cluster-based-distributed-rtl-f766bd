// memory_bank: one bank of a cluster's multi-bank data memory.
//
// A single-port synchronous RAM of WORDS words of W bits: when en is high a
// write stores wdata at addr, and rdata shows the word at addr (the old
// contents on a write) one cycle later. It stands in for the SRAM macro of a
// real implementation. The single-port, one-cycle read behaviour is this
// design's choice; the size comes from the 16 KB memory unit split into as
// many banks as the cluster has tiles.
module memory_bank #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
