// control_memory: configuration store and sequencer of a CGRA tile.
//
// Holds DEPTH configuration words, written one at a time through the cfg_*
// port before the kernel starts. While run is high, a context counter steps
// through entries 0 .. ii-1 and wraps, so the tile repeats its schedule every
// ii cycles (the initiation interval of the modulo-scheduled loop). The
// counter holds while stall is high and returns to 0 while run is low. The
// word at the counter is presented combinationally on word. The depth of 16
// and the write port are this design's choices; the architecture only names
// the unit.
module control_memory
  import cgra_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned PW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            stall,
  input  logic [PW:0]     ii,       // initiation interval, 1..DEPTH
  input  logic            cfg_we,
  input  logic [PW-1:0]   cfg_addr,
  input  cfg_word_t       cfg_data,
  output cfg_word_t       word,
  output logic [PW-1:0]   ctx
);

  cfg_word_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (cfg_we) begin
      mem[cfg_addr] <= cfg_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        ctx <= '0;
    else if (!run)                     ctx <= '0;
    else if (!stall) begin
      if ({1'b0, ctx} + 1'b1 >= ii)    ctx <= '0;
      else                             ctx <= ctx + 1'b1;
    end
  end

  assign word = mem[ctx];

endmodule
