// crossbar: the 6-input, 12-output switch at the heart of a tile.
//
// Combinational. Every output independently selects one of the NIN inputs
// by its select field; an out-of-range select yields zero. In the tile the
// inputs are the four neighbour links (N, E, S, W), the registered
// function-unit result and the load data, and the outputs feed the four
// outgoing bypass buffers and the eight registers. The 6x12 size follows
// the architecture; the assignment of inputs and outputs is this design's.
module crossbar #(
  parameter int unsigned NIN  = 6,
  parameter int unsigned NOUT = 12,
  parameter int unsigned W    = 32,
  parameter int unsigned SW   = $clog2(NIN)
) (
  input  logic [NIN-1:0][W-1:0]   in,
  input  logic [NOUT-1:0][SW-1:0] sel,
  output logic [NOUT-1:0][W-1:0]  out
);

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out[o] = '0;
      for (int i = 0; i < NIN; i++)
        if (sel[o] == SW'(i)) out[o] = in[i];
    end
  end

endmodule
