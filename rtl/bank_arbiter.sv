// bank_arbiter: grants the tiles of a cluster access to the memory banks.
//
// Combinational grant with a rotating priority pointer. Each of NP ports may
// request one bank (bank[p]). Banks already taken this cycle by a
// higher-priority agent (bank_busy: the coherence synchronisation write or
// the host) are unavailable. Ports are visited starting at the pointer; a
// port is granted if its bank is still free and, when it needs the single
// coherence-notification slot (need_slot, a store to a replicated variable),
// if that slot is still free. At most one port per bank and at most one
// slot user are granted per cycle. Whenever some request is refused the
// pointer advances by one, so no port is starved. The round-robin policy
// and the notification slot are this design's choices; the architecture
// names a hardware arbiter for local access.
module bank_arbiter #(
  parameter int unsigned NP = 4,
  parameter int unsigned NB = 4,
  parameter int unsigned BW = (NB > 1) ? $clog2(NB) : 1,
  parameter int unsigned PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NP-1:0]          req,
  input  logic [NP-1:0][BW-1:0]  bank,
  input  logic [NP-1:0]          need_slot,
  input  logic [NB-1:0]          bank_busy,
  input  logic                   slot_free,
  output logic [NP-1:0]          gnt
);

  logic [PW-1:0] ptr;
  logic [NB-1:0] taken;
  logic          slot_taken;
  int unsigned   p;

  always_comb begin
    taken      = bank_busy;
    slot_taken = !slot_free;
    gnt        = '0;
    for (int unsigned k = 0; k < NP; k++) begin
      p = (32'(ptr) + k) % NP;
      if (req[p] && 32'(bank[p]) < NB && !taken[bank[p]] && !(need_slot[p] && slot_taken)) begin
        gnt[p]         = 1'b1;
        taken[bank[p]] = 1'b1;
        if (need_slot[p]) slot_taken = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ptr <= '0;
    else if (|(req & ~gnt))     ptr <= (32'(ptr) + 1 >= NP) ? '0 : ptr + 1'b1;
  end

endmodule
