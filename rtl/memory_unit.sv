// memory_unit: the local memory shared by the tiles of one cluster.
//
// It combines a multi-bank data memory, a hardware arbiter and a coherence
// module. There are as many banks as tiles in the cluster (NP), so all tiles
// can be served in the same cycle when their words lie in different banks.
// Words are interleaved: word address a lives in bank a mod NP, row a / NP.
//
// Priorities per bank, highest first: the synchronisation write sent by the
// coherence controller, the host port (used to load and read data while the
// array is idle), then the tile ports through the round-robin bank_arbiter.
// A tile's load is also refused while the controller is invalidating that
// very word in this cluster (inv_valid/inv_addr), so it reads the
// synchronised value a cycle later. A store to a replicated variable needs
// room in the coherence module's notification FIFO and at most one such
// store is granted per cycle.
//
// Tile protocol: tile_req is held while tile_ready is low. A refused request
// makes the whole array stall (stall high, computed outside from all
// ready signals); a port that was already served during a stall is marked
// and not served again, so each request is performed exactly once. Load data
// appears on tile_rdata the cycle after the access and is held there until
// the port's next access. Host reads have the same one-cycle latency.
//
// The bank count equal to the cluster size, the 16 KB size and the
// arbiter/coherence-module composition follow the architecture; the
// interleaving, the priorities, the stall protocol and the host port are
// this design's choices.
module memory_unit
  import cgra_pkg::*;
#(
  parameter int unsigned NP        = 4,      // tiles per cluster = banks
  parameter int unsigned MEM_BYTES = 16384,  // capacity of the memory unit
  parameter int unsigned NVAR      = 16,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned WORDS     = MEM_BYTES / (DW / 8),
  parameter int unsigned LAW       = $clog2(WORDS),
  parameter int unsigned BWORDS    = (WORDS + NP - 1) / NP,
  parameter int unsigned RAW       = $clog2(BWORDS),
  parameter int unsigned BW        = (NP > 1) ? $clog2(NP) : 1,
  parameter int unsigned VW        = $clog2(NVAR)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   stall,
  // tile ports
  input  mem_req_t [NP-1:0]      tile_req,
  output logic [NP-1:0][DW-1:0]  tile_rdata,
  output logic [NP-1:0]          tile_ready,
  // host port
  input  logic                   host_en,
  input  logic                   host_we,
  input  logic [LAW-1:0]         host_addr,
  input  logic [DW-1:0]          host_wdata,
  output logic [DW-1:0]          host_rdata,
  // from the coherence controller
  input  logic                   inv_valid,
  input  logic [LAW-1:0]         inv_addr,
  input  logic                   sync_valid,
  input  logic [LAW-1:0]         sync_addr,
  input  logic [DW-1:0]          sync_data,
  // write notification to the coherence controller
  output logic                   notif_valid,
  output logic [LAW-1:0]         notif_addr,
  output logic [DW-1:0]          notif_data,
  input  logic                   notif_ready,
  // variable table of the coherence module
  input  logic                   cfg_we,
  input  logic [VW-1:0]          cfg_idx,
  input  logic [LAW-1:0]         cfg_base,
  input  logic [LAW:0]           cfg_size,
  input  logic                   cfg_shared
);

  function automatic logic [BW-1:0] bank_of(input logic [LAW-1:0] a);
    return BW'(32'(a) % NP);
  endfunction

  function automatic logic [RAW-1:0] row_of(input logic [LAW-1:0] a);
    return RAW'(32'(a) / NP);
  endfunction

  logic [NP-1:0][LAW-1:0] p_addr;
  logic [NP-1:0][BW-1:0]  p_bank;
  logic [NP-1:0]          p_hit, p_elig, p_slot, gnt, served_q;
  logic [NP-1:0]          bank_busy;
  logic                   q_full, push;
  logic [LAW-1:0]         push_addr;
  logic [DW-1:0]          push_data;

  logic [NP-1:0]           b_en, b_we;
  logic [NP-1:0][RAW-1:0]  b_row;
  logic [NP-1:0][DW-1:0]   b_wdata, b_rdata;

  logic [NP-1:0]          gnt_d1;
  logic [NP-1:0][BW-1:0]  bank_d1;
  logic [NP-1:0][DW-1:0]  hold_q;
  logic                   host_rd_d1;
  logic [BW-1:0]          host_bank_d1;
  logic [DW-1:0]          host_hold_q;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      p_addr[p] = tile_req[p].addr[LAW-1:0];
      p_bank[p] = bank_of(p_addr[p]);
    end
  end

  coherence_module #(.NP(NP), .NVAR(NVAR), .LAW(LAW), .DEPTH(QDEPTH)) u_coh (
    .clk, .rst_n,
    .cfg_we, .cfg_idx, .cfg_base, .cfg_size, .cfg_shared,
    .addr(p_addr), .hit(p_hit),
    .push, .push_addr, .push_data, .full(q_full),
    .notif_valid, .notif_addr, .notif_data, .notif_ready
  );

  always_comb begin
    bank_busy = '0;
    if (sync_valid) bank_busy[bank_of(sync_addr)] = 1'b1;
    if (host_en)    bank_busy[bank_of(host_addr)] = 1'b1;
    for (int p = 0; p < NP; p++) begin
      p_elig[p] = tile_req[p].req && !served_q[p] &&
                  !(!tile_req[p].we && inv_valid && p_addr[p] == inv_addr);
      p_slot[p] = tile_req[p].we && p_hit[p];
    end
  end

  bank_arbiter #(.NP(NP), .NB(NP)) u_arb (
    .clk, .rst_n,
    .req(p_elig), .bank(p_bank), .need_slot(p_slot),
    .bank_busy, .slot_free(!q_full),
    .gnt
  );

  logic [NP-1:0] p_req, p_we;
  always_comb
    for (int p = 0; p < NP; p++) begin
      p_req[p] = tile_req[p].req;
      p_we[p]  = tile_req[p].we;
    end

  assign tile_ready = ~p_req | gnt | served_q;

  // notification push: the (single) granted store that hits a replicated variable
  always_comb begin
    push      = 1'b0;
    push_addr = '0;
    push_data = '0;
    for (int p = 0; p < NP; p++)
      if (gnt[p] && p_slot[p]) begin
        push      = 1'b1;
        push_addr = p_addr[p];
        push_data = tile_req[p].wdata;
      end
  end

  // bank port selection
  always_comb begin
    b_en    = '0;
    b_we    = '0;
    b_row   = '0;
    b_wdata = '0;
    for (int p = 0; p < NP; p++)
      if (gnt[p]) begin
        b_en[p_bank[p]]    = 1'b1;
        b_we[p_bank[p]]    = tile_req[p].we;
        b_row[p_bank[p]]   = row_of(p_addr[p]);
        b_wdata[p_bank[p]] = tile_req[p].wdata;
      end
    if (host_en) begin
      b_en[bank_of(host_addr)]    = 1'b1;
      b_we[bank_of(host_addr)]    = host_we;
      b_row[bank_of(host_addr)]   = row_of(host_addr);
      b_wdata[bank_of(host_addr)] = host_wdata;
    end
    if (sync_valid) begin
      b_en[bank_of(sync_addr)]    = 1'b1;
      b_we[bank_of(sync_addr)]    = 1'b1;
      b_row[bank_of(sync_addr)]   = row_of(sync_addr);
      b_wdata[bank_of(sync_addr)] = sync_data;
    end
  end

  for (genvar b = 0; b < NP; b++) begin : g_bank
    memory_bank #(.WORDS(BWORDS), .W(DW)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .addr(b_row[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b])
    );
  end

  // read data return and served marks
  always_comb
    for (int p = 0; p < NP; p++)
      tile_rdata[p] = gnt_d1[p] ? b_rdata[bank_d1[p]] : hold_q[p];

  assign host_rdata = host_rd_d1 ? b_rdata[host_bank_d1] : host_hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_d1       <= '0;
      bank_d1      <= '0;
      hold_q       <= '0;
      served_q     <= '0;
      host_rd_d1   <= 1'b0;
      host_bank_d1 <= '0;
      host_hold_q  <= '0;
    end else begin
      gnt_d1       <= gnt & ~p_we;
      bank_d1      <= p_bank;
      hold_q       <= tile_rdata;
      served_q     <= stall ? (served_q | gnt) : '0;
      host_rd_d1   <= host_en && !host_we && !(sync_valid && bank_of(sync_addr) == bank_of(host_addr));
      host_bank_d1 <= bank_of(host_addr);
      host_hold_q  <= host_rdata;
    end
  end

  // handshake rules: a refused request is held unchanged into the next
  // cycle, and a bank is never given to two tile ports in one cycle
  for (genvar p = 0; p < NP; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (tile_req[p].req && !tile_ready[p]) |=> $stable(tile_req[p]));
  end
  logic bank_clash;
  always_comb begin
    bank_clash = 1'b0;
    for (int p = 0; p < NP; p++)
      for (int q = p + 1; q < NP; q++)
        if (gnt[p] && gnt[q] && p_bank[p] == p_bank[q]) bank_clash = 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n) !bank_clash);

endmodule
