// coherence_controller: the central, MESI-like memory coherence controller.
//
// A variable may be replicated in the memory units of several clusters, at
// the same local word address in each. The controller keeps a global state
// table with one entry per active variable: its address range, the set of
// clusters holding a copy and, per cluster, a state of modified, exclusive,
// shared or invalid. Entries are written through the cfg_* port: a variable
// with one holder starts exclusive there, one with several starts shared in
// each holder, and non-holders are invalid.
//
// Write notifications from the clusters' coherence modules enter a
// deterministic two-stage pipeline, one notification accepted per cycle
// through a round-robin choice among the clusters:
//   stage 1 (cycle after acceptance): look up the variable, mark the writer
//           modified and every other holder invalid, and broadcast the
//           invalidation (inv_valid per cluster, inv_addr);
//   stage 2 (next cycle): send the synchronisation write (sync_valid per
//           stale holder, sync_addr, sync_data) that overwrites the stale
//           copies with the new value; all holders then return to shared.
// A notification that hits no variable is dropped after stage 1; a write to
// a variable with a single holder leaves that holder modified.
//
// The global state table, the MESI states, the invalidate-then-synchronise
// order and the two-cycle pipeline follow the architecture; the table
// layout, the same-address replication, the round-robin acceptance and the
// return to shared after synchronisation are this design's choices.
module coherence_controller
  import cgra_pkg::*;
#(
  parameter int unsigned NCL  = 9,    // clusters
  parameter int unsigned NVAR = 16,   // entries in the global state table
  parameter int unsigned LAW  = 12,   // local word-address width
  parameter int unsigned VW   = $clog2(NVAR),
  parameter int unsigned CW   = (NCL > 1) ? $clog2(NCL) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // global state table configuration
  input  logic                     cfg_we,
  input  logic [VW-1:0]            cfg_idx,
  input  logic [LAW-1:0]           cfg_base,
  input  logic [LAW:0]             cfg_size,
  input  logic [NCL-1:0]           cfg_mask,
  // write notifications from the clusters
  input  logic [NCL-1:0]           notif_valid,
  input  logic [NCL-1:0][LAW-1:0]  notif_addr,
  input  logic [NCL-1:0][DW-1:0]   notif_data,
  output logic [NCL-1:0]           notif_ready,
  // stage 1: invalidation broadcast
  output logic [NCL-1:0]           inv_valid,
  output logic [LAW-1:0]           inv_addr,
  // stage 2: synchronisation of the stale copies
  output logic [NCL-1:0]           sync_valid,
  output logic [LAW-1:0]           sync_addr,
  output logic [DW-1:0]            sync_data,
  // state table read-out
  input  logic [VW-1:0]            dbg_idx,
  output coh_state_e [NCL-1:0]     dbg_state
);

  typedef struct packed {
    logic                  valid;
    logic [LAW-1:0]        base;
    logic [LAW:0]          size;
    logic [NCL-1:0]        mask;
  } entry_t;

  typedef struct packed {
    logic           valid;
    logic [CW-1:0]  cl;
    logic [LAW-1:0] addr;
    logic [DW-1:0]  data;
  } s1_t;

  typedef struct packed {
    logic           valid;
    logic [VW-1:0]  var_idx;
    logic [NCL-1:0] others;
    logic [LAW-1:0] addr;
    logic [DW-1:0]  data;
  } s2_t;

  entry_t                tbl   [NVAR];
  coh_state_e [NCL-1:0]  state [NVAR];
  s1_t                   s1;
  s2_t                   s2;
  logic [CW-1:0]         rr_ptr;

  // ---------------- acceptance (round robin) ----------------
  logic          acc;
  logic [CW-1:0] acc_cl;
  int unsigned   c;

  always_comb begin
    acc    = 1'b0;
    acc_cl = '0;
    for (int unsigned k = 0; k < NCL; k++) begin
      c = (32'(rr_ptr) + k) % NCL;
      if (!acc && notif_valid[c]) begin
        acc    = 1'b1;
        acc_cl = CW'(c);
      end
    end
    notif_ready = '0;
    if (acc) notif_ready[acc_cl] = 1'b1;
  end

  // ---------------- stage 1: lookup and invalidation ----------------
  logic           s1_hit;
  logic [VW-1:0]  s1_var;
  logic [NCL-1:0] s1_others;

  always_comb begin
    s1_hit = 1'b0;
    s1_var = '0;
    for (int v = NVAR - 1; v >= 0; v--)
      if (tbl[v].valid && s1.addr >= tbl[v].base &&
          {1'b0, s1.addr} < {1'b0, tbl[v].base} + tbl[v].size) begin
        s1_hit = 1'b1;
        s1_var = VW'(v);
      end
    s1_others = tbl[s1_var].mask;
    s1_others[s1.cl] = 1'b0;
    if (!(s1.valid && s1_hit)) s1_others = '0;
  end

  assign inv_valid = s1_others;
  assign inv_addr  = s1.addr;

  // ---------------- stage 2: synchronisation ----------------
  assign sync_valid = s2.valid ? s2.others : '0;
  assign sync_addr  = s2.addr;
  assign sync_data  = s2.data;

  // ---------------- pipeline registers and state table ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1     <= '0;
      s2     <= '0;
      rr_ptr <= '0;
      for (int v = 0; v < NVAR; v++) begin
        tbl[v]   <= '0;
        state[v] <= '{default: ST_I};
      end
    end else begin
      s1 <= '{valid: acc, cl: acc_cl, addr: notif_addr[acc_cl], data: notif_data[acc_cl]};
      if (acc) rr_ptr <= (32'(acc_cl) + 1 >= NCL) ? '0 : acc_cl + 1'b1;

      s2 <= '{valid: s1.valid && s1_hit, var_idx: s1_var, others: s1_others,
              addr: s1.addr, data: s1.data};

      // stage 2 completes: every holder is up to date again
      if (s2.valid && s2.others != '0)
        for (int k = 0; k < NCL; k++)
          if (tbl[s2.var_idx].mask[k]) state[s2.var_idx][k] <= ST_S;

      // stage 1: writer modified, other holders invalid (overrides stage 2)
      if (s1.valid && s1_hit)
        for (int k = 0; k < NCL; k++)
          if (k == 32'(s1.cl))                 state[s1_var][k] <= ST_M;
          else if (tbl[s1_var].mask[k])        state[s1_var][k] <= ST_I;

      if (cfg_we) begin
        tbl[cfg_idx] <= '{valid: cfg_size != 0, base: cfg_base, size: cfg_size, mask: cfg_mask};
        for (int k = 0; k < NCL; k++)
          if (!cfg_mask[k])              state[cfg_idx][k] <= ST_I;
          else if ($countones(cfg_mask) == 1) state[cfg_idx][k] <= ST_E;
          else                           state[cfg_idx][k] <= ST_S;
      end
    end
  end

  assign dbg_state = state[dbg_idx];

  // at most one notification is accepted per cycle
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(notif_ready));

endmodule
