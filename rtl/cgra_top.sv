// cgra_top: a ROWS x COLS CGRA with a cluster-based distributed memory.
//
// The tile array is a mesh: every tile exchanges one word per cycle with
// its north, east, south and west neighbours (links at the array edge read
// zero). The array is cut into clusters of CL_R x CL_C tiles; the tiles of a
// cluster share one memory unit with one bank per tile, so they can all load
// or store in the same cycle without using the mesh. Tile (r, c) belongs to
// cluster (r / CL_R) * (COLS / CL_C) + c / CL_C and uses port
// (r mod CL_R) * CL_C + c mod CL_C of that cluster's memory unit.
//
// Variables that several clusters need are replicated in their memory units.
// A central coherence controller keeps the copies consistent: a store to a
// replicated variable is reported by the cluster's coherence module, and the
// controller invalidates the other copies in the next cycle and overwrites
// them with the new value in the cycle after.
//
// When any memory request in the array is refused (a bank conflict, a load of
// a word being invalidated, a full notification queue), stall goes high and
// every tile repeats its current configuration word; requests already served
// are not repeated.
//
// Host interface: cfg_* writes configuration words into a tile's control
// memory; var_* writes an entry of the variable table (address range and
// holder clusters) into the controller and the coherence modules; host_*
// reads and writes a cluster's memory (one-cycle read latency) while run is
// low. Raising run starts all tiles at context 0 with initiation interval ii.
//
// Defaults follow the evaluated prototype: a 6x6 array, clusters of four
// tiles (2x2), 16 KB per memory unit. Data width, control-memory depth,
// table size and all interfaces are this design's choices.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS      = 6,
  parameter int unsigned COLS      = 6,
  parameter int unsigned CL_R      = 2,
  parameter int unsigned CL_C      = 2,
  parameter int unsigned MEM_BYTES = 16384,
  parameter int unsigned CM_DEPTH  = 16,
  parameter int unsigned NVAR      = 16,
  parameter int unsigned NTILE     = ROWS * COLS,
  parameter int unsigned NP        = CL_R * CL_C,
  parameter int unsigned NCL       = (ROWS / CL_R) * (COLS / CL_C),
  parameter int unsigned PW        = $clog2(CM_DEPTH),
  parameter int unsigned TW        = $clog2(NTILE),
  parameter int unsigned CW        = (NCL > 1) ? $clog2(NCL) : 1,
  parameter int unsigned VW        = $clog2(NVAR),
  parameter int unsigned LAW       = $clog2(MEM_BYTES / (DW / 8))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  logic [PW:0]           ii,
  // tile configuration
  input  logic                  cfg_we,
  input  logic [TW-1:0]         cfg_tile,
  input  logic [PW-1:0]         cfg_addr,
  input  cfg_word_t             cfg_data,
  // variable table
  input  logic                  var_we,
  input  logic [VW-1:0]         var_idx,
  input  logic [LAW-1:0]        var_base,
  input  logic [LAW:0]          var_size,
  input  logic [NCL-1:0]        var_mask,
  // host memory access
  input  logic                  host_en,
  input  logic                  host_we,
  input  logic [CW-1:0]         host_cluster,
  input  logic [LAW-1:0]        host_addr,
  input  logic [DW-1:0]         host_wdata,
  output logic [DW-1:0]         host_rdata,
  // status
  output logic                  stall,
  input  logic [VW-1:0]         dbg_idx,
  output coh_state_e [NCL-1:0]  dbg_state
);

  localparam int unsigned CCOLS = COLS / CL_C;

  // mesh links
  logic [DW-1:0] t_out_n [NTILE];
  logic [DW-1:0] t_out_e [NTILE];
  logic [DW-1:0] t_out_s [NTILE];
  logic [DW-1:0] t_out_w [NTILE];

  // memory ports, grouped by cluster
  mem_req_t [NCL-1:0][NP-1:0]          cl_req;
  logic     [NCL-1:0][NP-1:0][DW-1:0]  cl_rdata;
  logic     [NCL-1:0][NP-1:0]          cl_ready;
  logic     [NCL-1:0][DW-1:0]          cl_host_rdata;

  // coherence traffic
  logic [NCL-1:0]            n_valid, n_ready, inv_valid, sync_valid;
  logic [NCL-1:0][LAW-1:0]   n_addr;
  logic [NCL-1:0][DW-1:0]    n_data;
  logic [LAW-1:0]            inv_addr, sync_addr;
  logic [DW-1:0]             sync_data;

  // ---------------- tiles ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned T  = r * COLS + c;
      localparam int unsigned CL = (r / CL_R) * CCOLS + c / CL_C;
      localparam int unsigned P  = (r % CL_R) * CL_C + c % CL_C;

      logic [DW-1:0] in_n, in_e, in_s, in_w;
      assign in_n = (r > 0)        ? t_out_s[T - COLS] : '0;
      assign in_s = (r < ROWS - 1) ? t_out_n[T + COLS] : '0;
      assign in_w = (c > 0)        ? t_out_e[T - 1]    : '0;
      assign in_e = (c < COLS - 1) ? t_out_w[T + 1]    : '0;

      cgra_tile #(.CM_DEPTH(CM_DEPTH)) u_tile (
        .clk, .rst_n, .run, .stall, .ii,
        .cfg_we   (cfg_we && cfg_tile == TW'(T)),
        .cfg_addr, .cfg_data,
        .in_n, .in_e, .in_s, .in_w,
        .out_n(t_out_n[T]), .out_e(t_out_e[T]), .out_s(t_out_s[T]), .out_w(t_out_w[T]),
        .mem_req  (cl_req[CL][P]),
        .mem_rdata(cl_rdata[CL][P])
      );
    end
  end

  // ---------------- global stall ----------------
  always_comb begin
    stall = 1'b0;
    for (int k = 0; k < NCL; k++)
      for (int p = 0; p < NP; p++)
        if (cl_req[k][p].req && !cl_ready[k][p]) stall = 1'b1;
  end

  // ---------------- memory units ----------------
  for (genvar k = 0; k < NCL; k++) begin : g_cluster
    memory_unit #(.NP(NP), .MEM_BYTES(MEM_BYTES), .NVAR(NVAR)) u_mem (
      .clk, .rst_n, .stall,
      .tile_req  (cl_req[k]),
      .tile_rdata(cl_rdata[k]),
      .tile_ready(cl_ready[k]),
      .host_en   (host_en && host_cluster == CW'(k)),
      .host_we, .host_addr, .host_wdata,
      .host_rdata(cl_host_rdata[k]),
      .inv_valid (inv_valid[k]), .inv_addr,
      .sync_valid(sync_valid[k]), .sync_addr, .sync_data,
      .notif_valid(n_valid[k]), .notif_addr(n_addr[k]), .notif_data(n_data[k]),
      .notif_ready(n_ready[k]),
      .cfg_we    (var_we), .cfg_idx(var_idx), .cfg_base(var_base), .cfg_size(var_size),
      .cfg_shared(var_mask[k] && $countones(var_mask) > 1)
    );
  end

  // host read data: from the cluster addressed in the previous cycle
  logic [CW-1:0] host_cl_d1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       host_cl_d1 <= '0;
    else if (host_en) host_cl_d1 <= host_cluster;
  assign host_rdata = cl_host_rdata[host_cl_d1];

  // ---------------- coherence controller ----------------
  coherence_controller #(.NCL(NCL), .NVAR(NVAR), .LAW(LAW)) u_ctrl (
    .clk, .rst_n,
    .cfg_we(var_we), .cfg_idx(var_idx), .cfg_base(var_base), .cfg_size(var_size),
    .cfg_mask(var_mask),
    .notif_valid(n_valid), .notif_addr(n_addr), .notif_data(n_data),
    .notif_ready(n_ready),
    .inv_valid, .inv_addr,
    .sync_valid, .sync_addr, .sync_data,
    .dbg_idx, .dbg_state
  );

endmodule
