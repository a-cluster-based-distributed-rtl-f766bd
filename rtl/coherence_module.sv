// coherence_module: the coherence part of a cluster's memory unit.
//
// It tracks writes to replicated variables. A table of NVAR entries, loaded
// through the cfg_* port, holds the word-address range (base, size) of each
// variable and whether this cluster holds one of several copies of it
// (cfg_shared). For each tile port it reports, combinationally, whether the
// port's address falls in such a range (hit). The memory unit pushes the
// address and data of every performed store that hits into a FIFO of DEPTH
// entries; the head of the FIFO is offered to the central coherence
// controller as a write notification (notif_valid/notif_ready handshake).
// full tells the memory unit to hold back further replicated stores.
// The notification to the controller follows the architecture; the range
// table, the FIFO and its depth are this design's choices.
module coherence_module
  import cgra_pkg::*;
#(
  parameter int unsigned NP    = 4,
  parameter int unsigned NVAR  = 16,
  parameter int unsigned LAW   = 12,  // local word-address width
  parameter int unsigned DEPTH = 4,
  parameter int unsigned VW    = $clog2(NVAR)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // variable table
  input  logic                    cfg_we,
  input  logic [VW-1:0]           cfg_idx,
  input  logic [LAW-1:0]          cfg_base,
  input  logic [LAW:0]            cfg_size,
  input  logic                    cfg_shared,
  // lookup for the tile ports
  input  logic [NP-1:0][LAW-1:0]  addr,
  output logic [NP-1:0]           hit,
  // store performed on a replicated variable
  input  logic                    push,
  input  logic [LAW-1:0]          push_addr,
  input  logic [DW-1:0]           push_data,
  output logic                    full,
  // write notification to the coherence controller
  output logic                    notif_valid,
  output logic [LAW-1:0]          notif_addr,
  output logic [DW-1:0]           notif_data,
  input  logic                    notif_ready
);

  typedef struct packed {
    logic           valid;
    logic [LAW-1:0] base;
    logic [LAW:0]   size;
  } range_t;

  typedef struct packed {
    logic [LAW-1:0] addr;
    logic [DW-1:0]  data;
  } notif_t;

  localparam int unsigned QW = $clog2(DEPTH);

  range_t          tbl [NVAR];
  notif_t          q   [DEPTH];
  logic [QW-1:0]   rd_ptr, wr_ptr;
  logic [QW:0]     count;
  logic            do_push, do_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVAR; v++) tbl[v] <= '0;
    end else if (cfg_we) begin
      tbl[cfg_idx] <= '{valid: cfg_shared && cfg_size != 0, base: cfg_base, size: cfg_size};
    end
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      hit[p] = 1'b0;
      for (int v = 0; v < NVAR; v++)
        if (tbl[v].valid && addr[p] >= tbl[v].base &&
            {1'b0, addr[p]} < {1'b0, tbl[v].base} + tbl[v].size)
          hit[p] = 1'b1;
    end
  end

  assign full        = (count == (QW+1)'(DEPTH));
  assign notif_valid = (count != 0);
  assign notif_addr  = q[rd_ptr].addr;
  assign notif_data  = q[rd_ptr].data;
  assign do_push     = push && !full;
  assign do_pop      = notif_valid && notif_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (do_push) begin
        q[wr_ptr] <= '{addr: push_addr, data: push_data};
        wr_ptr    <= (32'(wr_ptr) + 1 >= DEPTH) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop) rd_ptr <= (32'(rd_ptr) + 1 >= DEPTH) ? '0 : rd_ptr + 1'b1;
      count <= count + (QW+1)'(do_push) - (QW+1)'(do_pop);
    end
  end

  // a push is only issued when the FIFO has room
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
