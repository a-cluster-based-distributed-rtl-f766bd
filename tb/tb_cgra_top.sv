// tb_cgra_top: end-to-end test of the full 6x6 CGRA with 2x2 clusters and
// 16 KB memory units, at the default parameters.
//
// Every tile runs the same modulo-scheduled loop (II = 6), with its own
// array bases, for N iterations:
//   ctx0  load  x = mem[IN + i]                 (cluster-local memory)
//   ctx1  r1 <- load data; fu = i + 1
//   ctx2  r0 <- fu;        fu = 3 * x
//   ctx3  r2 <- fu;        east bypass buffer <- fu (send to the neighbour)
//   ctx4  store mem[OUT + i] = r2;  r3 <- west link (neighbour's 3x)
//   ctx5  store mem[RCV + i] = r3
// The four tiles of cluster 0 read words in the same bank, so their loads
// conflict every iteration and the array stalls; elsewhere the four tiles
// of a cluster access four banks in parallel. The output array of tile 0
// in cluster 0 is a variable replicated in clusters 0, 1 and 4, and that of
// tile 0 in cluster 8 one replicated in clusters 8, 7 and 4; both are
// written in the same cycles, so the coherence controller must serialise
// simultaneous notifications, invalidate and synchronise the copies.
// Afterwards the host port reads back every result and every replica and
// compares them with values computed here. The testbench counts stall
// cycles, fully parallel cluster accesses, mesh transfers, notifications,
// simultaneous notifications, invalidations and synchronisation writes, and
// fails if any of them never happened. It also checks that the run took
// exactly N*II executed cycles plus the stall cycles.
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int ROWS = 6, COLS = 6, NCL = 9, II = 6, N = 100;

  logic clk = 0, rst_n = 0, run = 0;
  logic [4:0] ii = 5'(II);
  logic cfg_we = 0;
  logic [5:0] cfg_tile = '0;
  logic [3:0] cfg_addr = '0;
  cfg_word_t cfg_data = '0;
  logic var_we = 0;
  logic [3:0] var_idx = '0, dbg_idx = '0;
  logic [11:0] var_base = '0;
  logic [12:0] var_size = '0;
  logic [8:0] var_mask = '0;
  logic host_en = 0, host_we = 0;
  logic [3:0] host_cluster = '0;
  logic [11:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic stall;
  coh_state_e [NCL-1:0] dbg_state;

  cgra_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_parallel;
  int cyc_run = 0, n_stall = 0, n_mesh = 0, n_notif = 0,
      n_multi = 0, n_inv = 0, n_sync = 0;

  logic [31:0] xin [NCL][4][N];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic int cl_of(int r, int c); return (r / 2) * 3 + c / 2; endfunction
  function automatic int port_of(int r, int c); return (r % 2) * 2 + c % 2; endfunction
  function automatic int in_base(int cl, int p); return 128 * p + ((cl == 0) ? 0 : p); endfunction
  function automatic int out_base(int cl, int p);
    if (cl == 0 && p == 0) return 3072;
    if (cl == 8 && p == 0) return 3584;
    return 1024 + 129 * p;
  endfunction
  function automatic int rcv_base(int p); return 2048 + 129 * p; endfunction

  function automatic cfg_word_t word(fu_op_e op, int a, int b, bit bimm, int imm);
    cfg_word_t w = '0;
    w.op = op; w.src_a = 3'(a); w.src_b = 3'(b); w.b_imm = bimm; w.imm = 16'(imm);
    return w;
  endfunction

  function automatic cfg_word_t route(cfg_word_t w, int o, logic [2:0] sel);
    w.route[o].en  = 1'b1;
    w.route[o].sel = sel;
    return w;
  endfunction

  task automatic write_cfg(int t, int a, cfg_word_t w);
    @(negedge clk); cfg_we = 1; cfg_tile = 6'(t); cfg_addr = 4'(a); cfg_data = w;
  endtask

  task automatic host_write(int cl, int a, logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 1; host_cluster = 4'(cl); host_addr = 12'(a); host_wdata = d;
  endtask

  task automatic host_read(int cl, int a, output logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_cluster = 4'(cl); host_addr = 12'(a);
    @(negedge clk); host_en = 0; d = host_rdata;
  endtask

  task automatic set_var(int idx, int base, int size, logic [8:0] mask);
    @(negedge clk); var_we = 1; var_idx = 4'(idx); var_base = 12'(base); var_size = 13'(size); var_mask = mask;
    @(negedge clk); var_we = 0;
  endtask

  // event counters
  always @(posedge clk) if (rst_n && run) begin
    cyc_run++;
    if (stall) n_stall++;
    if ($countones(dut.u_ctrl.notif_valid) > 1) n_multi++;
  end
  int n_par_cl [NCL];
  for (genvar k = 0; k < NCL; k++) begin : g_par
    initial n_par_cl[k] = 0;
    always @(posedge clk) if (rst_n && run && &dut.g_cluster[k].u_mem.gnt) n_par_cl[k]++;
  end
  always_comb begin
    n_parallel = 0;
    for (int k = 0; k < NCL; k++) n_parallel += n_par_cl[k];
  end

  always @(posedge clk) if (rst_n) begin
    if (|dut.u_ctrl.notif_ready) n_notif++;
    if (|dut.u_ctrl.inv_valid) n_inv++;
    if (|dut.u_ctrl.sync_valid) n_sync++;
    if (run && !stall && dut.g_row[0].g_col[0].u_tile.w.route[XO_E].en) n_mesh++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, e;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // programs
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int t, cl, p;
        t = r * COLS + c; cl = cl_of(r, c); p = port_of(r, c);
        write_cfg(t, 0, word(OP_LOAD, 0, 0, 0, in_base(cl, p)));
        write_cfg(t, 1, route(word(OP_ADD, 0, 0, 1, 1), XO_R0 + 1, XI_MEM));
        write_cfg(t, 2, route(word(OP_MUL, 1, 0, 1, 3), XO_R0 + 0, XI_FU));
        write_cfg(t, 3, route(route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 2, XI_FU), XO_E, XI_FU));
        write_cfg(t, 4, route(word(OP_STORE, 0, 2, 0, out_base(cl, p) - 1), XO_R0 + 3, XI_W));
        write_cfg(t, 5, word(OP_STORE, 0, 3, 0, rcv_base(p) - 1));
      end
    @(negedge clk); cfg_we = 0;

    // variables: two replicated output arrays and one private one
    set_var(0, 3072, N, 9'b000_010_011);  // clusters 0, 1, 4
    set_var(1, 3584, N, 9'b110_010_000);  // clusters 4, 7, 8
    set_var(2, 1024, 128, 9'b000_000_100); // cluster 2 only
    dbg_idx = 0; #1;
    chk(dbg_state[0] == ST_S && dbg_state[1] == ST_S && dbg_state[4] == ST_S && dbg_state[2] == ST_I, "initial shared states");
    dbg_idx = 2; #1;
    chk(dbg_state[2] == ST_E, "initial exclusive state");

    // input data
    for (int cl = 0; cl < NCL; cl++)
      for (int p = 0; p < 4; p++)
        for (int i = 0; i < N; i++) begin
          xin[cl][p][i] = $urandom;
          host_write(cl, in_base(cl, p) + i, xin[cl][p][i]);
        end
    @(negedge clk); host_en = 0;

    // run N iterations: stop when tile (0,0) is back at context 0 with r0 == N
    run = 1;
    @(negedge clk);
    while (!(dut.g_row[0].g_col[0].u_tile.ctx == 0 && dut.g_row[0].g_col[0].u_tile.regs[0] == 32'(N)))
      @(negedge clk);
    run = 0;
    repeat (10) @(negedge clk);

    chk(cyc_run == N * II + n_stall, $sformatf("cycles %0d != N*II %0d + stalls %0d", cyc_run, N * II, n_stall));
    chk(n_stall >= 3 * N, $sformatf("cluster 0 load conflicts: %0d stall cycles, expected at least %0d", n_stall, 3 * N));

    // results in every cluster
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int cl, p;
        cl = cl_of(r, c); p = port_of(r, c);
        for (int i = 0; i < N; i += 7) begin
          host_read(cl, out_base(cl, p) + i, d);
          e = 3 * xin[cl][p][i];
          chk(d === e, $sformatf("tile %0d,%0d out[%0d]=%h exp %h", r, c, i, d, e));
          host_read(cl, rcv_base(p) + i, d);
          e = (c == 0) ? 32'd0 : 3 * xin[cl_of(r, c - 1)][port_of(r, c - 1)][i];
          chk(d === e, $sformatf("tile %0d,%0d rcv[%0d]=%h exp %h", r, c, i, d, e));
        end
      end
    // replicas
    for (int i = 0; i < N; i++) begin
      e = 3 * xin[0][0][i];
      host_read(1, 3072 + i, d); chk(d === e, $sformatf("replica of var 0 in cluster 1 [%0d]", i));
      host_read(4, 3072 + i, d); chk(d === e, $sformatf("replica of var 0 in cluster 4 [%0d]", i));
      e = 3 * xin[8][0][i];
      host_read(7, 3584 + i, d); chk(d === e, $sformatf("replica of var 1 in cluster 7 [%0d]", i));
      host_read(4, 3584 + i, d); chk(d === e, $sformatf("replica of var 1 in cluster 4 [%0d]", i));
    end
    // final states: holders shared again, private variable untouched
    dbg_idx = 0; #1;
    chk(dbg_state[0] == ST_S && dbg_state[1] == ST_S && dbg_state[4] == ST_S, "var 0 shared after sync");
    dbg_idx = 1; #1;
    chk(dbg_state[8] == ST_S && dbg_state[7] == ST_S && dbg_state[4] == ST_S, "var 1 shared after sync");
    dbg_idx = 2; #1;
    chk(dbg_state[2] == ST_E, "private variable stays exclusive");

    // every mechanism must have happened
    chk(n_stall > 0,    "bank-conflict stall never happened");
    chk(n_parallel > 0, "parallel cluster access never happened");
    chk(n_mesh > 0,     "mesh bypass transfer never happened");
    chk(n_notif == 2 * N, $sformatf("notifications %0d, expected %0d", n_notif, 2 * N));
    chk(n_multi > 0,    "simultaneous notifications never happened");
    chk(n_inv == 2 * N, $sformatf("invalidation cycles %0d, expected %0d", n_inv, 2 * N));
    chk(n_sync == 2 * N, $sformatf("synchronisation cycles %0d, expected %0d", n_sync, 2 * N));
    $display("run cycles %0d stalls %0d parallel %0d mesh %0d notif %0d multi %0d inv %0d sync %0d",
             cyc_run, n_stall, n_parallel, n_mesh, n_notif, n_multi, n_inv, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
