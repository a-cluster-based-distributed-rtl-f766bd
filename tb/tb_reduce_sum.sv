// tb_reduce_sum: a reduce-sum kernel, hand-mapped onto the full default
// CGRA (6x6 tiles, 2x2 clusters, 16 KB units). About 4 KB of input is
// summed, close to the size of the reduce-sum benchmark in the published
// evaluation (4352 bytes); the mapping itself is this testbench's own.
//
// Phase 1 (II = 4, N iterations, every tile): acc += x[i], with x in the
//   tile's own cluster memory. No bank conflicts: the four tiles of a
//   cluster read four different banks each cycle.
// Phase 2 (one executed cycle, every tile): store acc to part[T], T = tile
//   index. part[0..35] is one variable replicated in all nine clusters, so
//   the 36 stores become 36 write notifications; each cluster may push one
//   per cycle (3 stall cycles) and the controller serialises them, sending
//   each new value to the eight other clusters.
// Phase 3 (II = 4, 36 iterations, tile (0,0) only): total += part[j] from
//   cluster 0's copy, then store the total.
// Checks: every copy of part[] in every cluster, the total, the phase-2
// stall count (3), 36 notifications and 36 synchronisation cycles, and the
// phase-1 cycle count (N*II with no stall).
module tb_reduce_sum;
  import cgra_pkg::*;
  localparam int NCL = 9, N = 28, PART = 3584, RES = 4000;

  logic clk = 0, rst_n = 0, run = 0;
  logic [4:0] ii = 5'd4;
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

  int checks = 0, failures = 0, cyc = 0, n_stall = 0, n_notif = 0, n_sync = 0;
  logic [31:0] x [36][N];
  logic [31:0] part_ref [36];
  logic [31:0] total_ref;

  always @(posedge clk) if (rst_n) begin
    if (run) cyc++;
    if (run && stall) n_stall++;
    if (|dut.u_ctrl.notif_ready) n_notif++;
    if (|dut.u_ctrl.sync_valid) n_sync++;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic int cl_of(int t); return (t / 6 / 2) * 3 + (t % 6) / 2; endfunction
  function automatic int port_of(int t); return ((t / 6) % 2) * 2 + (t % 6) % 2; endfunction
  function automatic int in_base(int p); return 33 * p; endfunction

  function automatic cfg_word_t word(fu_op_e op, int a, int b, bit bimm, int imm);
    cfg_word_t w = '0;
    w.op = op; w.src_a = 3'(a); w.src_b = 3'(b); w.b_imm = bimm; w.imm = 16'(imm);
    return w;
  endfunction

  function automatic cfg_word_t route(cfg_word_t w, int o, logic [2:0] sel);
    w.route[o].en = 1'b1; w.route[o].sel = sel;
    return w;
  endfunction

  task automatic write_cfg(int t, int a, cfg_word_t w);
    @(negedge clk); cfg_we = 1; cfg_tile = 6'(t); cfg_addr = 4'(a); cfg_data = w;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic host_read(int cl, int a, output logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_cluster = 4'(cl); host_addr = 12'(a);
    @(negedge clk); host_en = 0; d = host_rdata;
  endtask

  // run until one executed cycle has passed with run high
  task automatic run_one_cycle();
    run = 1;
    #1;
    while (stall) @(negedge clk);
    @(posedge clk);
    #1 run = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int c0, s0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // data and the shared partial-sum array
    total_ref = 0;
    for (int t = 0; t < 36; t++) begin
      part_ref[t] = 0;
      for (int i = 0; i < N; i++) begin
        x[t][i] = $urandom;
        part_ref[t] += x[t][i];
        @(negedge clk); host_en = 1; host_we = 1; host_cluster = 4'(cl_of(t));
        host_addr = 12'(in_base(port_of(t)) + i); host_wdata = x[t][i];
      end
      total_ref += part_ref[t];
    end
    @(negedge clk); host_en = 0;
    @(negedge clk); var_we = 1; var_idx = 0; var_base = 12'(PART); var_size = 13'd36; var_mask = 9'h1FF;
    @(negedge clk); var_we = 0;

    // phase 1: local accumulation, r0 = i, r4 = acc
    for (int t = 0; t < 36; t++) begin
      write_cfg(t, 0, word(OP_LOAD, 0, 0, 0, in_base(port_of(t))));
      write_cfg(t, 1, route(word(OP_ADD, 0, 0, 1, 1), XO_R0 + 1, XI_MEM));
      write_cfg(t, 2, route(word(OP_ADD, 4, 1, 0, 0), XO_R0 + 0, XI_FU));
      write_cfg(t, 3, route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 4, XI_FU));
    end
    ii = 5'd4;
    c0 = cyc; s0 = n_stall;
    run = 1;
    @(negedge clk);
    while (!(dut.g_row[0].g_col[0].u_tile.ctx == 0 && dut.g_row[0].g_col[0].u_tile.regs[0] == 32'(N)))
      @(negedge clk);
    run = 0;
    chk(cyc - c0 == N * 4 && n_stall == s0, $sformatf("phase 1 took %0d cycles, %0d stalls", cyc - c0, n_stall - s0));

    // phase 2: part[T] = acc (r7 is zero)
    for (int t = 0; t < 36; t++) write_cfg(t, 0, word(OP_STORE, 7, 4, 0, PART + t));
    ii = 5'd1;
    s0 = n_stall;
    run_one_cycle();
    chk(n_stall - s0 == 3, $sformatf("phase 2 stalled %0d cycles, expected 3", n_stall - s0));
    repeat (50) @(negedge clk);
    chk(n_notif == 36, $sformatf("notifications %0d, expected 36", n_notif));
    chk(n_sync == 36, $sformatf("synchronisation cycles %0d, expected 36", n_sync));

    // every cluster holds the complete partial-sum array
    for (int k = 0; k < NCL; k++)
      for (int t = 0; t < 36; t++) begin
        host_read(k, PART + t, d);
        chk(d === part_ref[t], $sformatf("cluster %0d part[%0d]=%h exp %h", k, t, d, part_ref[t]));
      end

    // phase 3: tile 0 sums part[], r2 = j, r3 = total; other tiles idle
    for (int t = 1; t < 36; t++)
      for (int a = 0; a < 4; a++) write_cfg(t, a, '0);
    write_cfg(0, 0, word(OP_LOAD, 2, 0, 0, PART));
    write_cfg(0, 1, route(word(OP_ADD, 2, 0, 1, 1), XO_R0 + 1, XI_MEM));
    write_cfg(0, 2, route(word(OP_ADD, 3, 1, 0, 0), XO_R0 + 2, XI_FU));
    write_cfg(0, 3, route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 3, XI_FU));
    ii = 5'd4;
    run = 1;
    @(negedge clk);
    while (!(dut.g_row[0].g_col[0].u_tile.ctx == 0 && dut.g_row[0].g_col[0].u_tile.regs[2] == 32'd36))
      @(negedge clk);
    run = 0;
    write_cfg(0, 0, word(OP_STORE, 7, 3, 0, RES));
    ii = 5'd1;
    run_one_cycle();
    host_read(0, RES, d);
    chk(d === total_ref, $sformatf("total %h exp %h", d, total_ref));
    $display("reduce-sum: total %h, %0d notifications, %0d syncs", d, n_notif, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
