// cluster_size_run: testbench helper that builds the 6x6 CGRA with a given
// cluster shape (CL_R x CL_C), runs a small kernel on every tile and checks
// the results and one replicated variable. Used by tb_cgra_cluster_sizes to
// cover the cluster sizes 1, 2 and 6 besides the default 4.
// Kernel (II = 6, N iterations, same as the end-to-end test): load x[i],
// compute 3x, send it east, store 3x locally and the west neighbour's 3x.
// The output array of port 0 in cluster 0 is replicated in the last cluster.
// Reports its counts on checks/failures and raises done.
module cluster_size_run #(
  parameter int CL_R = 1,
  parameter int CL_C = 1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   syncs
);
  import cgra_pkg::*;
  localparam int ROWS = 6, COLS = 6, II = 6, N = 40;
  localparam int NP  = CL_R * CL_C;
  localparam int NCL = (ROWS / CL_R) * (COLS / CL_C);
  localparam int CW  = (NCL > 1) ? $clog2(NCL) : 1;

  logic rst_n = 0, run = 0;
  logic [4:0] ii = 5'(II);
  logic cfg_we = 0;
  logic [5:0] cfg_tile = '0;
  logic [3:0] cfg_addr = '0;
  cfg_word_t cfg_data = '0;
  logic var_we = 0;
  logic [3:0] var_idx = '0, dbg_idx = '0;
  logic [11:0] var_base = '0;
  logic [12:0] var_size = '0;
  logic [NCL-1:0] var_mask = '0;
  logic host_en = 0, host_we = 0;
  logic [CW-1:0] host_cluster = '0;
  logic [11:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic stall;
  coh_state_e [NCL-1:0] dbg_state;
  logic [31:0] xin [NCL][NP][N];

  cgra_top #(.CL_R(CL_R), .CL_C(CL_C)) dut (.*);

  initial begin done = 0; checks = 0; failures = 0; stalls = 0; syncs = 0; end

  always @(posedge clk) begin
    if (run && stall) stalls++;
    if (rst_n && |dut.u_ctrl.sync_valid) syncs++;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL [%0dx%0d] %s", CL_R, CL_C, msg); end
  endtask

  function automatic int cl_of(int r, int c); return (r / CL_R) * (COLS / CL_C) + c / CL_C; endfunction
  function automatic int port_of(int r, int c); return (r % CL_R) * CL_C + c % CL_C; endfunction
  function automatic int in_base(int p); return 64 * p + p; endfunction
  function automatic int out_base(int cl, int p); return (cl == 0 && p == 0) ? 3072 : 1024 + 65 * p; endfunction
  function automatic int rcv_base(int p); return 2048 + 65 * p; endfunction

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
  endtask

  task automatic host_read(int cl, int a, output logic [31:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_cluster = CW'(cl); host_addr = 12'(a);
    @(negedge clk); host_en = 0; d = host_rdata;
  endtask

  initial begin
    logic [31:0] d, e;
    int t, cl, p;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        t = r * COLS + c; cl = cl_of(r, c); p = port_of(r, c);
        write_cfg(t, 0, word(OP_LOAD, 0, 0, 0, in_base(p)));
        write_cfg(t, 1, route(word(OP_ADD, 0, 0, 1, 1), XO_R0 + 1, XI_MEM));
        write_cfg(t, 2, route(word(OP_MUL, 1, 0, 1, 3), XO_R0 + 0, XI_FU));
        write_cfg(t, 3, route(route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 2, XI_FU), XO_E, XI_FU));
        write_cfg(t, 4, route(word(OP_STORE, 0, 2, 0, out_base(cl, p) - 1), XO_R0 + 3, XI_W));
        write_cfg(t, 5, word(OP_STORE, 0, 3, 0, rcv_base(p) - 1));
      end
    @(negedge clk); cfg_we = 0;
    @(negedge clk); var_we = 1; var_idx = 0; var_base = 12'd3072; var_size = 13'(N);
    var_mask = '0; var_mask[0] = 1; var_mask[NCL-1] = 1;
    @(negedge clk); var_we = 0;
    for (int k = 0; k < NCL; k++)
      for (int q = 0; q < NP; q++)
        for (int i = 0; i < N; i++) begin
          xin[k][q][i] = $urandom;
          @(negedge clk); host_en = 1; host_we = 1; host_cluster = CW'(k);
          host_addr = 12'(in_base(q) + i); host_wdata = xin[k][q][i];
        end
    @(negedge clk); host_en = 0;
    run = 1;
    @(negedge clk);
    while (!(dut.g_row[0].g_col[0].u_tile.ctx == 0 && dut.g_row[0].g_col[0].u_tile.regs[0] == 32'(N)))
      @(negedge clk);
    run = 0;
    repeat (10) @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cl = cl_of(r, c); p = port_of(r, c);
        for (int i = 0; i < N; i += 9) begin
          host_read(cl, out_base(cl, p) + i, d);
          chk(d === 3 * xin[cl][p][i], $sformatf("tile %0d,%0d out[%0d]", r, c, i));
          host_read(cl, rcv_base(p) + i, d);
          e = (c == 0) ? 32'd0 : 3 * xin[cl_of(r, c - 1)][port_of(r, c - 1)][i];
          chk(d === e, $sformatf("tile %0d,%0d rcv[%0d]", r, c, i));
        end
      end
    for (int i = 0; i < N; i++) begin
      host_read(NCL - 1, 3072 + i, d);
      chk(d === 3 * xin[0][0][i], $sformatf("replica [%0d]", i));
    end
    chk(syncs == N, $sformatf("synchronisations %0d, expected %0d", syncs, N));
    done = 1;
  end
endmodule
