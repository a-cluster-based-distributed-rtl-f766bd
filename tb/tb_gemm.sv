// tb_gemm: the gemm benchmark size (C = A x B with three 42x42 matrices of
// 32-bit words, 21168 bytes, as in the published evaluation), hand-mapped
// onto the full default CGRA (6x6 tiles, 2x2 clusters, 16 KB units). The
// mapping is this testbench's own.
//
// A and B are read-only and replicated in all nine memory units (declared
// as replicated variables; since nobody writes them, no coherence traffic
// may appear). Each tile computes one column j of C, all 42 rows, with one
// self-running modulo-scheduled loop (II = 14, 1764 iterations) that needs
// no host help between rows. Loop control is branch-free: keep = (bptr <
// 1722) marks all but the last k of a row, the accumulator is multiplied by
// keep, the B pointer steps +42 or wraps back to column j, and the C pointer
// advances by 1 - keep. Registers: r0 A pointer, r1 A value / temporary,
// r2 B pointer, r3 B value, r4 accumulator, r5 C pointer, r6 keep,
// r7 temporary. Context schedule (one function-unit operation each):
//   c0 load A[r0]          c5 r0<-fu; s=r4+r7      c10 r2<-fu; w=r5-r6
//   c1 r1<-A; load B[r2]   c6 r7<-fu(s); u=r6*1764  c11 r5<-fu; r2-1722
//   c2 r3<-B; keep=r2<1722 c7 r1<-fu(u); store s     c12 r2<-fu; r5+1
//   c3 r6<-fu; p=r1*r3     c8 acc=r7*r6              c13 r5<-fu
//   c4 r7<-fu(p); r0+1     c9 r4<-fu; v=r2+r1
// The four tiles of a cluster read the same A word at once, which the
// bank arbiter serialises (three stall cycles per iteration); the C stores
// of ports 0/2 and 1/3 share banks (one more), and in pass 2 two tiles of a
// cluster share a B column (one more). Pass 1 computes columns 0..35 (tile t:
// column t); pass 2 columns 36..41 (tile t: column 36 + t mod 6). Each tile
// writes its column to a private region of its cluster's memory, which is
// read back and compared with C computed here. The executed-cycle count
// must equal 1764 * 14 plus the stall cycles.
module tb_gemm;
  import cgra_pkg::*;
  localparam int NCL = 9, M = 42, A_BASE = 0, B_BASE = 1764, CB1 = 3528, CB2 = 3696;

  logic clk = 0, rst_n = 0, run = 0;
  logic [4:0] ii = 5'd1;
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

  int checks = 0, failures = 0, cyc = 0, n_stall = 0, n_notif = 0;
  logic [31:0] A [M][M];
  logic [31:0] B [M][M];
  logic [31:0] C [M][M];

  always @(posedge clk) if (rst_n) begin
    if (run) cyc++;
    if (run && stall) n_stall++;
    if (|dut.u_ctrl.notif_ready) n_notif++;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  function automatic int cl_of(int t); return (t / 6 / 2) * 3 + (t % 6) / 2; endfunction
  function automatic int port_of(int t); return ((t / 6) % 2) * 2 + (t % 6) % 2; endfunction

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

  task automatic run_one_cycle();
    ii = 5'd1;
    run = 1;
    #1;
    while (stall) @(negedge clk);
    @(posedge clk);
    #1 run = 0;
    @(negedge clk);
  endtask

  localparam logic [2:0] ZERO = 3'd6;  // unused crossbar input: reads zero

  task automatic gemm_pass(int pass);
    int c0, s0, j, cb;
    cfg_word_t w;
    // setup: clear registers, r2 = j, r5 = C region of this tile
    w = word(OP_NOP, 0, 0, 0, 0);
    for (int r = 0; r < 8; r++) w = route(w, XO_R0 + r, ZERO);
    for (int t = 0; t < 36; t++) write_cfg(t, 0, w);
    run_one_cycle();
    for (int t = 0; t < 36; t++) begin
      j = (pass == 1) ? t : 36 + t % 6;
      write_cfg(t, 0, word(OP_ADD, 4, 0, 1, j));
    end
    run_one_cycle();
    for (int t = 0; t < 36; t++) begin
      cb = ((pass == 1) ? CB1 : CB2) + 42 * port_of(t);
      write_cfg(t, 0, route(word(OP_ADD, 4, 0, 1, cb), XO_R0 + 2, XI_FU));
    end
    run_one_cycle();
    for (int t = 0; t < 36; t++) write_cfg(t, 0, route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 5, XI_FU));
    run_one_cycle();
    // loop program, identical in every tile
    for (int t = 0; t < 36; t++) begin
      write_cfg(t, 0,  word(OP_LOAD, 0, 0, 0, A_BASE));
      write_cfg(t, 1,  route(word(OP_LOAD, 2, 0, 0, B_BASE), XO_R0 + 1, XI_MEM));
      write_cfg(t, 2,  route(word(OP_ULT, 2, 0, 1, 1722), XO_R0 + 3, XI_MEM));
      write_cfg(t, 3,  route(word(OP_MUL, 1, 3, 0, 0), XO_R0 + 6, XI_FU));
      write_cfg(t, 4,  route(word(OP_ADD, 0, 0, 1, 1), XO_R0 + 7, XI_FU));
      write_cfg(t, 5,  route(word(OP_ADD, 4, 7, 0, 0), XO_R0 + 0, XI_FU));
      write_cfg(t, 6,  route(word(OP_MUL, 6, 0, 1, 1764), XO_R0 + 7, XI_FU));
      write_cfg(t, 7,  route(word(OP_STORE, 5, 7, 0, 0), XO_R0 + 1, XI_FU));
      write_cfg(t, 8,  word(OP_MUL, 7, 6, 0, 0));
      write_cfg(t, 9,  route(word(OP_ADD, 2, 1, 0, 0), XO_R0 + 4, XI_FU));
      write_cfg(t, 10, route(word(OP_SUB, 5, 6, 0, 0), XO_R0 + 2, XI_FU));
      write_cfg(t, 11, route(word(OP_ADD, 2, 0, 1, -1722), XO_R0 + 5, XI_FU));
      write_cfg(t, 12, route(word(OP_ADD, 5, 0, 1, 1), XO_R0 + 2, XI_FU));
      write_cfg(t, 13, route(word(OP_NOP, 0, 0, 0, 0), XO_R0 + 5, XI_FU));
    end
    ii = 5'd14;
    c0 = cyc; s0 = n_stall;
    run = 1;
    @(negedge clk);
    while (!(dut.g_row[0].g_col[0].u_tile.ctx == 0 && dut.g_row[0].g_col[0].u_tile.regs[0] == 32'(M * M)))
      @(negedge clk);
    run = 0;
    chk(cyc - c0 == M * M * 14 + (n_stall - s0),
        $sformatf("pass %0d: %0d cycles != %0d + %0d stalls", pass, cyc - c0, M * M * 14, n_stall - s0));
    chk(n_stall - s0 >= 3 * M * M, $sformatf("pass %0d: %0d stall cycles", pass, n_stall - s0));
    $display("gemm pass %0d: %0d cycles, %0d stall cycles", pass, cyc - c0, n_stall - s0);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int j;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < M; i++)
      for (int k = 0; k < M; k++) begin
        A[i][k] = $urandom % 1000;
        B[i][k] = $urandom % 1000;
      end
    for (int i = 0; i < M; i++)
      for (int jj = 0; jj < M; jj++) begin
        C[i][jj] = 0;
        for (int k = 0; k < M; k++) C[i][jj] += A[i][k] * B[k][jj];
      end
    // A and B replicated in every cluster
    for (int k = 0; k < NCL; k++)
      for (int a = 0; a < M * M; a++) begin
        @(negedge clk); host_en = 1; host_we = 1; host_cluster = 4'(k);
        host_addr = 12'(A_BASE + a); host_wdata = A[a / M][a % M];
        @(negedge clk);
        host_addr = 12'(B_BASE + a); host_wdata = B[a / M][a % M];
      end
    @(negedge clk); host_en = 0;
    @(negedge clk); var_we = 1; var_idx = 0; var_base = 12'(A_BASE); var_size = 13'(M * M); var_mask = 9'h1FF;
    @(negedge clk); var_idx = 1; var_base = 12'(B_BASE);
    @(negedge clk); var_we = 0;

    gemm_pass(1);
    for (int t = 0; t < 36; t++)
      for (int i = 0; i < M; i++) begin
        host_read(cl_of(t), CB1 + 42 * port_of(t) + i, d);
        chk(d === C[i][t], $sformatf("C[%0d][%0d]=%0d exp %0d", i, t, d, C[i][t]));
      end
    gemm_pass(2);
    for (int t = 0; t < 36; t++) begin
      j = 36 + t % 6;
      for (int i = 0; i < M; i++) begin
        host_read(cl_of(t), CB2 + 42 * port_of(t) + i, d);
        chk(d === C[i][j], $sformatf("C[%0d][%0d]=%0d exp %0d", i, j, d, C[i][j]));
      end
    end
    chk(n_notif == 0, $sformatf("read-only replicated data caused %0d notifications", n_notif));
    dbg_idx = 0; #1;
    chk(dbg_state == {NCL{ST_S}}, "A still shared everywhere");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
