// tb_coherence_controller: exercises the global state table and the
// two-cycle invalidate/synchronise pipeline of the coherence controller.
// Checks: initial states (E for a single holder, S for several, I for the
// rest); that a notification accepted in cycle t invalidates exactly the
// other holders in cycle t+1 and synchronises them with the right address
// and data in cycle t+2; the M/I states in between and S afterwards; that a
// single holder stays M; that simultaneous notifications are accepted one
// per cycle, round robin; and that a miss produces no traffic.
module tb_coherence_controller;
  import cgra_pkg::*;
  localparam int NCL = 9, NVAR = 16, LAW = 12;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_idx = '0, dbg_idx = '0;
  logic [LAW-1:0] cfg_base = '0, inv_addr, sync_addr;
  logic [LAW:0]   cfg_size = '0;
  logic [NCL-1:0] cfg_mask = '0, notif_valid = '0, notif_ready, inv_valid, sync_valid;
  logic [NCL-1:0][LAW-1:0] notif_addr = '0;
  logic [NCL-1:0][31:0]    notif_data = '0;
  logic [31:0] sync_data;
  coh_state_e [NCL-1:0] dbg_state;
  int checks = 0, failures = 0, cyc = 0;

  coherence_controller #(.NCL(NCL), .NVAR(NVAR), .LAW(LAW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic cfg(int idx, int base, int size, logic [NCL-1:0] mask);
    @(negedge clk); cfg_we = 1; cfg_idx = 4'(idx); cfg_base = LAW'(base);
    cfg_size = (LAW+1)'(size); cfg_mask = mask;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic expect_states(int idx, coh_state_e exp [NCL]);
    dbg_idx = 4'(idx); #1;
    for (int k = 0; k < NCL; k++)
      chk(dbg_state[k] == exp[k], $sformatf("var %0d cluster %0d state %s exp %s",
          idx, k, dbg_state[k].name(), exp[k].name()));
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coh_state_e e [NCL];
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg(0, 64, 32, 9'b000_010_011);  // clusters 0,1,4
    cfg(1, 512, 8, 9'b000_001_000);  // cluster 3 alone
    cfg(2, 700, 4, 9'b111_111_111);  // everyone
    e = '{ST_S, ST_S, ST_I, ST_I, ST_S, ST_I, ST_I, ST_I, ST_I}; expect_states(0, e);
    e = '{ST_I, ST_I, ST_I, ST_E, ST_I, ST_I, ST_I, ST_I, ST_I}; expect_states(1, e);

    // --- cluster 1 writes variable 0 ---
    @(negedge clk);
    notif_valid = 9'b000_000_010; notif_addr[1] = 12'd70; notif_data[1] = 32'hCAFE_0001;
    #1 chk(notif_ready == 9'b000_000_010, "accept cluster 1");
    @(negedge clk); notif_valid = '0;            // stage 1
    chk(inv_valid == 9'b000_010_001, $sformatf("invalidate 0 and 4, got %b", inv_valid));
    chk(inv_addr == 12'd70, "inv_addr");
    chk(sync_valid == '0, "no sync yet");
    @(negedge clk);                              // stage 2
    chk(inv_valid == '0, "invalidate lasts one cycle");
    chk(sync_valid == 9'b000_010_001, $sformatf("sync 0 and 4, got %b", sync_valid));
    chk(sync_addr == 12'd70 && sync_data == 32'hCAFE_0001, "sync address and data");
    e = '{ST_I, ST_M, ST_I, ST_I, ST_I, ST_I, ST_I, ST_I, ST_I}; expect_states(0, e);
    @(negedge clk);
    chk(sync_valid == '0, "sync lasts one cycle");
    e = '{ST_S, ST_S, ST_I, ST_I, ST_S, ST_I, ST_I, ST_I, ST_I}; expect_states(0, e);

    // --- single holder writes: no traffic, stays M ---
    notif_valid = 9'b000_001_000; notif_addr[3] = 12'd515; notif_data[3] = 32'd5;
    @(negedge clk); notif_valid = '0;
    chk(inv_valid == '0, "no invalidation for a single holder");
    @(negedge clk);
    chk(sync_valid == '0, "no sync for a single holder");
    e = '{ST_I, ST_I, ST_I, ST_M, ST_I, ST_I, ST_I, ST_I, ST_I}; expect_states(1, e);

    // --- miss: dropped ---
    notif_valid = 9'b000_000_100; notif_addr[2] = 12'd2000;
    @(negedge clk); notif_valid = '0;
    chk(inv_valid == '0, "miss: no invalidation");
    @(negedge clk);
    chk(sync_valid == '0, "miss: no sync");

    // --- three clusters write variable 2 at once: one per cycle ---
    begin
      logic [NCL-1:0] pending, accepted_order [3];
      int n;
      pending = 9'b100_100_001;
      for (int k = 0; k < NCL; k++) begin notif_addr[k] = 12'd701; notif_data[k] = 32'(100 + k); end
      n = 0;
      while (pending != 0 && n < 10) begin
        notif_valid = pending; #1;
        chk($onehot(notif_ready), "one acceptance per cycle");
        if (n < 3) accepted_order[n] = notif_ready;
        pending &= ~notif_ready;
        @(negedge clk);
        n++;
        if (n >= 2) begin
          // sync of the notification accepted two cycles ago goes to all but its writer
          chk(sync_valid == (9'h1FF & ~accepted_order[n-2]), $sformatf("sync mask %b", sync_valid));
        end
      end
      notif_valid = '0;
      chk(n == 3, $sformatf("three notifications in three cycles, took %0d", n));
      @(negedge clk);
      chk(sync_valid == (9'h1FF & ~accepted_order[2]), "last sync");
      @(negedge clk);
      for (int k = 0; k < NCL; k++) e[k] = ST_S;
      expect_states(2, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
