// tb_memory_unit: self-checking test of a cluster memory unit (4 ports,
// 4 banks, 16 KB). A reference array models the memory. The testbench
// plays the array's stall: it holds the requests while any is refused.
// Checks: host write/read-back; four loads to four different banks finish
// in one cycle; four accesses to one bank take exactly four cycles and each
// is performed once; random batches return the reference data; stores into
// a replicated range produce notifications in order; a load of a word being
// invalidated waits for the synchronisation write and returns its value.
module tb_memory_unit;
  import cgra_pkg::*;
  localparam int NP = 4, WORDS = 4096, LAW = 12;

  logic clk = 0, rst_n = 0;
  mem_req_t [NP-1:0]     tile_req = '0;
  logic [NP-1:0][31:0]   tile_rdata;
  logic [NP-1:0]         tile_ready;
  logic host_en = 0, host_we = 0;
  logic [LAW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic inv_valid = 0, sync_valid = 0;
  logic [LAW-1:0] inv_addr = '0, sync_addr = '0, notif_addr;
  logic [31:0] sync_data = '0, notif_data;
  logic notif_valid, notif_ready = 1;
  logic cfg_we = 0, cfg_shared = 0;
  logic [3:0] cfg_idx = '0;
  logic [LAW-1:0] cfg_base = '0;
  logic [LAW:0] cfg_size = '0;
  logic stall;

  logic [31:0] model [WORDS];
  logic [LAW+31:0] exp_notif [$];
  int checks = 0, failures = 0, stall_cycles = 0, notifs = 0;

  memory_unit #(.NP(NP), .MEM_BYTES(16384), .NVAR(16)) dut (.*);

  always_comb begin
    stall = 1'b0;
    for (int p = 0; p < NP; p++) if (tile_req[p].req && !tile_ready[p]) stall = 1'b1;
  end

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  always @(posedge clk) if (rst_n && notif_valid && notif_ready) begin
    logic [LAW+31:0] e;
    notifs++;
    checks++;
    if (exp_notif.size() == 0) begin failures++; $display("FAIL unexpected notification"); end
    else begin
      e = exp_notif.pop_front();
      if ({notif_addr, notif_data} !== e) begin failures++; $display("FAIL notification %h exp %h", {notif_addr, notif_data}, e); end
    end
  end

  // One array cycle: hold r until no port is refused, then check load data
  // in the following cycle. Returns the number of stall cycles.
  task automatic batch(input mem_req_t r [NP], input bit [NP-1:0] shared_st, output int stalls);
    logic [31:0] exp [NP];
    for (int p = 0; p < NP; p++) begin
      tile_req[p] = r[p];
      if (r[p].req && !r[p].we) exp[p] = model[r[p].addr[LAW-1:0]];
    end
    stalls = 0;
    #1;
    while (stall) begin
      @(negedge clk); #1;
      stalls++;
      if (stalls > 50) break;
    end
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      if (r[p].req && r[p].we) begin
        model[r[p].addr[LAW-1:0]] = r[p].wdata;
      end
      if (r[p].req && !r[p].we)
        chk(tile_rdata[p] === exp[p], $sformatf("port %0d load %0d got %h exp %h",
            p, r[p].addr, tile_rdata[p], exp[p]));
    end
    tile_req = '0;
    stall_cycles += stalls;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_req_t r [NP];
    int s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // replicated variable at words 256..271
    @(negedge clk); cfg_we = 1; cfg_idx = 0; cfg_base = 12'd256; cfg_size = 13'd16; cfg_shared = 1;
    @(negedge clk); cfg_we = 0;

    // host preload of every word, then spot read-back
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); host_en = 1; host_we = 1; host_addr = LAW'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); host_en = 1; host_we = 0; host_addr = LAW'($urandom);
      @(negedge clk); host_en = 0;
      chk(host_rdata === model[host_addr], "host read-back");
    end

    // four loads to four banks: no stall
    for (int p = 0; p < NP; p++) r[p] = '{req: 1, we: 0, addr: AW'(100 + p), wdata: '0};
    batch(r, '0, s);
    chk(s == 0, $sformatf("parallel access stalled %0d cycles", s));

    // four accesses to bank 0 (two stores, two loads, distinct words): 3 stalls
    r[0] = '{req: 1, we: 1, addr: AW'(8),  wdata: 32'h1111_0000};
    r[1] = '{req: 1, we: 0, addr: AW'(12), wdata: '0};
    r[2] = '{req: 1, we: 1, addr: AW'(16), wdata: 32'h2222_0000};
    r[3] = '{req: 1, we: 0, addr: AW'(20), wdata: '0};
    batch(r, '0, s);
    chk(s == 3, $sformatf("4-way bank conflict took %0d stall cycles, expected 3", s));

    // random batches with distinct words per batch
    for (int t = 0; t < 1500; t++) begin
      logic [LAW-1:0] used [NP];
      for (int p = 0; p < NP; p++) begin
        logic [LAW-1:0] a;
        bit dup;
        do begin
          a = LAW'($urandom % 600);
          dup = 0;
          for (int q = 0; q < p; q++) if (used[q] == a) dup = 1;
        end while (dup);
        used[p] = a;
        r[p] = '{req: ($urandom % 4) != 0, we: $urandom % 2, addr: AW'(a), wdata: $urandom};
      end
      // expected notifications follow port order within the grant order, so
      // issue replicated stores one per batch to keep the order known
      begin
        int nsh;
        nsh = 0;
        for (int p = 0; p < NP; p++)
          if (r[p].req && r[p].we && r[p].addr >= 256 && r[p].addr < 272) begin
            if (nsh > 0) r[p].we = 0;
            else exp_notif.push_back({LAW'(r[p].addr), r[p].wdata});
            nsh++;
          end
      end
      notif_ready = ($urandom % 4) != 0;
      batch(r, '0, s);
    end
    notif_ready = 1;
    repeat (8) @(negedge clk);
    chk(exp_notif.size() == 0, "all notifications delivered");
    chk(notifs > 20, $sformatf("notifications seen: %0d", notifs));

    // invalidation and synchronisation of word 260 while port 2 loads it
    r[0] = '{req: 0, we: 0, addr: '0, wdata: '0};
    r[1] = r[0]; r[3] = r[0];
    r[2] = '{req: 1, we: 0, addr: AW'(260), wdata: '0};
    tile_req[2] = r[2];
    inv_valid = 1; inv_addr = 12'd260;
    #1 chk(stall, "load of a word being invalidated is held");
    @(negedge clk);
    inv_valid = 0; sync_valid = 1; sync_addr = 12'd260; sync_data = 32'h5EED_5EED;
    #1 chk(stall, "load waits while the synchronisation write has the bank");
    model[260] = 32'h5EED_5EED;
    @(negedge clk);
    sync_valid = 0;
    batch(r, '0, s);
    chk(s == 0, "load proceeds after synchronisation");

    chk(stall_cycles > 100, $sformatf("stall cycles: %0d", stall_cycles));
    $display("stall cycles %0d, notifications %0d", stall_cycles, notifs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
