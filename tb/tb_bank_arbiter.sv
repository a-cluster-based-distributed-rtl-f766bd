// tb_bank_arbiter: random requests; checks that grants never collide on a
// bank or the notification slot, that busy banks are never granted, that
// every free bank with a requester is granted (work conserving), and that
// a port kept waiting is eventually served.
module tb_bank_arbiter;
  localparam int NP = 4, NB = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0]        req = '0, need_slot = '0, gnt;
  logic [NP-1:0][1:0]   bank = '0;
  logic [NB-1:0]        bank_busy = '0;
  logic                 slot_free = 1;
  int checks = 0, failures = 0, wait_cnt[NP], max_wait = 0, conflicts = 0;

  bank_arbiter #(.NP(NP), .NB(NB)) dut (.clk, .rst_n, .req, .bank, .need_slot,
    .bank_busy, .slot_free, .gnt);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    logic [NB-1:0] used;
    int slots;
    used = '0; slots = 0;
    for (int p = 0; p < NP; p++) begin
      if (gnt[p]) begin
        checks++;
        if (!req[p] || used[bank[p]] || bank_busy[bank[p]]) begin
          failures++; $display("FAIL bad grant p=%0d", p);
        end
        used[bank[p]] = 1'b1;
        if (need_slot[p]) slots++;
      end
    end
    checks++;
    if (slots > (slot_free ? 1 : 0)) begin failures++; $display("FAIL slot"); end
    // work conserving: a requester refused must have a reason
    for (int p = 0; p < NP; p++)
      if (req[p] && !gnt[p]) begin
        conflicts++;
        checks++;
        if (!(used[bank[p]] || bank_busy[bank[p]] || (need_slot[p] && (slots > 0 || !slot_free)))) begin
          failures++; $display("FAIL p=%0d refused without reason", p);
        end
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all four ports on one bank: each must be served within NP cycles
    for (int p = 0; p < NP; p++) wait_cnt[p] = 0;
    req = '1; bank = '0;
    for (int t = 0; t < 4 * NP; t++) begin
      @(negedge clk);
      check_cycle();
      for (int p = 0; p < NP; p++) begin
        wait_cnt[p] = gnt[p] ? 0 : wait_cnt[p] + 1;
        if (wait_cnt[p] > max_wait) max_wait = wait_cnt[p];
      end
    end
    checks++;
    if (max_wait > NP) begin failures++; $display("FAIL starvation %0d", max_wait); end
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = 4'($urandom); need_slot = 4'($urandom) & 4'($urandom);
      for (int p = 0; p < NP; p++) bank[p] = 2'($urandom);
      bank_busy = 4'($urandom) & 4'($urandom);
      slot_free = ($urandom % 4) != 0;
      #1;
      check_cycle();
    end
    // distinct banks, nothing busy: all granted in the same cycle
    @(negedge clk);
    req = '1; need_slot = '0; bank_busy = '0;
    for (int p = 0; p < NP; p++) bank[p] = 2'(p);
    #1;
    checks++;
    if (gnt !== 4'hF) begin failures++; $display("FAIL parallel access gnt=%b", gnt); end
    $display("conflicts seen: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
