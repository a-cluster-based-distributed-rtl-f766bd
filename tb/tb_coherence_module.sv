// tb_coherence_module: loads a few address ranges (some replicated, some
// not), checks the per-port hit lookup against a reference, then pushes
// notifications and drains them with a randomly ready controller, checking
// FIFO order, data and the full flag.
module tb_coherence_module;
  import cgra_pkg::*;
  localparam int NP = 4, NVAR = 16, LAW = 12, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_shared = 0;
  logic [3:0] cfg_idx = '0;
  logic [LAW-1:0] cfg_base = '0;
  logic [LAW:0]   cfg_size = '0;
  logic [NP-1:0][LAW-1:0] addr = '0;
  logic [NP-1:0] hit;
  logic push = 0, full, notif_valid, notif_ready = 0;
  logic [LAW-1:0] push_addr = '0, notif_addr;
  logic [31:0] push_data = '0, notif_data;
  int checks = 0, failures = 0, full_seen = 0;

  int rb[4] = '{100, 200, 4000, 0};
  int rs[4] = '{10, 1, 96, 0};
  bit rsh[4] = '{1, 1, 1, 0};   // last entry: size 0 means unused

  logic [LAW+31:0] exp_q[$];

  coherence_module #(.NP(NP), .NVAR(NVAR), .LAW(LAW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit ref_hit(int a);
    for (int i = 0; i < 4; i++) if (rsh[i] && rs[i] > 0 && a >= rb[i] && a < rb[i] + rs[i]) return 1;
    if (a >= 300 && a < 310) return 0;  // non-replicated variable
    return 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drain side: compare every popped notification with the expected order
  always @(posedge clk) if (rst_n && notif_valid && notif_ready) begin
    logic [LAW+31:0] e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected pop"); end
    else begin
      e = exp_q.pop_front();
      if ({notif_addr, notif_data} !== e) begin
        failures++; $display("FAIL pop %h exp %h", {notif_addr, notif_data}, e);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cfg_we = 1; cfg_idx = 4'(i); cfg_base = LAW'(rb[i]);
      cfg_size = (LAW+1)'(rs[i]); cfg_shared = rsh[i];
    end
    // a variable held only here: not shared, never hits
    @(negedge clk); cfg_idx = 4'd5; cfg_base = 12'd300; cfg_size = 13'd10; cfg_shared = 0;
    @(negedge clk); cfg_we = 0;
    // lookup
    for (int t = 0; t < 500; t++) begin
      for (int p = 0; p < NP; p++)
        addr[p] = (t % 2) ? LAW'($urandom) : LAW'(rb[$urandom % 3] + ($urandom % 12) - 1);
      addr[0] = (t % 5 == 0) ? 12'd305 : addr[0];
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (hit[p] !== ref_hit(int'(addr[p]))) begin
          failures++; $display("FAIL hit p=%0d addr=%0d got %b", p, addr[p], hit[p]);
        end
      end
      @(negedge clk);
    end
    // FIFO: push while the controller is slow
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      notif_ready = ($urandom % 3) == 0;
      if (full) full_seen++;
      push = !full && ($urandom % 2);
      push_addr = LAW'($urandom); push_data = $urandom;
      if (push) exp_q.push_back({push_addr, push_data});
    end
    @(negedge clk); push = 0; notif_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || notif_valid) begin failures++; $display("FAIL not drained"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
