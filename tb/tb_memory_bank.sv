// tb_memory_bank: random writes and reads against a reference array;
// checks the one-cycle read latency and read-before-write on a write.
module tb_memory_bank;
  localparam int WORDS = 1024;
  logic clk = 0, en = 0, we = 0;
  logic [9:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [WORDS];
  logic [31:0] exp_q;
  logic        exp_v = 0;
  int checks = 0, failures = 0;

  memory_bank #(.WORDS(WORDS), .W(32)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 10'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("FAIL t=%0t rdata=%h exp=%h", $time, rdata, exp_q);
        end
      end
      en = ($urandom % 4) != 0; we = $urandom % 2; addr = 10'($urandom); wdata = $urandom;
      exp_v = en;
      exp_q = model[addr];
      if (en && we) model[addr] = wdata;
    end
    // read data holds while the bank is idle
    @(negedge clk); en = 1; we = 0; addr = 10'd17; exp_q = model[17];
    @(negedge clk); en = 0;
    repeat (3) begin
      @(negedge clk); checks++; if (rdata !== exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
