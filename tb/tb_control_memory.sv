// tb_control_memory: writes distinct words into the control memory, runs it
// with several initiation intervals and checks that the context counter
// wraps every ii cycles, holds under stall, restarts when run drops, and
// that the word presented is the one written at that context.
module tb_control_memory;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, stall = 0, cfg_we = 0;
  logic [4:0] ii = 5'd4;
  logic [3:0] cfg_addr = '0, ctx;
  cfg_word_t  cfg_data = '0, word;
  int checks = 0, failures = 0;
  int held;

  control_memory #(.DEPTH(16)) dut (.clk, .rst_n, .run, .stall, .ii,
    .cfg_we, .cfg_addr, .cfg_data, .word, .ctx);

  always #5 clk = ~clk;

  function automatic cfg_word_t pattern(int i);
    cfg_word_t w = '0;
    w.imm   = 16'(16'hA500 + i);
    w.src_a = 3'(i);
    w.op    = fu_op_e'(i % 19);
    return w;
  endfunction

  task automatic expect_ctx(int e);
    checks++;
    if (ctx !== 4'(e) || word !== pattern(e)) begin
      failures++;
      $display("FAIL t=%0t ctx=%0d exp=%0d imm=%h", $time, ctx, e, word.imm);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_data = pattern(i);
    end
    @(negedge clk); cfg_we = 0;
    foreach (ii_list[j]) begin
      ii = 5'(ii_list[j]);
      run = 1;
      for (int t = 0; t < 3 * ii_list[j] + 1; t++) begin
        expect_ctx(t % ii_list[j]);
        @(negedge clk);
      end
      // stall freezes the context
      stall = 1;
      held = ctx;
      repeat (3) begin @(negedge clk); expect_ctx(held); end
      stall = 0;
      run = 0;
      @(negedge clk);
      expect_ctx(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ii_list[4] = '{4, 1, 16, 3};
endmodule
