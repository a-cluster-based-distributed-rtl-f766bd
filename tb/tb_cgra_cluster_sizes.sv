// tb_cgra_cluster_sizes: runs the same kernel on the 6x6 CGRA built with
// the three other cluster sizes that the architecture was evaluated with:
// 1 (1x1 clusters, 36 single-bank memory units), 2 (1x2, 18 units) and
// 6 (2x3, 6 units of six banks, a non-power-of-two interleave). Each
// configuration checks its results, a replicated variable and the number of
// synchronisations; the counts are summed here.
module tb_cgra_cluster_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done1, done2, done6;
  int c1, c2, c6, f1, f2, f6, s1, s2, s6, y1, y2, y6;
  int checks, failures;

  cluster_size_run #(.CL_R(1), .CL_C(1)) u_cs1 (.clk, .done(done1), .checks(c1), .failures(f1), .stalls(s1), .syncs(y1));
  cluster_size_run #(.CL_R(1), .CL_C(2)) u_cs2 (.clk, .done(done2), .checks(c2), .failures(f2), .stalls(s2), .syncs(y2));
  cluster_size_run #(.CL_R(2), .CL_C(3)) u_cs6 (.clk, .done(done6), .checks(c6), .failures(f6), .stalls(s6), .syncs(y6));

  initial begin
    repeat (60000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c6, f1 + f2 + f6 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2 && done6);
    checks = c1 + c2 + c6;
    failures = f1 + f2 + f6;
    $display("cluster size 1: checks %0d stalls %0d syncs %0d", c1, s1, y1);
    $display("cluster size 2: checks %0d stalls %0d syncs %0d", c2, s2, y2);
    $display("cluster size 6: checks %0d stalls %0d syncs %0d", c6, s6, y6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
