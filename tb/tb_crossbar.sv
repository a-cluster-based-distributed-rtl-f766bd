// tb_crossbar: self-checking test of the 6x12 crossbar. Random inputs and
// random selects (including out-of-range ones, which must give zero).
module tb_crossbar;
  logic [5:0][31:0]  in;
  logic [11:0][2:0]  sel;
  logic [11:0][31:0] out;
  int checks = 0, failures = 0;

  crossbar #(.NIN(6), .NOUT(12), .W(32), .SW(3)) dut (.in, .sel, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 6; i++)  in[i]  = $urandom;
      for (int o = 0; o < 12; o++) sel[o] = 3'($urandom);
      #1;
      for (int o = 0; o < 12; o++) begin
        checks++;
        if (out[o] !== ((sel[o] < 6) ? in[sel[o]] : 32'd0)) begin
          failures++;
          $display("FAIL out%0d sel=%0d got %h", o, sel[o], out[o]);
        end
      end
    end
    // every output from the same input: broadcast
    for (int o = 0; o < 12; o++) sel[o] = 3'd5;
    #1;
    for (int o = 0; o < 12; o++) begin
      checks++;
      if (out[o] !== in[5]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
