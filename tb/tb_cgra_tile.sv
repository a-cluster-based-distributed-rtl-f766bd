// tb_cgra_tile: random-program test of one CGRA tile against a cycle-level
// reference model written here. Random configuration words (operation,
// operands, immediate, twelve crossbar routes) are loaded into the control
// memory, the tile runs with random neighbour inputs, random stalls and a
// memory model, and every cycle the four outgoing links and the memory
// request are compared with the model. Load data is only valid in the cycle
// after an executed load; in other cycles the memory model drives junk, so
// the tile's load-data register is exercised under stall.
module tb_cgra_tile;
  import cgra_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0, run = 0, stall = 0, cfg_we = 0;
  logic [4:0]  ii = 5'd7;
  logic [3:0]  cfg_addr = '0;
  cfg_word_t   cfg_data = '0;
  logic [31:0] in_n = '0, in_e = '0, in_s = '0, in_w = '0;
  logic [31:0] out_n, out_e, out_s, out_w, mem_rdata = '0;
  mem_req_t    mem_req;

  cfg_word_t   prog [DEPTH];
  logic [31:0] mem [1024];
  int checks = 0, failures = 0, loads = 0, stores = 0, stalls = 0, passes = 0;

  // reference state
  logic [31:0] r_regs [8];
  logic [31:0] r_byp [4];
  logic [31:0] r_fu, r_ld;
  logic        r_ldp;
  int          r_ctx;

  cgra_tile #(.CM_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] alu(fu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      OP_ADD: return x + z;           OP_SUB: return x - z;
      OP_MUL: return x * z;           OP_AND: return x & z;
      OP_OR:  return x | z;           OP_XOR: return x ^ z;
      OP_SHL: return x << z[4:0];     OP_LSHR: return x >> z[4:0];
      OP_ASHR: return $signed(x) >>> z[4:0];
      OP_EQ:  return 32'(x == z);     OP_NE: return 32'(x != z);
      OP_SLT: return 32'($signed(x) < $signed(z));
      OP_ULT: return 32'(x < z);
      OP_SLE: return 32'($signed(x) <= $signed(z));
      OP_ULE: return 32'(x <= z);
      OP_MOV: return x;
      default: return 32'd0;
    endcase
  endfunction

  function automatic cfg_word_t rand_word();
    cfg_word_t w;
    w.op    = fu_op_e'($urandom % 19);
    w.src_a = 3'($urandom);
    w.src_b = 3'($urandom);
    w.b_imm = (w.op == OP_STORE) ? 1'b0 : 1'($urandom);
    w.imm   = 16'($urandom);
    for (int o = 0; o < 12; o++) begin
      w.route[o].en  = ($urandom % 3) != 0;
      w.route[o].sel = ($urandom % 8 == 0) ? 3'(6 + $urandom % 2) : 3'($urandom % 6);
    end
    return w;
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = $urandom;
    for (int i = 0; i < DEPTH; i++) prog[i] = rand_word();
    for (int i = 0; i < 8; i++) r_regs[i] = '0;
    for (int i = 0; i < 4; i++) r_byp[i] = '0;
    r_fu = '0; r_ld = '0; r_ldp = 0; r_ctx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_data = prog[i];
    end
    @(negedge clk); cfg_we = 0; run = 1;
    for (int t = 0; t < 5000; t++) begin
      cfg_word_t w;
      logic [31:0] a, b, sx, ldv, res;
      logic [5:0][31:0] xin;
      bit act, ld_now;
      if (t == 2500) begin
        // second program, different interval
        run = 0;
        stall = 0;
        r_ld  = r_ldp ? mem_rdata : r_ld;
        r_ldp = 0;
        r_ctx = 0;
        for (int i = 0; i < DEPTH; i++) begin
          prog[i] = rand_word();
          @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_data = prog[i];
        end
        @(negedge clk); cfg_we = 0; run = 1; ii = 5'd16;
      end
      // drive this cycle's inputs (just after the falling edge)
      stall = ($urandom % 5) == 0;
      in_n = $urandom; in_e = $urandom; in_s = $urandom; in_w = $urandom;
      #1;
      // reference for this cycle
      w  = prog[r_ctx];
      sx = {{16{w.imm[15]}}, w.imm};
      a  = r_regs[w.src_a];
      b  = w.b_imm ? sx : r_regs[w.src_b];
      ldv = r_ldp ? mem_rdata : r_ld;
      xin = {ldv, r_fu, in_w, in_s, in_e, in_n};
      act = run && !stall;
      chk(mem_req.req === (w.op == OP_LOAD || w.op == OP_STORE), "mem req");
      if (w.op == OP_LOAD || w.op == OP_STORE) begin
        chk(mem_req.we === (w.op == OP_STORE), "mem we");
        chk(mem_req.addr === 16'(a + sx), $sformatf("mem addr %h exp %h", mem_req.addr, 16'(a + sx)));
        if (w.op == OP_STORE) chk(mem_req.wdata === b, "store data");
      end
      chk(out_n === r_byp[0] && out_e === r_byp[1] && out_s === r_byp[2] && out_w === r_byp[3],
          $sformatf("links t=%0d", t));
      @(posedge clk);
      // reference state update at the edge
      ld_now = 0;
      if (act) begin
        res = alu(w.op, a, b);
        if (w.op != OP_NOP && w.op != OP_LOAD && w.op != OP_STORE) r_fu = res;
        for (int d = 0; d < 4; d++)
          if (w.route[d].en) begin r_byp[d] = (w.route[d].sel < 6) ? xin[w.route[d].sel] : '0; passes++; end
        for (int k = 0; k < 8; k++)
          if (w.route[4 + k].en) r_regs[k] = (w.route[4 + k].sel < 6) ? xin[w.route[4 + k].sel] : '0;
        if (w.op == OP_STORE) begin mem[16'(a + sx) % 1024] = b; stores++; end
        if (w.op == OP_LOAD) begin ld_now = 1; loads++; end
        r_ctx = (r_ctx + 1 >= int'(ii)) ? 0 : r_ctx + 1;
      end else stalls++;
      r_ld  = ldv;
      r_ldp = ld_now;
      // memory model: data only in the cycle after an executed load
      @(negedge clk);
      mem_rdata = ld_now ? mem[16'(a + sx) % 1024] : $urandom;
    end
    chk(loads > 50 && stores > 50 && stalls > 200, $sformatf("coverage loads=%0d stores=%0d stalls=%0d", loads, stores, stalls));
    $display("loads %0d stores %0d stalls %0d bypass writes %0d", loads, stores, stalls, passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
