// tb_function_unit: self-checking test of the tile's function unit.
// Applies every operation to directed corner values and to random operands
// and compares the result with a reference computed here.
module tb_function_unit;
  import cgra_pkg::*;

  fu_op_e      op;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  function_unit #(.W(32)) dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_model(fu_op_e o, logic [31:0] x, logic [31:0] z);
    logic signed [31:0] sx = x, sz = z;
    case (o)
      OP_ADD:   return x + z;
      OP_SUB:   return x - z;
      OP_MUL:   return x * z;
      OP_AND:   return x & z;
      OP_OR:    return x | z;
      OP_XOR:   return x ^ z;
      OP_SHL:   return x << z[4:0];
      OP_LSHR:  return x >> z[4:0];
      OP_ASHR:  return sx >>> z[4:0];
      OP_EQ:    return {31'd0, x == z};
      OP_NE:    return {31'd0, x != z};
      OP_SLT:   return {31'd0, sx < sz};
      OP_ULT:   return {31'd0, x < z};
      OP_SLE:   return {31'd0, sx <= sz};
      OP_ULE:   return {31'd0, x <= z};
      OP_MOV:   return x;
      OP_LOAD,
      OP_STORE: return x + z;
      default:  return 32'd0;
    endcase
  endfunction

  task automatic check(fu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = ref_model(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed values
    check(OP_ADD,  32'd7, 32'd5);
    check(OP_SUB,  32'd5, 32'd7);
    check(OP_MUL,  32'd1234, 32'd5678);
    check(OP_ASHR, 32'h8000_0000, 32'd4);
    check(OP_LSHR, 32'h8000_0000, 32'd4);
    check(OP_SLT,  32'hFFFF_FFFF, 32'd1);   // -1 < 1 signed
    check(OP_ULT,  32'hFFFF_FFFF, 32'd1);   // not unsigned
    check(OP_SLE,  32'd3, 32'd3);
    check(OP_EQ,   32'd9, 32'd9);
    check(OP_NE,   32'd9, 32'd9);
    check(OP_NOP,  32'd9, 32'd9);
    // spot values worked out by hand
    op = OP_ADD; a = 32'd100; b = 32'hFFFF_FFFE; #1; checks++; if (y !== 32'd98) failures++;
    op = OP_ASHR; a = 32'hFFFF_FF00; b = 32'd8; #1; checks++; if (y !== 32'hFFFF_FFFF) failures++;
    op = OP_SHL; a = 32'd3; b = 32'd33; #1; checks++; if (y !== 32'd6) failures++;
    // random sweep over all operations
    for (int i = 0; i < 2000; i++)
      check(fu_op_e'(i % 19), $urandom, (i % 3 == 0) ? ($urandom % 40) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
