// function_unit: the arithmetic/logic unit of a CGRA tile.
//
// Purely combinational. It evaluates one integer operation per cycle on
// operands a and b, modelled on LLVM IR instructions (add, sub, mul, and, or,
// xor, shl, lshr, ashr and the icmp predicates eq/ne/slt/ult/sle/ule, which
// return 1 or 0). For loads and stores it forms the word address a + b, where
// the tile passes the sign-extended immediate as b. The tile registers the
// result, so a value computed in cycle t can be routed in cycle t+1.
// That the unit supports LLVM IR operations follows the architecture; the
// exact operation list and the single-cycle timing are this design's choice.
module function_unit
  import cgra_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  localparam int unsigned SH_W = $clog2(W);

  always_comb begin
    unique case (op)
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL:   y = a * b;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SHL:   y = a << b[SH_W-1:0];
      OP_LSHR:  y = a >> b[SH_W-1:0];
      OP_ASHR:  y = W'($signed(a) >>> b[SH_W-1:0]);
      OP_EQ:    y = W'(a == b);
      OP_NE:    y = W'(a != b);
      OP_SLT:   y = W'($signed(a) <  $signed(b));
      OP_ULT:   y = W'(a <  b);
      OP_SLE:   y = W'($signed(a) <= $signed(b));
      OP_ULE:   y = W'(a <= b);
      OP_MOV:   y = a;
      OP_LOAD,
      OP_STORE: y = a + b;
      default:  y = '0;
    endcase
  end

endmodule
