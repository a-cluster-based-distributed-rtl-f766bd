// cgra_pkg: types and constants shared by the tiles, the memory units and
// the coherence controller of the cluster-based CGRA.
//
// A tile is steered each cycle by one configuration word (cfg_word_t) read
// from its control memory. The word names the function-unit operation, its
// two operands (register or immediate) and, for each of the twelve crossbar
// outputs, which of the six crossbar inputs it takes. The 6x12 crossbar size,
// the eight registers and the four bypass buffers follow the architecture
// description; the data width, the operation set and the field layout are
// this design's own choices.
package cgra_pkg;

  parameter int unsigned DW      = 32;  // datapath width (assumed)
  parameter int unsigned AW      = 16;  // word address width carried by a tile request (assumed)
  parameter int unsigned NREGS   = 8;   // register sets per tile
  parameter int unsigned XB_IN   = 6;   // crossbar inputs
  parameter int unsigned XB_OUT  = 12;  // crossbar outputs
  parameter int unsigned NDIR    = 4;   // mesh directions / bypass buffers
  parameter int unsigned IMM_W   = 16;  // immediate field width (assumed)

  // Crossbar inputs
  localparam logic [2:0] XI_N   = 3'd0;
  localparam logic [2:0] XI_E   = 3'd1;
  localparam logic [2:0] XI_S   = 3'd2;
  localparam logic [2:0] XI_W   = 3'd3;
  localparam logic [2:0] XI_FU  = 3'd4;  // registered function-unit result
  localparam logic [2:0] XI_MEM = 3'd5;  // data returned by a load

  // Crossbar outputs: 0..3 feed the N/E/S/W bypass buffers, 4..11 the registers
  localparam int unsigned XO_N = 0;
  localparam int unsigned XO_E = 1;
  localparam int unsigned XO_S = 2;
  localparam int unsigned XO_W = 3;
  localparam int unsigned XO_R0 = 4;

  // Function-unit operations, named after the LLVM IR instructions they model
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_MUL   = 5'd3,
    OP_AND   = 5'd4,
    OP_OR    = 5'd5,
    OP_XOR   = 5'd6,
    OP_SHL   = 5'd7,
    OP_LSHR  = 5'd8,
    OP_ASHR  = 5'd9,
    OP_EQ    = 5'd10,  // icmp eq
    OP_NE    = 5'd11,  // icmp ne
    OP_SLT   = 5'd12,  // icmp slt
    OP_ULT   = 5'd13,  // icmp ult
    OP_SLE   = 5'd14,  // icmp sle
    OP_ULE   = 5'd15,  // icmp ule
    OP_MOV   = 5'd16,  // pass operand A
    OP_LOAD  = 5'd17,  // load  word at A + imm
    OP_STORE = 5'd18   // store B to word at A + imm
  } fu_op_e;

  typedef struct packed {
    logic       en;   // drive this output this cycle
    logic [2:0] sel;  // crossbar input it takes
  } xb_route_t;

  typedef struct packed {
    fu_op_e                   op;
    logic [2:0]               src_a;  // register index of operand A
    logic [2:0]               src_b;  // register index of operand B
    logic                     b_imm;  // operand B is the sign-extended immediate
    logic [IMM_W-1:0]         imm;
    xb_route_t [XB_OUT-1:0]   route;
  } cfg_word_t;

  localparam int unsigned CFG_W = $bits(cfg_word_t);

  // A tile's request to its cluster's memory unit
  typedef struct packed {
    logic          req;
    logic          we;
    logic [AW-1:0] addr;   // word address
    logic [DW-1:0] wdata;
  } mem_req_t;

  // MESI-like per-cluster state of a variable in the global state table
  typedef enum logic [1:0] {
    ST_I = 2'd0,
    ST_S = 2'd1,
    ST_E = 2'd2,
    ST_M = 2'd3
  } coh_state_e;

endpackage
