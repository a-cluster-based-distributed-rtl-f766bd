// cgra_tile: one compute tile of the CGRA mesh.
//
// Each cycle the control memory supplies a configuration word. The function
// unit reads operand A from one of the eight registers and operand B from a
// register or the sign-extended immediate; its result is captured in fu_q.
// The 6x12 crossbar takes the four neighbour links, fu_q and the load data
// and drives twelve outputs: outputs 0..3 load the N/E/S/W bypass buffers,
// whose registered values are the tile's outgoing links, and outputs 4..11
// load registers r0..r7. An output whose route is not enabled keeps its old
// value, so a bypass buffer holds a value in flight and lets traffic pass
// through a tile without touching the function unit.
//
// Loads and stores go to the cluster's memory unit through mem_req (address
// A + imm, store data B). A load issued in an executed cycle returns its data
// on the crossbar's memory input in the next executed cycle. When the array
// is stalled (stall high: some memory request in the array was not granted)
// nothing in the tile changes and the same configuration word is repeated;
// the load-data register keeps data that arrived during the stall.
//
// Timing: one hop per cycle; every tile output is a register. The component
// list (function units, control memory, 6x12 crossbar, eight register sets,
// four bypass buffers) follows the architecture; the crossbar port
// assignment, the register-per-output bypass buffers and the load timing are
// this design's choices.
module cgra_tile
  import cgra_pkg::*;
#(
  parameter int unsigned CM_DEPTH = 16,
  parameter int unsigned PW       = $clog2(CM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            stall,
  input  logic [PW:0]     ii,
  // configuration write port
  input  logic            cfg_we,
  input  logic [PW-1:0]   cfg_addr,
  input  cfg_word_t       cfg_data,
  // mesh links: in_* come from the neighbours, out_* are the bypass buffers
  input  logic [DW-1:0]   in_n,
  input  logic [DW-1:0]   in_e,
  input  logic [DW-1:0]   in_s,
  input  logic [DW-1:0]   in_w,
  output logic [DW-1:0]   out_n,
  output logic [DW-1:0]   out_e,
  output logic [DW-1:0]   out_s,
  output logic [DW-1:0]   out_w,
  // memory unit port
  output mem_req_t        mem_req,
  input  logic [DW-1:0]   mem_rdata
);

  cfg_word_t               w;
  logic [PW-1:0]           ctx;
  logic [NREGS-1:0][DW-1:0] regs;
  logic [NDIR-1:0][DW-1:0]  bypass_q;
  logic [DW-1:0]           fu_q, fu_y, op_a, op_b, ld_q, ld_val;
  logic                    ld_pending;
  logic                    active;
  logic [XB_IN-1:0][DW-1:0]  xb_in;
  logic [XB_OUT-1:0][2:0]    xb_sel;
  logic [XB_OUT-1:0][DW-1:0] xb_out;

  control_memory #(.DEPTH(CM_DEPTH)) u_cm (
    .clk, .rst_n, .run, .stall, .ii,
    .cfg_we, .cfg_addr, .cfg_data,
    .word(w), .ctx
  );

  assign active = run && !stall;

  assign op_a = regs[w.src_a];
  assign op_b = w.b_imm ? {{(DW-IMM_W){w.imm[IMM_W-1]}}, w.imm} : regs[w.src_b];

  function_unit #(.W(DW)) u_fu (
    .op(w.op),
    .a (op_a),
    .b ((w.op == OP_LOAD || w.op == OP_STORE) ? {{(DW-IMM_W){w.imm[IMM_W-1]}}, w.imm} : op_b),
    .y (fu_y)
  );

  // memory request
  always_comb begin
    mem_req       = '0;
    mem_req.req   = run && (w.op == OP_LOAD || w.op == OP_STORE);
    mem_req.we    = (w.op == OP_STORE);
    mem_req.addr  = fu_y[AW-1:0];
    mem_req.wdata = op_b;
  end

  // load data: live in the first cycle after an executed load, held after
  assign ld_val = ld_pending ? mem_rdata : ld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_pending <= 1'b0;
      ld_q       <= '0;
    end else begin
      ld_q       <= ld_val;
      ld_pending <= active && (w.op == OP_LOAD);
    end
  end

  // crossbar
  assign xb_in[XI_N]   = in_n;
  assign xb_in[XI_E]   = in_e;
  assign xb_in[XI_S]   = in_s;
  assign xb_in[XI_W]   = in_w;
  assign xb_in[XI_FU]  = fu_q;
  assign xb_in[XI_MEM] = ld_val;

  always_comb
    for (int o = 0; o < XB_OUT; o++) xb_sel[o] = w.route[o].sel;

  crossbar #(.NIN(XB_IN), .NOUT(XB_OUT), .W(DW), .SW(3)) u_xb (
    .in(xb_in), .sel(xb_sel), .out(xb_out)
  );

  // function-unit result register, registers and bypass buffers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fu_q     <= '0;
      regs     <= '0;
      bypass_q <= '0;
    end else if (active) begin
      if (w.op != OP_NOP && w.op != OP_STORE && w.op != OP_LOAD) fu_q <= fu_y;
      for (int d = 0; d < NDIR; d++)
        if (w.route[XO_N + d].en) bypass_q[d] <= xb_out[XO_N + d];
      for (int r = 0; r < NREGS; r++)
        if (w.route[XO_R0 + r].en) regs[r] <= xb_out[XO_R0 + r];
    end
  end

  assign out_n = bypass_q[XO_N];
  assign out_e = bypass_q[XO_E];
  assign out_s = bypass_q[XO_S];
  assign out_w = bypass_q[XO_W];

endmodule
