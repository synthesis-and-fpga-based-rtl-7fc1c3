// hfsm_minmax: hierarchical FSM that finds the minimum and the maximum value
// stored in a binary search tree, by calling one module after the other.
//
// The control unit is an hfsm_stack holding three modules: z0 (top), z1 (walk
// left to the minimum) and z2 (walk right to the maximum). The active module is
// selected from the module stack and its state from the state stack; its
// combinational HGS block decides the stack operation and the micro-operations,
// which this module applies to the execution unit: the node address register
// reg, the two result registers and the tree memory.
//
// Interface: a one-cycle start pulse runs z0; done is high while the HFSM is
// finished (also after reset) and result_min/result_max are then valid. On the
// example tree the run takes 12 cycles from start to done (z0: 3, z1: 5, z2: 4).
// The tree memory resets to the ten-node example tree and can be rewritten
// whole rows at a time through tree_we/tree_addr/tree_row while done is high.
// The stack depth of 4 is this design's choice: z0 calls one level deep.
module hfsm_minmax
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  done,
  output data_t result_min,
  output data_t result_max,
  input  logic  tree_we,
  input  addr_t tree_addr,
  input  node_t tree_row
);

  localparam int unsigned SP_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // HFSM core
  mod_t            cur_mod;
  state_t          cur_state;
  logic [SP_W-1:0] sp;
  logic            ends, overflow;
  hfsm_ctl_t       ctl;
  uop_t            uop;

  hfsm_stack #(.DEPTH(DEPTH), .RUN_AFTER_RESET(1'b0)) u_stack (
    .clk, .rst, .start, .start_mod(Z0),
    .op(ctl.op), .ns(ctl.ns), .callee(ctl.callee),
    .cur_mod, .cur_state, .sp, .ends, .overflow
  );

  // Execution unit: tree memory and reg
  addr_t rd_addr [2];
  node_t rd_row  [2];
  addr_t rg;
  node_t node;

  assign rd_addr[0] = rg;
  assign rd_addr[1] = NIL;
  assign node       = rd_row[0];

  tree_ram #(.ROWS(32), .INIT_FIG1(1'b1)) u_tree (
    .clk, .rst, .clear(1'b0),
    .rd_addr, .rd_row,
    .we(tree_we), .wr_addr(tree_addr), .wr_mask('1), .wr_row(tree_row)
  );

  // Modules (HGSs)
  hfsm_ctl_t ctl0, ctl1, ctl2;
  uop_t      uop0, uop1, uop2;

  hgs_z0_minmax u_z0 (.state(cur_state), .ctl(ctl0), .uop(uop0));
  hgs_z1_min    u_z1 (.state(cur_state), .has_left(node.left != NIL),   .ctl(ctl1), .uop(uop1));
  hgs_z2_max    u_z2 (.state(cur_state), .has_right(node.right != NIL), .ctl(ctl2), .uop(uop2));

  // First switch level: select the active module.
  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    if (!ends) begin
      unique case (cur_mod)
        Z0:      begin ctl = ctl0; uop = uop0; end
        Z1:      begin ctl = ctl1; uop = uop1; end
        Z2:      begin ctl = ctl2; uop = uop2; end
        default: ctl.op = STK_RET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rg         <= '0;
      result_min <= '0;
      result_max <= '0;
    end else begin
      unique case (uop.reg_src)
        REG_LEFT:  rg <= node.left;
        REG_RIGHT: rg <= node.right;
        REG_ROOT:  rg <= '0;
        default:   ;
      endcase
      if (uop.res_min) result_min <= node.val;
      if (uop.res_max) result_max <= node.val;
    end
  end

  assign done = ends;

endmodule
