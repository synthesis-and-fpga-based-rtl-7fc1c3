// hfsm_min_sort: the min/max HFSM with its second module swapped for the
// sorting module - the same top module z0 finds the minimum of a binary search
// tree and then writes the whole tree, sorted, to the output stack.
//
// This is the reuse of modules the source design describes: in the node a1 of
// z0 the module z2 is replaced with the recursive module z3, which sorts the
// data instead of finding the maximum. z0 is hgs_z0_minmax with SECOND = Z3,
// z1 is the unchanged hgs_z1_min and z3 is the unchanged hgs_z3_sort, so the
// run is: a0 reg = root, call z1 (walk left, result_min = value); a1 reg =
// root, call z3 (in-order traversal to the output stack); a2 end.
// Execution unit: the node address register reg, result_min, the tree memory,
// the local stack that saves reg across the recursive calls of z3 and the
// output stack. The output stack is emptied by start.
//
// Interface: a one-cycle start pulse runs z0; done is high while the HFSM is
// finished (also after reset), and then result_min and the output stack
// (so_idx/so_entry/so_count) are valid. With LEFT_FIRST = 0 entry so_count-1
// is the smallest value. The tree memory resets to the ten-node example tree
// and can be rewritten row by row through tree_we/tree_addr/tree_row while
// done is high.
// Timing: one state per cycle. For a tree of n nodes whose leftmost node is at
// depth L the run takes 3 + (L + 2) + 5n + 2(n + 1) cycles from start to done:
// 80 cycles on the example tree (n = 10, L = 3).
// Sizes: DEPTH = 33 and LS_DEPTH = 36 cover a 31-row degenerate tree (z0 plus
// 32 levels of z3), as in the sorter; both are this design's choice.
module hfsm_min_sort
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH      = 33,
  parameter int unsigned LS_DEPTH   = 36,
  parameter bit          LEFT_FIRST = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       done,
  output data_t      result_min,
  input  logic       tree_we,
  input  addr_t      tree_addr,
  input  node_t      tree_row,
  input  addr_t      so_idx,
  output out_entry_t so_entry,
  output logic [5:0] so_count
);

  localparam int unsigned SP_W  = $clog2(DEPTH);
  localparam int unsigned LSP_W = $clog2(LS_DEPTH + 1);

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

  // Local stack: saves reg across the recursive calls of z3
  addr_t            ls_top, ls_above;
  logic [LSP_W-1:0] ls_sp;
  logic             ls_overflow;

  local_stack #(.DEPTH(LS_DEPTH)) u_ls (
    .clk, .rst(rst || start), .op(uop.ls_op), .din(rg),
    .top(ls_top), .above(ls_above), .sp(ls_sp), .overflow(ls_overflow)
  );

  // Output stack: receives the sorted sequence
  out_entry_t so_din;
  assign so_din = '{cnt: node.cnt, val: {3'b000, node.val}};

  output_stack #(.DEPTH(32)) u_out (
    .clk, .rst, .clear(start), .push(uop.out_push), .din(so_din),
    .rd_idx(so_idx), .rd_entry(so_entry), .count(so_count)
  );

  // Modules (HGSs)
  hfsm_ctl_t ctl0, ctl1, ctl3;
  uop_t      uop0, uop1, uop3;

  hgs_z0_minmax #(.SECOND(Z3)) u_z0 (.state(cur_state), .ctl(ctl0), .uop(uop0));
  hgs_z1_min u_z1 (.state(cur_state), .has_left(node.left != NIL), .ctl(ctl1), .uop(uop1));
  hgs_z3_sort #(.LEFT_FIRST(LEFT_FIRST)) u_z3 (
    .state(cur_state), .reg_is_nil(rg == NIL), .ctl(ctl3), .uop(uop3)
  );

  // First switch level: select the active module.
  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    if (!ends && !start) begin
      unique case (cur_mod)
        Z0:      begin ctl = ctl0; uop = uop0; end
        Z1:      begin ctl = ctl1; uop = uop1; end
        Z3:      begin ctl = ctl3; uop = uop3; end
        default: ctl.op = STK_RET;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rg         <= '0;
      result_min <= '0;
    end else begin
      unique case (uop.reg_src)
        REG_LEFT:  rg <= node.left;
        REG_RIGHT: rg <= node.right;
        REG_ROOT:  rg <= '0;
        REG_POP:   if (ls_sp != '0) rg <= ls_top;
        default:   ;
      endcase
      if (uop.res_min) result_min <= node.val;
    end
  end

  assign done = ends;

  // The recursion never runs out of stack.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !overflow && !ls_overflow);

endmodule
