// hfsm_qstack_minmax: min/max HFSM that runs modules in parallel on q = 2
// module/state stacks.
//
// This is the general way to run modules in parallel in an HFSM: with at most
// q modules active at once, the control unit holds q module stacks and q state
// stacks, and duplicates the execution resources of a branch. Here q = 2.
// Stack 0 runs the top module z0 (hgs_z0_par). In its node a0, z0 invokes the
// set {z1, z2}: z1 by a normal call on stack 0, z2 by starting stack 1 (fork).
// Each stack has its own node register and its own read port of the tree
// memory, and selects its active module with its own module stack. A module
// running on either stack may call further modules there. The join is in z0:
// it leaves the node only after z1 has returned and stack 1 has ended.
//
// Interface as hfsm_minmax: pulse start; done is high when z0 has finished
// (and after reset); result_min and result_max are then valid. A run takes
// 3 + max(L + 2, R + 2) cycles, where L and R count the left and right edges
// from the root to the minimum and the maximum: 8 cycles on the example tree
// the tree memory resets to. Rows are rewritten through tree_we/tree_addr/
// tree_row while done is high. q = 2 and the stack depth of 4 are this
// design's choices; the source design describes the scheme without sizes.
module hfsm_qstack_minmax
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

  localparam int unsigned Q    = 2;
  localparam int unsigned SP_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // Tree memory: one read port per stack.
  addr_t rd_addr [Q];
  node_t rd_row  [Q];

  tree_ram #(.ROWS(32), .INIT_FIG1(1'b1)) u_tree (
    .clk, .rst, .clear(1'b0),
    .rd_addr, .rd_row,
    .we(tree_we), .wr_addr(tree_addr), .wr_mask('1), .wr_row(tree_row)
  );

  mod_t            cur_mod   [Q];
  state_t          cur_state [Q];
  logic [SP_W-1:0] sp        [Q];
  logic            ends      [Q];
  logic            overflow  [Q];
  hfsm_ctl_t       ctl       [Q];
  uop_t            uop       [Q];
  addr_t           rg        [Q];
  logic            stk_start [Q];
  mod_t            stk_mod   [Q];

  // Stack 0 is started from outside with z0; stack 1 by z0's fork.
  assign stk_start[0] = start;
  assign stk_mod[0]   = Z0;
  assign stk_start[1] = uop[0].fork_b;
  assign stk_mod[1]   = uop[0].fork_mod;

  for (genvar b = 0; b < Q; b++) begin : g_branch
    hfsm_ctl_t ctl0, ctl1, ctl2;
    uop_t      uop0, uop1, uop2;

    hfsm_stack #(.DEPTH(DEPTH), .RUN_AFTER_RESET(1'b0)) u_stack (
      .clk, .rst, .start(stk_start[b]), .start_mod(stk_mod[b]),
      .op(ctl[b].op), .ns(ctl[b].ns), .callee(ctl[b].callee),
      .cur_mod(cur_mod[b]), .cur_state(cur_state[b]), .sp(sp[b]),
      .ends(ends[b]), .overflow(overflow[b])
    );

    assign rd_addr[b] = rg[b];

    // Every stack can run every module; z0 is only ever started on stack 0.
    hgs_z0_par u_z0 (.state(cur_state[b]), .branch_done(ends[1]), .ctl(ctl0), .uop(uop0));
    hgs_z1_min u_z1 (.state(cur_state[b]), .has_left(rd_row[b].left != NIL),   .ctl(ctl1), .uop(uop1));
    hgs_z2_max u_z2 (.state(cur_state[b]), .has_right(rd_row[b].right != NIL), .ctl(ctl2), .uop(uop2));

    always_comb begin
      ctl[b] = CTL_HOLD;
      uop[b] = UOP_NONE;
      if (!ends[b]) begin
        unique case (cur_mod[b])
          Z0:      begin ctl[b] = ctl0; uop[b] = uop0; end
          Z1:      begin ctl[b] = ctl1; uop[b] = uop1; end
          Z2:      begin ctl[b] = ctl2; uop[b] = uop2; end
          default: ctl[b].op = STK_RET;
        endcase
      end
    end
  end

  // Node registers. A fork sets the branch's register to the root as well.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < Q; b++) rg[b] <= '0;
    end else begin
      for (int b = 0; b < Q; b++) begin
        unique case (uop[b].reg_src)
          REG_LEFT:  rg[b] <= rd_row[b].left;
          REG_RIGHT: rg[b] <= rd_row[b].right;
          REG_ROOT:  rg[b] <= '0;
          default:   ;
        endcase
      end
      if (uop[0].fork_b) rg[1] <= '0;
    end
  end

  // Results: written by whichever stack runs z1 or z2.
  always_ff @(posedge clk) begin
    if (rst) begin
      result_min <= '0;
      result_max <= '0;
    end else begin
      for (int b = 0; b < Q; b++) begin
        if (uop[b].res_min) result_min <= rd_row[b].val;
        if (uop[b].res_max) result_max <= rd_row[b].val;
      end
    end
  end

  assign done = ends[0];

endmodule
