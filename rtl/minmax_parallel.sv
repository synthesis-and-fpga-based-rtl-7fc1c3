// minmax_parallel: the minimum and the maximum of a binary search tree found by
// two autonomous FSMs that run at the same time.
//
// Instead of one HFSM calling z1 and then z2, each of the two modules gets an
// FSM of its own: a state register and a node register, driven by the same
// combinational HGS blocks (hgs_z1_min, hgs_z2_max) that the hierarchical
// version uses. A start pulse sets both FSMs to a0 at the root. Each FSM stops
// when its module executes end_module. done (the join) is high only when both
// have stopped, so a run lasts as long as the longer of the two walks: 5 cycles
// on the example tree, against 12 for the sequential HFSM.
//
// The FSMs read the tree through the two read ports of one tree memory. The
// tree resets to the example tree and is rewritten through the row write port
// while done is high. done is high after reset.
module minmax_parallel
  import hfsm_pkg::*;
(
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

  addr_t rd_addr [2];
  node_t rd_row  [2];

  tree_ram #(.ROWS(32), .INIT_FIG1(1'b1)) u_tree (
    .clk, .rst, .clear(1'b0),
    .rd_addr, .rd_row,
    .we(tree_we), .wr_addr(tree_addr), .wr_mask('1), .wr_row(tree_row)
  );

  // FSM 1 runs z1, FSM 2 runs z2.
  logic      run1, run2;
  state_t    st1, st2;
  addr_t     rg1, rg2;
  hfsm_ctl_t ctl1, ctl2;
  uop_t      uop1, uop2;

  assign rd_addr[0] = rg1;
  assign rd_addr[1] = rg2;

  hgs_z1_min u_z1 (.state(st1), .has_left(rd_row[0].left != NIL),   .ctl(ctl1), .uop(uop1));
  hgs_z2_max u_z2 (.state(st2), .has_right(rd_row[1].right != NIL), .ctl(ctl2), .uop(uop2));

  always_ff @(posedge clk) begin
    if (rst) begin
      run1 <= 1'b0;  run2 <= 1'b0;
      st1  <= '0;    st2  <= '0;
      rg1  <= '0;    rg2  <= '0;
      result_min <= '0;
      result_max <= '0;
    end else if (start) begin
      run1 <= 1'b1;  run2 <= 1'b1;
      st1  <= '0;    st2  <= '0;
      rg1  <= '0;    rg2  <= '0;
    end else begin
      if (run1) begin
        if (ctl1.op == STK_RET)  run1 <= 1'b0;
        if (ctl1.op == STK_NEXT) st1  <= ctl1.ns;
        if (uop1.reg_src == REG_LEFT) rg1 <= rd_row[0].left;
        if (uop1.res_min) result_min <= rd_row[0].val;
      end
      if (run2) begin
        if (ctl2.op == STK_RET)  run2 <= 1'b0;
        if (ctl2.op == STK_NEXT) st2  <= ctl2.ns;
        if (uop2.reg_src == REG_RIGHT) rg2 <= rd_row[1].right;
        if (uop2.res_max) result_max <= rd_row[1].val;
      end
    end
  end

  assign done = !run1 && !run2;

endmodule
