// hgs_z3_sort: recursive module z3, which writes the values of a binary tree to
// the output stack in sorted order.
//
// z3 is called with reg pointing at the root of a sub-tree and calls itself for
// each child (an in-order traversal). Before each recursive call it saves reg on
// the local stack; the callee restores it when it returns. States:
//   a0 : if reg != NIL go to a1, else go to a4
//   a1 : save reg, reg = first child, call z3, resume in a2
//   a2 : push {count, 000@RAM[reg].val} to the output stack, go to a3
//   a3 : save reg, reg = second child, call z3, resume in a4
//   a4 : end_module, pop the local stack and restore reg from it
// With LEFT_FIRST = 0 the first child is the right sub-tree, as in the source
// design: the largest value is pushed first and the top of the output stack
// holds the smallest. LEFT_FIRST = 1 swaps the two children and so the order.
// A node takes 5 cycles, an empty sub-tree 2: a tree of n nodes is sorted in
// 5n + 2(n+1) cycles. Combinational.
module hgs_z3_sort
  import hfsm_pkg::*;
#(
  parameter bit LEFT_FIRST = 1'b0
) (
  input  state_t    state,
  input  logic      reg_is_nil,   // reg == NIL: empty sub-tree
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  localparam reg_src_t FIRST  = LEFT_FIRST ? REG_LEFT  : REG_RIGHT;
  localparam reg_src_t SECOND = LEFT_FIRST ? REG_RIGHT : REG_LEFT;

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0: ctl = '{op: STK_NEXT, ns: (reg_is_nil ? 3'd4 : 3'd1), callee: Z0};
      3'd1: begin
        uop.ls_op   = LS_PUSH;
        uop.ls_src  = LSD_REG;
        uop.reg_src = FIRST;
        ctl         = '{op: STK_CALL, ns: 3'd2, callee: Z3};
      end
      3'd2: begin
        uop.out_push = 1'b1;
        ctl          = '{op: STK_NEXT, ns: 3'd3, callee: Z0};
      end
      3'd3: begin
        uop.ls_op   = LS_PUSH;
        uop.ls_src  = LSD_REG;
        uop.reg_src = SECOND;
        ctl         = '{op: STK_CALL, ns: 3'd4, callee: Z3};
      end
      default: begin   // a4 (unused codes also leave the module)
        uop.ls_op   = LS_POP;
        uop.reg_src = REG_POP;
        ctl         = '{op: STK_RET, ns: 3'd4, callee: Z0};
      end
    endcase
  end

endmodule
