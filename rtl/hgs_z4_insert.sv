// hgs_z4_insert: recursive module z4, which inserts the incoming item into the
// binary search tree.
//
// z4 is called with reg pointing at the root of a sub-tree. It returns, in the
// local stack slot just above the caller's pointer, the address of that
// sub-tree's root after the insertion; the caller links it into its node. This
// way a new node hangs itself into its parent on the way back up. States:
//   a0 : reg == NIL -> a1; item == value -> a6; item > value -> a3; else a2
//   a1 : allocate {item, NIL, NIL, count 1} in the next free row, leave its
//        address on the local stack as the result, go to a7
//   a2 : save reg, reg = left child, call z4, resume in a4
//   a3 : save reg, reg = right child, call z4, resume in a5
//   a4 : RAM[reg].left  = result of the call, go to a7
//   a5 : RAM[reg].right = result of the call, go to a7
//   a6 : repeated value: increment the node's count, leave reg as the result,
//        go to a7
//   a7 : end_module, pop the local stack and restore reg from it
// The source design advances the ROM address in a6; here a6 counts the repeat
// and the top module consumes every item, so z0 sees new and repeated values
// alike. Inserting at depth d (edges from the root) takes 4d + 3 cycles.
// Combinational.
module hgs_z4_insert
  import hfsm_pkg::*;
(
  input  state_t    state,
  input  logic      reg_is_nil,   // reg == NIL
  input  logic      item_eq,      // item == RAM[reg].val
  input  logic      item_gt,      // item >  RAM[reg].val
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0: begin
        ctl.op = STK_NEXT;
        if (reg_is_nil)   ctl.ns = 3'd1;
        else if (item_eq) ctl.ns = 3'd6;
        else if (item_gt) ctl.ns = 3'd3;
        else              ctl.ns = 3'd2;
      end
      3'd1: begin
        uop.alloc  = 1'b1;
        uop.ls_op  = LS_PUT;
        uop.ls_src = LSD_NEW;
        ctl        = '{op: STK_NEXT, ns: 3'd7, callee: Z0};
      end
      3'd2: begin
        uop.ls_op   = LS_PUSH;
        uop.ls_src  = LSD_REG;
        uop.reg_src = REG_LEFT;
        ctl         = '{op: STK_CALL, ns: 3'd4, callee: Z4};
      end
      3'd3: begin
        uop.ls_op   = LS_PUSH;
        uop.ls_src  = LSD_REG;
        uop.reg_src = REG_RIGHT;
        ctl         = '{op: STK_CALL, ns: 3'd5, callee: Z4};
      end
      3'd4: begin
        uop.link_left = 1'b1;
        ctl           = '{op: STK_NEXT, ns: 3'd7, callee: Z0};
      end
      3'd5: begin
        uop.link_right = 1'b1;
        ctl            = '{op: STK_NEXT, ns: 3'd7, callee: Z0};
      end
      3'd6: begin
        uop.cnt_inc = 1'b1;
        uop.ls_op   = LS_PUT;
        uop.ls_src  = LSD_REG;
        ctl         = '{op: STK_NEXT, ns: 3'd7, callee: Z0};
      end
      default: begin   // a7
        uop.ls_op   = LS_POP;
        uop.reg_src = REG_POP;
        ctl         = '{op: STK_RET, ns: 3'd7, callee: Z0};
      end
    endcase
  end

endmodule
