// hgs_z0_sort: top module z0 of the sorter.
//
// z0 runs forever. For every incoming item it calls z4 to put the item into the
// tree; when z4 has added a new node it clears the output stack and calls z3,
// which writes the whole tree to the output stack in sorted order. So after
// each item the output stack holds the sorted set of everything received.
//   a0 : no item     -> stay in a0 (idle)
//        item == NIL -> consume it and stay (31 is not a storable value)
//        otherwise   -> reg = root, call z4, resume in a1
//   a1 : consume the item; if a node was added: clear the output stack,
//        reg = root, call z3, resume in a0; otherwise go to a0
// The source design describes this module only in words; the two-state form is
// this design's. Combinational.
module hgs_z0_sort
  import hfsm_pkg::*;
(
  input  state_t    state,
  input  logic      in_valid,     // an item is waiting
  input  logic      item_is_nil,  // the waiting item is 31
  input  logic      added,        // the last z4 run allocated a node
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0: begin
        if (in_valid && item_is_nil) begin
          uop.in_take = 1'b1;
        end else if (in_valid) begin
          uop.reg_src = REG_ROOT;
          ctl         = '{op: STK_CALL, ns: 3'd1, callee: Z4};
        end
      end
      default: begin   // a1
        uop.in_take = 1'b1;
        if (added) begin
          uop.out_clear = 1'b1;
          uop.reg_src   = REG_ROOT;
          ctl           = '{op: STK_CALL, ns: 3'd0, callee: Z3};
        end else begin
          ctl           = '{op: STK_NEXT, ns: 3'd0, callee: Z0};
        end
      end
    endcase
  end

endmodule
