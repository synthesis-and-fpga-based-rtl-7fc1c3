// hgs_z2_max: module z2, "find the maximum", as combinational next-state and
// micro-operation logic for an HFSM.
//
// Starting from the node in reg, the module follows right sub-tree pointers for
// as long as a right sub-tree exists (condition x1, operation y3: reg =
// RAM[reg].right). At a node without a right sub-tree it copies the node value to
// result[1] (operation y2) and returns to its caller. States:
//   a0, a1 : if x1 then y3 and go to a1, else go to a2
//   a2     : y2 and end_module
// One state is one clock cycle, so a walk over k right edges takes k + 2 cycles.
// The walk goes right because the right sub-tree holds the larger values. This
// follows the source design's prose and state diagram; one of its code
// listings reads the left pointer here instead.
module hgs_z2_max
  import hfsm_pkg::*;
(
  input  state_t    state,
  input  logic      has_right,  // x1: RAM[reg].right != NIL
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0, 3'd1: begin
        ctl.op = STK_NEXT;
        if (has_right) begin
          uop.reg_src = REG_RIGHT;
          ctl.ns      = 3'd1;
        end else begin
          ctl.ns      = 3'd2;
        end
      end
      3'd2: begin
        uop.res_max = 1'b1;
        ctl.op      = STK_RET;
        ctl.ns      = 3'd2;
      end
      default: ctl.op = STK_RET;   // unused codes leave the module
    endcase
  end

endmodule
