// hgs_z1_min: module z1, "find the minimum", as combinational next-state and
// micro-operation logic for an HFSM.
//
// Starting from the node in reg, the module follows left sub-tree pointers for
// as long as a left sub-tree exists (condition x1, operation y1: reg =
// RAM[reg].left). At a node without a left sub-tree it copies the node value to
// result[0] (operation y2) and returns to its caller. States:
//   a0, a1 : if x1 then y1 and go to a1, else go to a2
//   a2     : y2 and end_module
// One state is one clock cycle, so a walk over k left edges takes k + 2 cycles.
// The walk goes left because the left sub-tree holds the smaller values. This
// follows the source design's prose and state diagram; one of its code
// listings reads the right pointer here instead, which would find the maximum.
module hgs_z1_min
  import hfsm_pkg::*;
(
  input  state_t    state,
  input  logic      has_left,   // x1: RAM[reg].left != NIL
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0, 3'd1: begin
        ctl.op = STK_NEXT;
        if (has_left) begin
          uop.reg_src = REG_LEFT;
          ctl.ns      = 3'd1;
        end else begin
          ctl.ns      = 3'd2;
        end
      end
      3'd2: begin
        uop.res_min = 1'b1;
        ctl.op      = STK_RET;
        ctl.ns      = 3'd2;
      end
      default: ctl.op = STK_RET;   // unused codes leave the module
    endcase
  end

endmodule
