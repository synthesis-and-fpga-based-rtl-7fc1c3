// hgs_z0_minmax: top module z0 of the min/max project.
//
// z0 invokes z1 (find the minimum) and then z2 (find the maximum) on the same
// tree, each time starting from the root node 0:
//   a0 : reg = 0, new_module(z1), resume in a1
//   a1 : reg = 0, new_module(SECOND), resume in a2
//   a2 : end_module - the whole HFSM has finished
// SECOND = Z2 is the min/max project. SECOND = Z3 is the reuse the source
// design points out: the sorting module z3 takes the place of z2 in a1, so
// the same z0 finds the minimum and then sorts the tree.
// Combinational; each state takes one clock cycle of the HFSM.
module hgs_z0_minmax
  import hfsm_pkg::*;
#(
  parameter mod_t SECOND = Z2
) (
  input  state_t    state,
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0: begin
        uop.reg_src = REG_ROOT;
        ctl         = '{op: STK_CALL, ns: 3'd1, callee: Z1};
      end
      3'd1: begin
        uop.reg_src = REG_ROOT;
        ctl         = '{op: STK_CALL, ns: 3'd2, callee: SECOND};
      end
      default: ctl = '{op: STK_RET, ns: 3'd2, callee: Z0};
    endcase
  end

endmodule
