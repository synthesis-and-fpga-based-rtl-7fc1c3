// hgs_z0_par: top module z0 of the min/max HFSM with parallel module stacks.
//
// In its node a0, z0 invokes the set {z1, z2}: z1 runs as an ordinary
// hierarchical call on z0's own stack, and z2 is started at the same time on a
// second module/state stack (the parallel branch). z0 may leave the node only
// when every module of the set has finished: z1 finishing brings z0 back to
// a1, and a1 then waits for the branch to report that z2 has ended.
//   a0 : reg = root, call z1 here, start z2 on the branch (reg = root there),
//        resume in a1
//   a1 : if the branch has ended go to a2, else stay
//   a2 : end_module
// The set {z1, z2} in one node and the rule of waiting for all of it come from
// the source design's description of parallel modules; the state encoding and
// the fork/join signals are this design's. Combinational.
module hgs_z0_par
  import hfsm_pkg::*;
(
  input  state_t    state,
  input  logic      branch_done,   // the branch stack has ended
  output hfsm_ctl_t ctl,
  output uop_t      uop
);

  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    unique case (state)
      3'd0: begin
        uop.reg_src  = REG_ROOT;
        uop.fork_b   = 1'b1;
        uop.fork_mod = Z2;
        ctl          = '{op: STK_CALL, ns: 3'd1, callee: Z1};
      end
      3'd1: if (branch_done) ctl = '{op: STK_NEXT, ns: 3'd2, callee: Z0};
      default: ctl = '{op: STK_RET, ns: 3'd2, callee: Z0};
    endcase
  end

endmodule
