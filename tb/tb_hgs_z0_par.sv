// tb_hgs_z0_par: self-checking testbench of the top module logic of the
// parallel-stack min/max HFSM.
//
// Applies every state with the branch finished and not finished, and compares
// the stack operation, next state, callee, the fork request and the other
// micro-operations with the expected behaviour written out here.
module tb_hgs_z0_par;
  import hfsm_pkg::*;

  state_t    state;
  logic      branch_done;
  hfsm_ctl_t ctl;
  uop_t      uop;
  int checks = 0, failures = 0;

  hgs_z0_par dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(string tag, stk_op_t e_op, int e_ns, mod_t e_callee, uop_t e_uop);
    checks++;
    if (ctl.op != e_op || (e_op != STK_HOLD && e_op != STK_RET && int'(ctl.ns) != e_ns) ||
        (e_op == STK_CALL && ctl.callee != e_callee) || uop != e_uop) begin
      failures++;
      $display("FAIL %s: op %0d ns %0d callee %0d uop %h", tag, ctl.op, ctl.ns, ctl.callee, uop);
    end
  endtask

  initial begin
    uop_t u;
    for (int c = 0; c < 2; c++) begin
      branch_done = c[0];
      u = UOP_NONE; u.reg_src = REG_ROOT; u.fork_b = 1'b1; u.fork_mod = Z2;
      state = 3'd0; #1 expect_ctl("a0", STK_CALL, 1, Z1, u);
      state = 3'd1; #1
      if (c == 1) expect_ctl("a1 joined", STK_NEXT, 2, Z0, UOP_NONE);
      else        expect_ctl("a1 waiting", STK_HOLD, 0, Z0, UOP_NONE);
      state = 3'd2; #1 expect_ctl("a2", STK_RET, 0, Z0, UOP_NONE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
