// tb_hgs_z0_minmax: self-checking testbench of the top module logic of the min/max HFSM.
//
// Applies every state code and every combination of the module's conditions
// and compares the stack operation, next state, callee and micro-operations
// with a table of expected behaviour written out in this file. A second
// instance with SECOND = Z3 checks that only the callee in a1 changes.
module tb_hgs_z0_minmax;
  import hfsm_pkg::*;

  state_t    state;
  hfsm_ctl_t ctl;
  uop_t      uop;
  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compares one case; e_op/e_ns/e_callee and the expected micro-operations.
  task automatic expect_ctl(string tag, stk_op_t e_op, int e_ns, mod_t e_callee, uop_t e_uop);
    checks++;
    if (ctl.op != e_op || (e_op != STK_HOLD && e_op != STK_RET && int'(ctl.ns) != e_ns) ||
        (e_op == STK_CALL && ctl.callee != e_callee) || uop != e_uop) begin
      failures++;
      $display("FAIL %s: op %0d ns %0d callee %0d uop %h", tag, ctl.op, ctl.ns, ctl.callee, uop);
    end
  endtask

  hgs_z0_minmax dut (.*);

  hfsm_ctl_t ctl_s;
  uop_t      uop_s;
  hgs_z0_minmax #(.SECOND(Z3)) dut_sort (.state, .ctl(ctl_s), .uop(uop_s));

  initial begin
    uop_t u;
    u = UOP_NONE;
    u.reg_src = REG_ROOT;
    state = 3'd0; #1 expect_ctl("a0", STK_CALL, 1, Z1, u);
    state = 3'd1; #1 expect_ctl("a1", STK_CALL, 2, Z2, u);
    state = 3'd2; #1 expect_ctl("a2", STK_RET, 0, Z0, UOP_NONE);
    for (int st = 0; st < 8; st++) begin
      state = state_t'(st);
      #1 checks++;
      if (uop_s != uop || ctl_s.op != ctl.op || ctl_s.ns != ctl.ns ||
          ctl_s.callee != ((st == 1) ? Z3 : ctl.callee)) begin
        failures++;
        $display("FAIL SECOND=Z3 state %0d: op %0d ns %0d callee %0d", st, ctl_s.op, ctl_s.ns, ctl_s.callee);
      end
    end
    state = 3'd1; #1 checks++;
    if (ctl_s.op != STK_CALL || ctl_s.callee != Z3 || ctl_s.ns != 3'd2) begin
      failures++;
      $display("FAIL SECOND=Z3 a1 does not call z3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
