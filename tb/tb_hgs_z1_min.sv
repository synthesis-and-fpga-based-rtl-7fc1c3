// tb_hgs_z1_min: self-checking testbench of the z1 (minimum) module logic.
//
// Applies every state code and every combination of the module's conditions
// and compares the stack operation, next state, callee and micro-operations
// with a table of expected behaviour written out in this file.
module tb_hgs_z1_min;
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

  logic has_left;
  hgs_z1_min dut (.*);

  initial begin
    uop_t u;
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 2; c++) begin
        state = state_t'(s); has_left = c[0];
        #1;
        u = UOP_NONE;
        if (s == 2) begin
          u.res_min = 1'b1;
          expect_ctl($sformatf("a%0d x1=%0d", s, c), STK_RET, 0, Z0, u);
        end else if (c == 1) begin
          u.reg_src = REG_LEFT;
          expect_ctl($sformatf("a%0d x1=%0d", s, c), STK_NEXT, 1, Z0, u);
        end else
          expect_ctl($sformatf("a%0d x1=%0d", s, c), STK_NEXT, 2, Z0, u);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
