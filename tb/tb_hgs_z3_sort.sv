// tb_hgs_z3_sort: self-checking testbench of the recursive traversal module z3 (both orders).
//
// Applies every state code and every combination of the module's conditions
// and compares the stack operation, next state, callee and micro-operations
// with a table of expected behaviour written out in this file.
module tb_hgs_z3_sort;
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

  logic      reg_is_nil;
  hfsm_ctl_t ctl_b;
  uop_t      uop_b;
  hgs_z3_sort dut (.*);
  hgs_z3_sort #(.LEFT_FIRST(1'b1)) dut_b (.state, .reg_is_nil, .ctl(ctl_b), .uop(uop_b));

  initial begin
    uop_t u;
    for (int order = 0; order < 2; order++)
      for (int c = 0; c < 2; c++) begin
        reg_is_nil = c[0];
        for (int s = 0; s < 5; s++) begin
          state = state_t'(s);
          #1;
          if (order == 1) begin ctl = ctl_b; uop = uop_b; end
          u = UOP_NONE;
          case (s)
            0: expect_ctl("a0", STK_NEXT, c ? 4 : 1, Z0, u);
            1: begin
              u.ls_op = LS_PUSH; u.ls_src = LSD_REG; u.reg_src = order ? REG_LEFT : REG_RIGHT;
              expect_ctl("a1", STK_CALL, 2, Z3, u);
            end
            2: begin u.out_push = 1'b1; expect_ctl("a2", STK_NEXT, 3, Z0, u); end
            3: begin
              u.ls_op = LS_PUSH; u.ls_src = LSD_REG; u.reg_src = order ? REG_RIGHT : REG_LEFT;
              expect_ctl("a3", STK_CALL, 4, Z3, u);
            end
            default: begin
              u.ls_op = LS_POP; u.reg_src = REG_POP;
              expect_ctl("a4", STK_RET, 0, Z0, u);
            end
          endcase
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
