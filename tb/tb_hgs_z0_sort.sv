// tb_hgs_z0_sort: self-checking testbench of the top module logic of the sorter.
//
// Applies every state code and every combination of the module's conditions
// and compares the stack operation, next state, callee and micro-operations
// with a table of expected behaviour written out in this file.
module tb_hgs_z0_sort;
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

  logic in_valid, item_is_nil, added;
  hgs_z0_sort dut (.*);

  initial begin
    uop_t u;
    for (int c = 0; c < 8; c++) begin
      {in_valid, item_is_nil, added} = c[2:0];
      state = 3'd0;
      #1;
      u = UOP_NONE;
      if (!in_valid) expect_ctl("a0 idle", STK_HOLD, 0, Z0, u);
      else if (item_is_nil) begin u.in_take = 1; expect_ctl("a0 nil", STK_HOLD, 0, Z0, u); end
      else begin u.reg_src = REG_ROOT; expect_ctl("a0 item", STK_CALL, 1, Z4, u); end
      state = 3'd1;
      #1;
      u = UOP_NONE;
      u.in_take = 1;
      if (added) begin
        u.out_clear = 1; u.reg_src = REG_ROOT;
        expect_ctl("a1 added", STK_CALL, 0, Z3, u);
      end else expect_ctl("a1 repeat", STK_NEXT, 0, Z0, u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
