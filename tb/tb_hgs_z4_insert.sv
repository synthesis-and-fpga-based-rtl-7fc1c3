// tb_hgs_z4_insert: self-checking testbench of the recursive insertion module z4.
//
// Applies every state code and every combination of the module's conditions
// and compares the stack operation, next state, callee and micro-operations
// with a table of expected behaviour written out in this file.
module tb_hgs_z4_insert;
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

  logic reg_is_nil, item_eq, item_gt;
  hgs_z4_insert dut (.*);

  initial begin
    uop_t u;
    int e;
    for (int c = 0; c < 8; c++) begin
      {reg_is_nil, item_eq, item_gt} = c[2:0];
      if (item_eq && item_gt) continue;   // impossible combination
      for (int s = 0; s < 8; s++) begin
        state = state_t'(s);
        #1;
        u = UOP_NONE;
        case (s)
          0: begin
            e = reg_is_nil ? 1 : item_eq ? 6 : item_gt ? 3 : 2;
            expect_ctl($sformatf("a0 c=%0d", c), STK_NEXT, e, Z0, u);
          end
          1: begin u.alloc = 1; u.ls_op = LS_PUT; u.ls_src = LSD_NEW; expect_ctl("a1", STK_NEXT, 7, Z0, u); end
          2: begin u.ls_op = LS_PUSH; u.reg_src = REG_LEFT;  expect_ctl("a2", STK_CALL, 4, Z4, u); end
          3: begin u.ls_op = LS_PUSH; u.reg_src = REG_RIGHT; expect_ctl("a3", STK_CALL, 5, Z4, u); end
          4: begin u.link_left = 1;  expect_ctl("a4", STK_NEXT, 7, Z0, u); end
          5: begin u.link_right = 1; expect_ctl("a5", STK_NEXT, 7, Z0, u); end
          6: begin u.cnt_inc = 1; u.ls_op = LS_PUT; u.ls_src = LSD_REG; expect_ctl("a6", STK_NEXT, 7, Z0, u); end
          default: begin u.ls_op = LS_POP; u.reg_src = REG_POP; expect_ctl("a7", STK_RET, 0, Z0, u); end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
