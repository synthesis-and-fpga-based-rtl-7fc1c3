// tb_hfsm_stack: self-checking testbench of the HFSM module/state stacks.
//
// Drives random stack operations (next state, call, return, hold, start) and
// compares the active module, the active state, the pointer, the end flag and
// the overflow flag every cycle with a model kept in testbench arrays. Call
// bursts drive the stack to its full depth so that refused calls occur, and
// returns drive it back to level 0 so that the top module ends.
module tb_hfsm_stack;
  import hfsm_pkg::*;

  localparam int unsigned DEPTH = 33;

  logic     clk = 1'b0;
  logic     rst, start, ends, overflow;
  stk_op_t  op;
  state_t   ns, cur_state;
  mod_t     callee, cur_mod, start_mod;
  logic [5:0] sp;

  int checks = 0, failures = 0;

  hfsm_stack #(.DEPTH(DEPTH), .RUN_AFTER_RESET(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int m_mod [DEPTH], m_st [DEPTH];
  int m_sp;
  bit m_ends, m_ovf;
  int n_refused = 0, n_ends = 0;

  task automatic compare();
    check(int'(sp) == m_sp, $sformatf("sp %0d, expected %0d", sp, m_sp));
    check(ends == m_ends && overflow == m_ovf, "ends/overflow");
    check(int'(cur_mod) == m_mod[m_sp] && int'(cur_state) == m_st[m_sp],
          $sformatf("top %0d/%0d, expected %0d/%0d", cur_mod, cur_state, m_mod[m_sp], m_st[m_sp]));
  endtask

  initial begin
    int bias;
    rst = 1'b1; start = 1'b0; op = STK_HOLD; ns = '0; callee = Z0; start_mod = Z0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m_sp = 0; m_mod[0] = 0; m_st[0] = 0; m_ends = 0; m_ovf = 0;
    compare();
    for (int c = 0; c < 20000; c++) begin
      // Phases: mostly calls, then mostly returns.
      bias  = ((c / 300) % 2 == 0) ? 70 : 15;
      start = ($urandom_range(0, 999) == 0);
      ns    = state_t'($urandom_range(0, 7));
      callee = mod_t'($urandom_range(0, 4));
      start_mod = mod_t'($urandom_range(0, 4));
      if ($urandom_range(0, 99) < bias) op = STK_CALL;
      else op = stk_op_t'($urandom_range(0, 3));
      if (m_ends && $urandom_range(0, 9) == 0) start = 1'b1;
      @(negedge clk);
      if (start) begin
        m_sp = 0; m_mod[0] = int'(start_mod); m_st[0] = 0; m_ends = 0;
      end else if (!m_ends) begin
        case (op)
          STK_NEXT: m_st[m_sp] = int'(ns);
          STK_CALL: begin
            m_st[m_sp] = int'(ns);
            if (m_sp < DEPTH - 1) begin
              m_sp++; m_mod[m_sp] = int'(callee); m_st[m_sp] = 0;
            end else begin
              m_ovf = 1; n_refused++;
            end
          end
          STK_RET: if (m_sp == 0) begin m_ends = 1; n_ends++; end else m_sp--;
          default: ;
        endcase
      end
      compare();
    end
    check(n_refused > 0 && n_ends > 0, $sformatf("refused calls %0d, ends %0d", n_refused, n_ends));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
