// tb_local_stack: self-checking testbench of the local (node address) stack.
//
// Random push, put, pop and idle operations, biased in phases so that the
// stack fills up (refused pushes) and empties (pops at 0). After every cycle
// the pointer, the two read taps (slot below and slot above the pointer) and
// the overflow flag are compared with a model array.
module tb_local_stack;
  import hfsm_pkg::*;

  localparam int DEPTH = 36;

  logic       clk = 1'b0;
  logic       rst, overflow;
  ls_op_t     op;
  addr_t      din, top, above;
  logic [5:0] sp;

  int checks = 0, failures = 0;

  local_stack #(.DEPTH(DEPTH)) dut (.*);

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

  int m [DEPTH];
  int m_sp = 0, n_full = 0;
  bit m_ovf = 0;

  initial begin
    rst = 1'b1; op = LS_NONE; din = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (m[i]) m[i] = 31;
    for (int c = 0; c < 20000; c++) begin
      int r;
      bit fill;
      r = $urandom_range(0, 99);
      fill = ((c / 200) % 2) == 0;
      op  = (r < (fill ? 60 : 20)) ? LS_PUSH : (r < 75 ? LS_POP : (r < 90 ? LS_PUT : LS_NONE));
      din = addr_t'($urandom);
      @(negedge clk);
      case (op)
        LS_PUSH: if (m_sp < DEPTH - 1) begin m[m_sp] = int'(din); m_sp++; end
                 else begin m_ovf = 1; n_full++; end
        LS_PUT:  m[m_sp] = int'(din);
        LS_POP:  if (m_sp > 0) m_sp--;
        default: ;
      endcase
      check(int'(sp) == m_sp, $sformatf("sp %0d, expected %0d", sp, m_sp));
      check(int'(top) == (m_sp > 0 ? m[m_sp - 1] : 31), "top tap");
      check(int'(above) == (m_sp + 1 < DEPTH ? m[m_sp + 1] : 31), "above tap");
      check(overflow == m_ovf, "overflow");
    end
    check(n_full > 0, "stack was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
