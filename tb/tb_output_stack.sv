// tb_output_stack: self-checking testbench of the output stack.
//
// Random pushes and occasional clears, with phases long enough to overfill
// the stack. The fill level and every stored entry (read back through the
// read port) are compared with a model queue.
module tb_output_stack;
  import hfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, clear, push;
  out_entry_t din, rd_entry;
  logic [4:0] rd_idx;
  logic [5:0] count;

  int checks = 0, failures = 0;

  output_stack #(.DEPTH(32)) dut (.*);

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

  out_entry_t m [$];
  int n_full = 0;

  initial begin
    rst = 1'b1; clear = 1'b0; push = 1'b0; din = '0; rd_idx = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      clear = ($urandom_range(0, 59) == 0);
      push  = ($urandom_range(0, 3) != 0);
      din   = out_entry_t'($urandom);
      rd_idx = 5'($urandom);
      @(negedge clk);
      if (clear) m.delete();
      else if (push) begin
        if (m.size() < 32) m.push_back(din);
        else n_full++;
      end
      check(int'(count) == m.size(), $sformatf("count %0d, expected %0d", count, m.size()));
      if (int'(rd_idx) < m.size())
        check(rd_entry == m[rd_idx], $sformatf("entry %0d", rd_idx));
    end
    check(n_full > 0, "stack was overfilled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
