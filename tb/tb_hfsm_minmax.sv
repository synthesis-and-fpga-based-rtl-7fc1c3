// tb_hfsm_minmax: self-checking testbench of the sequential min/max HFSM.
//
// First run on the example tree held in the tree memory after reset (minimum
// 1, maximum 10, 12 cycles). Then random binary search trees are built in the
// testbench by inserting random distinct values, loaded row by row through the
// loader port, and run again. Expected results and cycle counts come from the
// testbench's own tree: min/max by scanning all values, and 3 + (L + 2) +
// (R + 2) cycles where L and R count the left and right edges from the root to
// the minimum and the maximum.
module tb_hfsm_minmax;
  import hfsm_pkg::*;

  logic  clk = 1'b0;
  logic  rst, start, done, tree_we;
  data_t result_min, result_max;
  addr_t tree_addr;
  node_t tree_row;

  int checks = 0, failures = 0;

  hfsm_minmax dut (.*);

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

  int t_val [31], t_left [31], t_right [31];
  int t_n;

  function automatic void t_insert(int v);
    int cur = 0;
    t_val[t_n] = v; t_left[t_n] = 31; t_right[t_n] = 31;
    if (t_n > 0)
      forever begin
        if (v < t_val[cur]) begin
          if (t_left[cur] == 31) begin t_left[cur] = t_n; break; end
          cur = t_left[cur];
        end else begin
          if (t_right[cur] == 31) begin t_right[cur] = t_n; break; end
          cur = t_right[cur];
        end
      end
    t_n++;
  endfunction

  task automatic run_and_check(int exp_min, int exp_max, int exp_cycles);
    int cycles = 0;
    check(done == 1'b1, "done before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cycles < 500) begin
      @(negedge clk);
      cycles++;
    end
    check(int'(result_min) == exp_min, $sformatf("min %0d, expected %0d", result_min, exp_min));
    check(int'(result_max) == exp_max, $sformatf("max %0d, expected %0d", result_max, exp_max));
    check(cycles == exp_cycles, $sformatf("%0d cycles, expected %0d", cycles, exp_cycles));
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; tree_we = 1'b0; tree_addr = '0; tree_row = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run_and_check(1, 10, 12);
    run_and_check(1, 10, 12);

    for (int t = 0; t < 60; t++) begin
      bit used [31];
      int n, mn, mx, l, r, cur, v;
      n = $urandom_range(1, 31);
      mn = 99; mx = -1; l = 0; r = 0;
      t_n = 0;
      foreach (used[i]) used[i] = 1'b0;
      while (t_n < n) begin
        v = $urandom_range(0, 30);
        if (!used[v]) begin used[v] = 1'b1; t_insert(v); end
      end
      for (int i = 0; i < n; i++) begin
        if (t_val[i] < mn) mn = t_val[i];
        if (t_val[i] > mx) mx = t_val[i];
      end
      cur = 0; while (t_left[cur] != 31)  begin cur = t_left[cur];  l++; end
      cur = 0; while (t_right[cur] != 31) begin cur = t_right[cur]; r++; end
      for (int i = 0; i < n; i++) begin
        tree_we = 1'b1; tree_addr = addr_t'(i);
        tree_row = '{val: data_t'(t_val[i]), left: addr_t'(t_left[i]), right: addr_t'(t_right[i]), cnt: 4'd1};
        @(negedge clk);
      end
      tree_we = 1'b0;
      run_and_check(mn, mx, 3 + (l + 2) + (r + 2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
