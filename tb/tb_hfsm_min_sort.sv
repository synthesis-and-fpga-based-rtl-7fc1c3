// tb_hfsm_min_sort: self-checking testbench of the HFSM whose top module calls
// z1 (minimum) and then the sorting module z3 in place of z2.
//
// Two instances share the inputs: the default one (right sub-tree first, so
// the last output entry is the smallest value) and one with LEFT_FIRST = 1
// (the opposite order). The first runs use the example tree held in the tree
// memory after reset: minimum 1, output 10..1, 80 cycles. Then random binary
// search trees with random counts are built in the testbench, loaded row by
// row through the loader port, and run. Expected results come from the
// testbench's own tree: the minimum and the sorted value list by scanning all
// values, and 3 + (L + 2) + 5n + 2(n + 1) cycles, where L counts the left
// edges from the root to the minimum.
module tb_hfsm_min_sort;
  import hfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, start, tree_we;
  addr_t      tree_addr;
  node_t      tree_row;
  addr_t      so_idx;

  logic       done_a, done_b;
  data_t      min_a, min_b;
  out_entry_t ent_a, ent_b;
  logic [5:0] cnt_a, cnt_b;

  int checks = 0, failures = 0;

  hfsm_min_sort dut_a (
    .clk, .rst, .start, .done(done_a), .result_min(min_a),
    .tree_we, .tree_addr, .tree_row, .so_idx, .so_entry(ent_a), .so_count(cnt_a)
  );
  hfsm_min_sort #(.LEFT_FIRST(1'b1)) dut_b (
    .clk, .rst, .start, .done(done_b), .result_min(min_b),
    .tree_we, .tree_addr, .tree_row, .so_idx, .so_entry(ent_b), .so_count(cnt_b)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_val [31], t_left [31], t_right [31], t_cnt [31];
  int t_n;

  function automatic void t_insert(int v, int c);
    int cur = 0;
    t_val[t_n] = v; t_left[t_n] = 31; t_right[t_n] = 31; t_cnt[t_n] = c;
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

  // Runs both instances and compares them with the tree t_* of t_n nodes.
  task automatic run_and_check();
    int cycles = 0, l = 0, cur = 0, mn = 99;
    int order [31];
    // Sorted list of node indices (ascending by value), by selection.
    for (int i = 0; i < t_n; i++) order[i] = i;
    for (int i = 0; i < t_n; i++)
      for (int j = i + 1; j < t_n; j++)
        if (t_val[order[j]] < t_val[order[i]]) begin
          int tmp = order[i]; order[i] = order[j]; order[j] = tmp;
        end
    for (int i = 0; i < t_n; i++) if (t_val[i] < mn) mn = t_val[i];
    while (t_left[cur] != 31) begin cur = t_left[cur]; l++; end

    check(done_a && done_b, "done before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!(done_a && done_b) && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    check(int'(min_a) == mn && int'(min_b) == mn,
          $sformatf("min %0d/%0d, expected %0d", min_a, min_b, mn));
    check(cycles == 3 + (l + 2) + 7 * t_n + 2,
          $sformatf("%0d cycles, expected %0d", cycles, 3 + (l + 2) + 7 * t_n + 2));
    check(int'(cnt_a) == t_n && int'(cnt_b) == t_n,
          $sformatf("output count %0d/%0d, expected %0d", cnt_a, cnt_b, t_n));
    for (int k = 0; k < t_n; k++) begin
      int ia, ib;
      so_idx = addr_t'(k);
      ia = order[t_n - 1 - k];    // default: largest first
      ib = order[k];              // LEFT_FIRST: smallest first
      #1;
      check(int'(ent_a.val) == t_val[ia] && int'(ent_a.cnt) == t_cnt[ia],
            $sformatf("entry %0d: %0d x%0d, expected %0d x%0d", k, ent_a.val, ent_a.cnt, t_val[ia], t_cnt[ia]));
      check(int'(ent_b.val) == t_val[ib] && int'(ent_b.cnt) == t_cnt[ib],
            $sformatf("LEFT_FIRST entry %0d: %0d x%0d, expected %0d x%0d", k, ent_b.val, ent_b.cnt, t_val[ib], t_cnt[ib]));
    end
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; tree_we = 1'b0; tree_addr = '0; tree_row = '0; so_idx = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // The example tree, as it sits in the tree memory after reset.
    t_n = 0;
    begin
      int ex [10];
      ex = '{5, 4, 9, 3, 6, 1, 2, 8, 7, 10};
      foreach (ex[i]) t_insert(ex[i], 1);
    end
    check(t_left[0] == 1 && t_right[0] == 2 && t_right[2] == 9, "testbench example tree shape");
    run_and_check();
    check(cycles_of_example() == 80, "example tree takes 80 cycles");
    run_and_check();

    for (int t = 0; t < 60; t++) begin
      bit used [31];
      int n, v;
      n = (t == 0) ? 31 : $urandom_range(1, 31);
      t_n = 0;
      foreach (used[i]) used[i] = 1'b0;
      while (t_n < n) begin
        if (t == 0) v = t_n;              // degenerate chain: deepest recursion
        else        v = $urandom_range(0, 30);
        if (!used[v]) begin used[v] = 1'b1; t_insert(v, $urandom_range(1, 15)); end
      end
      for (int i = 0; i < n; i++) begin
        tree_we = 1'b1; tree_addr = addr_t'(i);
        tree_row = '{val: data_t'(t_val[i]), left: addr_t'(t_left[i]), right: addr_t'(t_right[i]),
                     cnt: cnt_t'(t_cnt[i])};
        @(negedge clk);
      end
      tree_we = 1'b0;
      run_and_check();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle count of the example tree from its shape: n = 10, L = 3.
  function automatic int cycles_of_example();
    return 3 + (3 + 2) + 5 * 10 + 2 * 11;
  endfunction

endmodule
