// tb_hfsm_top: end-to-end testbench of the HFSM demonstrators, with every
// parameter at its default.
//
//  1. Sequential, parallel and parallel-stack min/max on the example tree held
//     after reset: minimum 1, maximum 10, in 12, 5 and 8 cycles; the
//     minimum-then-sort HFSM: minimum 1, output stack 10..1, 80 cycles.
//  2. Sorter fed from the internal ROM until it runs dry: the output stack must
//     hold 10 down to 1 with counts 2 for the repeated 4 and 9.
//  3. clear, then the sorter fed from the external stream with random items
//     (repeats and the code 31 included), checked against a reference set.
//  4. Random trees written through the loader port, then the min/max designs
//     run and checked against the minimum and maximum of the loaded values,
//     and the minimum-then-sort HFSM against the loaded values in order.
// Each mechanism is counted (hierarchical calls, recursive calls, the parallel
// join waiting on the slower FSM, forks onto the second stack and z0 waiting
// there for the branch, z0 calling the sorting module z3 in place of z2, node
// allocation, repeat counting, dropped 31
// codes, clear, both item sources, tree loading); one that never happened is a
// failure.
module tb_hfsm_top;
  import hfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       mm_start, mm_done, pm_start, pm_done, qm_start, qm_done;
  data_t      mm_min, mm_max, pm_min, pm_max, qm_min, qm_max;
  logic       ms_start, ms_done;
  data_t      ms_min;
  out_entry_t ms_so_entry;
  logic [5:0] ms_so_count;
  logic       tree_we;
  addr_t      tree_addr;
  node_t      tree_row;
  logic       src_sel, ext_valid, ext_ready, clear, sort_idle, rom_empty;
  data_t      ext_item;
  addr_t      so_idx;
  out_entry_t so_entry;
  logic [5:0] so_count;

  int checks = 0, failures = 0;

  hfsm_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Mechanism counters, sampled at every clock edge.
  int n_hcall = 0, n_rcall = 0, n_join_wait = 0, n_alloc = 0, n_repeat = 0;
  int n_drop = 0, n_clear = 0, n_rom = 0, n_ext = 0, n_load = 0, n_max_depth = 0;
  int n_fork = 0, n_qjoin_wait = 0, n_reuse = 0;

  always @(posedge clk) if (!rst) begin
    if (dut.u_minmax.cur_mod == Z0 && dut.u_minmax.ctl.op == STK_CALL) n_hcall++;
    if (dut.u_sorter.cur_mod != Z0 && dut.u_sorter.ctl.op == STK_CALL) n_rcall++;
    if (dut.u_parallel.run1 != dut.u_parallel.run2) n_join_wait++;
    if (dut.u_qstack.uop[0].fork_b) n_fork++;
    if (dut.u_qstack.cur_mod[0] == Z0 && dut.u_qstack.cur_state[0] == 3'd1 &&
        !dut.u_qstack.ends[0] && !dut.u_qstack.ends[1]) n_qjoin_wait++;
    if (dut.u_min_sort.cur_mod == Z0 && dut.u_min_sort.ctl.op == STK_CALL &&
        dut.u_min_sort.ctl.callee == Z3) n_reuse++;
    if (dut.u_sorter.uop.alloc)   n_alloc++;
    if (dut.u_sorter.uop.cnt_inc) n_repeat++;
    if (dut.u_sorter.in_ready && dut.u_sorter.in_item == NIL) n_drop++;
    if (clear) n_clear++;
    if (!src_sel && ext_ready == 1'b0 && dut.rom_ready) n_rom++;
    if (ext_ready) n_ext++;
    if (tree_we) n_load++;
    if (int'(dut.u_sorter.sp) > n_max_depth) n_max_depth = int'(dut.u_sorter.sp);
  end

  // which: 0 sequential, 1 parallel FSMs, 2 parallel stacks
  task automatic run_mm(int which, int e_min, int e_max, int e_cycles);
    int cycles = 0;
    data_t rmin, rmax;
    logic  d;
    mm_start = (which == 0); pm_start = (which == 1); qm_start = (which == 2);
    @(negedge clk);
    pm_start = 1'b0; mm_start = 1'b0; qm_start = 1'b0;
    do begin
      d = (which == 0) ? mm_done : (which == 1) ? pm_done : qm_done;
      if (!d) begin
        @(negedge clk);
        cycles++;
      end
    end while (!d && cycles < 500);
    rmin = (which == 0) ? mm_min : (which == 1) ? pm_min : qm_min;
    rmax = (which == 0) ? mm_max : (which == 1) ? pm_max : qm_max;
    check(rmin == data_t'(e_min) && rmax == data_t'(e_max),
          $sformatf("design %0d min/max %0d/%0d, expected %0d/%0d", which, rmin, rmax, e_min, e_max));
    if (e_cycles > 0) check(cycles == e_cycles, $sformatf("%0d cycles, expected %0d", cycles, e_cycles));
  endtask

  // Minimum then sort: e_vals holds the tree's values (distinct, count 1);
  // the output stack must hold them largest first.
  task automatic run_ms(int e_min, int e_vals [$], int e_cycles);
    int cycles = 0;
    e_vals.rsort();
    ms_start = 1'b1;
    @(negedge clk);
    ms_start = 1'b0;
    while (!ms_done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    check(int'(ms_min) == e_min, $sformatf("min-sort minimum %0d, expected %0d", ms_min, e_min));
    check(int'(ms_so_count) == e_vals.size(),
          $sformatf("min-sort output count %0d, expected %0d", ms_so_count, e_vals.size()));
    if (e_cycles > 0) check(cycles == e_cycles, $sformatf("min-sort %0d cycles, expected %0d", cycles, e_cycles));
    foreach (e_vals[k]) begin
      so_idx = addr_t'(k);
      #1;
      check(int'(ms_so_entry.val) == e_vals[k] && ms_so_entry.cnt == 4'd1,
            $sformatf("min-sort entry %0d: %0d x%0d, expected %0d x1", k, ms_so_entry.val, ms_so_entry.cnt, e_vals[k]));
    end
    so_idx = '0;
    @(negedge clk);
  endtask

  // Reference of the sorter: count per value, and the snapshot of the output
  // stack after the last sort.
  int ref_cnt [31];
  int exp_v [$], exp_c [$];

  function automatic void ref_clear();
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    exp_v.delete(); exp_c.delete();
  endfunction

  function automatic void ref_add(int v);
    bit is_new;
    if (v == 31) return;
    is_new = (ref_cnt[v] == 0);
    if (ref_cnt[v] < 15) ref_cnt[v]++;
    if (is_new) begin
      exp_v.delete(); exp_c.delete();
      for (int k = 30; k >= 0; k--) if (ref_cnt[k] > 0) begin exp_v.push_back(k); exp_c.push_back(ref_cnt[k]); end
    end
  endfunction

  task automatic wait_idle();
    int guard = 0;
    @(negedge clk);
    while (!sort_idle && guard < 5000) begin @(negedge clk); guard++; end
  endtask

  task automatic check_sorted(string tag);
    check(int'(so_count) == exp_v.size(), $sformatf("%s: %0d entries, expected %0d", tag, so_count, exp_v.size()));
    for (int i = 0; i < exp_v.size(); i++) begin
      so_idx = addr_t'(i);
      #1;
      check(int'(so_entry.val) == exp_v[i] && int'(so_entry.cnt) == exp_c[i],
            $sformatf("%s: entry %0d = %0d/%0d, expected %0d/%0d", tag, i, so_entry.val, so_entry.cnt, exp_v[i], exp_c[i]));
    end
    @(negedge clk);
  endtask

  task automatic send_ext(int v);
    bit took;
    int guard = 0;
    ext_valid = 1'b1;
    ext_item  = data_t'(v);
    do begin
      #1 took = ext_ready;
      @(negedge clk);
      guard++;
    end while (!took && guard < 5000);
    ext_valid = 1'b0;
    ref_add(v);
    wait_idle();
  endtask

  initial begin
    int v, n, mn, mx;
    bit used [31];
    rst = 1'b1; mm_start = 1'b0; pm_start = 1'b0; qm_start = 1'b0; ms_start = 1'b0; tree_we = 1'b0; tree_addr = '0; tree_row = '0;
    src_sel = 1'b1; ext_valid = 1'b0; ext_item = '0; clear = 1'b0; so_idx = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    // 1. Min/max on the example tree.
    run_mm(0, 1, 10, 12);
    run_mm(1, 1, 10, 5);
    run_mm(2, 1, 10, 8);
    run_ms(1, '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10}, 80);

    // 2. Sorter fed by the ROM.
    src_sel = 1'b0;
    begin
      int guard;
      guard = 0;
      while (!(rom_empty && sort_idle) && guard < 20000) begin @(negedge clk); guard++; end
    end
    src_sel = 1'b1;
    // The ROM holds 5 4 9 3 6 1 2 8 7 10 4 9: the last sort ran after 10
    // arrived, so the output stack shows 10..1 once each; the repeats of 4 and 9
    // came after it and show up at the next sort.
    ref_clear();
    for (int k = 10; k >= 1; k--) begin exp_v.push_back(k); exp_c.push_back(1); end
    check_sorted("rom");
    // The next new value re-sorts and reveals the counts of 4 and 9.
    for (int k = 1; k <= 10; k++) ref_cnt[k] = (k == 4 || k == 9) ? 2 : 1;
    send_ext(12);
    check_sorted("rom + 12");

    // 3. clear, then the external stream.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    ref_clear();
    @(negedge clk);
    check(so_count == 0 && !rom_empty, "clear empties the sorter and rewinds the ROM");
    for (int k = 0; k < 120; k++) begin
      v = $urandom_range(0, 31);
      send_ext(v);
      if (k % 10 == 9) check_sorted("stream");
    end
    check_sorted("stream end");

    // 4. Random trees through the loader.
    for (int t = 0; t < 20; t++) begin
      int vals [31], lft [31], rgt [31], cur;
      foreach (used[i]) used[i] = 1'b0;
      n = $urandom_range(1, 31); mn = 99; mx = -1;
      for (int i = 0; i < n; i++) begin
        do v = $urandom_range(0, 30); while (used[v]);
        used[v] = 1'b1; vals[i] = v; lft[i] = 31; rgt[i] = 31;
        if (v < mn) mn = v;
        if (v > mx) mx = v;
        cur = 0;
        if (i > 0)
          forever begin
            if (v < vals[cur]) begin if (lft[cur] == 31) begin lft[cur] = i; break; end cur = lft[cur]; end
            else begin if (rgt[cur] == 31) begin rgt[cur] = i; break; end cur = rgt[cur]; end
          end
      end
      for (int i = 0; i < n; i++) begin
        tree_we = 1'b1; tree_addr = addr_t'(i);
        tree_row = '{val: data_t'(vals[i]), left: addr_t'(lft[i]), right: addr_t'(rgt[i]), cnt: 4'd1};
        @(negedge clk);
      end
      tree_we = 1'b0;
      run_mm(0, mn, mx, 0);
      run_mm(1, mn, mx, 0);
      run_mm(2, mn, mx, 0);
      begin
        int q [$];
        q = {};
        for (int i = 0; i < n; i++) q.push_back(vals[i]);
        run_ms(mn, q, 0);
      end
    end

    $display("mechanisms: hierarchical calls %0d, recursive calls %0d (deepest level %0d), join waits %0d,",
             n_hcall, n_rcall, n_max_depth, n_join_wait);
    $display("  nodes allocated %0d, repeats counted %0d, 31 dropped %0d, clears %0d, ROM items %0d,",
             n_alloc, n_repeat, n_drop, n_clear, n_rom);
    $display("  stream items %0d, tree rows loaded %0d, forks %0d, parallel-stack join waits %0d,",
             n_ext, n_load, n_fork, n_qjoin_wait);
    $display("  z3 called in place of z2 %0d", n_reuse);
    check(n_hcall > 0, "hierarchical call happened");
    check(n_rcall > 0 && n_max_depth > 2, "recursive call happened");
    check(n_join_wait > 0, "parallel join waited");
    check(n_alloc > 0, "node allocated");
    check(n_repeat > 0, "repeat counted");
    check(n_drop > 0, "31 dropped");
    check(n_clear > 0, "clear happened");
    check(n_rom > 0, "ROM source used");
    check(n_ext > 0, "external source used");
    check(n_load > 0, "tree loaded");
    check(n_fork > 0, "fork onto the second stack");
    check(n_qjoin_wait > 0, "z0 waited for the branch stack");
    check(n_reuse > 0, "z3 called in place of z2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
