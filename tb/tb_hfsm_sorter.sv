// tb_hfsm_sorter: self-checking testbench of the recursive HFSM sorter.
//
// A behavioural binary search tree in the testbench mirrors every item sent:
// it knows whether the item adds a node, how deep the item lands, how many
// nodes exist and how often each value arrived. After every item the testbench
// checks the output stack against that model (fill level, values from largest
// at index 0 to smallest at the top, counts) and checks the cycle count:
// 4d + 5 cycles up to the handshake for an item landing at depth d, plus
// 7n + 2 cycles of sorting when a node was added to a tree of now n nodes.
// Sequences: random items with repeats and the code 31, an ascending run of
// all 31 values (the deepest recursion), a clear while a sort is running.
module tb_hfsm_sorter;
  import hfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, clear, in_valid, in_ready, idle;
  data_t      in_item;
  addr_t      so_idx;
  out_entry_t so_entry;
  logic [5:0] so_count;

  int checks = 0, failures = 0;

  hfsm_sorter dut (
    .clk, .rst, .clear, .in_valid, .in_item, .in_ready, .idle,
    .so_idx, .so_entry, .so_count
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference tree
  int m_val [31], m_left [31], m_right [31], m_cnt [31];
  int m_n;
  int vals [$];   // expected output stack values
  int cnts [$];   // and counts

  function automatic void m_clear();
    m_n = 0;
    vals.delete();
    cnts.delete();
  endfunction

  // Inserts v; returns the depth reached, sets added.
  function automatic int m_insert(int v, output bit added);
    int cur = 0, d = 0;
    added = 1'b0;
    if (m_n == 0) begin
      m_val[0] = v; m_left[0] = -1; m_right[0] = -1; m_cnt[0] = 1; m_n = 1;
      added = 1'b1;
      return 0;
    end
    forever begin
      if (v == m_val[cur]) begin
        if (m_cnt[cur] < 15) m_cnt[cur]++;
        return d;
      end
      d++;
      if (v < m_val[cur]) begin
        if (m_left[cur] < 0) begin
          m_left[cur] = m_n; break;
        end
        cur = m_left[cur];
      end else begin
        if (m_right[cur] < 0) begin
          m_right[cur] = m_n; break;
        end
        cur = m_right[cur];
      end
    end
    m_val[m_n] = v; m_left[m_n] = -1; m_right[m_n] = -1; m_cnt[m_n] = 1; m_n++;
    added = 1'b1;
    return d;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Expected output stack: the model's values in descending order with their
  // counts, as of the last sort (a repeated value does not trigger a sort).

  function automatic void snapshot();
    vals.delete();
    cnts.delete();
    for (int v = 30; v >= 0; v--)
      for (int i = 0; i < m_n; i++)
        if (m_val[i] == v) begin vals.push_back(v); cnts.push_back(m_cnt[i]); end
  endfunction

  // Compares the output stack with the snapshot; ends at a negative edge.
  task automatic check_output();
    check(int'(so_count) == vals.size(), $sformatf("so_count %0d, expected %0d", so_count, vals.size()));
    for (int i = 0; i < vals.size(); i++) begin
      so_idx = addr_t'(i);
      #1;
      check(int'(so_entry.val) == vals[i] && int'(so_entry.cnt) == cnts[i],
            $sformatf("entry %0d = %0d/%0d, expected %0d/%0d", i, so_entry.val, so_entry.cnt,
                      vals[i], cnts[i]));
    end
    @(negedge clk);
  endtask

  // Sends one item and checks timing and result. Called at a negative edge.
  task automatic send(int v);
    int  cycles = 0, d, exp;
    bit  took, added;
    check(idle == 1'b1, "idle before an item");
    in_valid = 1'b1;
    in_item  = data_t'(v);
    do begin
      #1 took = in_ready;
      @(negedge clk);
      cycles++;
    end while (!took && cycles < 1000);
    in_valid = 1'b0;
    if (v == 31) begin
      check(cycles == 1, $sformatf("item 31 dropped in %0d cycles", cycles));
      return;
    end
    d   = m_insert(v, added);
    exp = 4 * d + 5;
    check(cycles == exp, $sformatf("item %0d: handshake after %0d cycles, expected %0d", v, cycles, exp));
    cycles = 0;
    while (!idle && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    exp = added ? 7 * m_n + 2 : 0;
    if (added) snapshot();
    check(cycles == exp, $sformatf("item %0d: sort took %0d cycles, expected %0d", v, cycles, exp));
    check_output();
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; in_valid = 1'b0; in_item = '0; so_idx = '0;
    m_clear();
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(so_count == 0, "empty after reset");

    // The example tree's values, then repeats.
    send(5); send(4); send(9); send(3); send(6); send(1); send(2); send(8); send(7);
    send(10); send(4); send(9); send(5); send(1); send(31);

    // Random items, several rounds separated by clear.
    for (int round = 0; round < 4; round++) begin
      clear = 1'b1; @(negedge clk); clear = 1'b0; m_clear();
      @(negedge clk);
      check(so_count == 0, "empty after clear");
      for (int k = 0; k < 40; k++) send(int'($urandom_range(0, 31)));
    end

    // Ascending run: a degenerate tree 31 nodes deep.
    clear = 1'b1; @(negedge clk); clear = 1'b0; m_clear();
    @(negedge clk);
    for (int v = 0; v <= 30; v++) send(v);
    send(30); send(0);

    // Clear in the middle of a sort, then carry on.
    in_valid = 1'b1; in_item = 5'd12;
    repeat (20) @(negedge clk);
    in_valid = 1'b0;
    clear = 1'b1; @(negedge clk); clear = 1'b0; m_clear();
    @(negedge clk);
    check(idle && so_count == 0, "clear aborts a running sort");
    send(7); send(3); send(11);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
