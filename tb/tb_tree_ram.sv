// tb_tree_ram: self-checking testbench of the tree memory.
//
// Two instances: one resetting to the example tree, one to an empty tree. The
// reset images are checked against a table written here, then random writes
// with random field masks are compared on both read ports against a model
// array, and clear is checked to restore the reset image.
module tb_tree_ram;
  import hfsm_pkg::*;

  logic       clk = 1'b0;
  logic       rst, clear, we;
  addr_t      rd_addr [2];
  node_t      rd_fig [2], rd_emp [2];
  addr_t      wr_addr;
  node_mask_t wr_mask;
  node_t      wr_row;

  int checks = 0, failures = 0;

  tree_ram #(.INIT_FIG1(1'b1)) dut_fig (.clk, .rst, .clear, .rd_addr, .rd_row(rd_fig),
                                         .we, .wr_addr, .wr_mask, .wr_row);
  tree_ram #(.INIT_FIG1(1'b0)) dut_emp (.clk, .rst, .clear, .rd_addr, .rd_row(rd_emp),
                                         .we(1'b0), .wr_addr, .wr_mask, .wr_row);

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

  // The example tree: value, left, right of rows 0..9.
  localparam int FIG [10][3] = '{'{5, 1, 2}, '{4, 3, 31}, '{9, 4, 9}, '{3, 5, 31}, '{6, 31, 8},
                                 '{1, 31, 6}, '{2, 31, 31}, '{7, 31, 31}, '{8, 7, 31}, '{10, 31, 31}};
  node_t model [32];

  function automatic void load_fig();
    for (int i = 0; i < 32; i++)
      model[i] = (i < 10) ? node_t'{data_t'(FIG[i][0]), addr_t'(FIG[i][1]), addr_t'(FIG[i][2]), 4'd1}
                          : node_t'{5'd0, NIL, NIL, 4'd0};
  endfunction

  task automatic scan();
    for (int i = 0; i < 32; i++) begin
      rd_addr[0] = addr_t'(i); rd_addr[1] = addr_t'(31 - i);
      #1;
      check(rd_fig[0] == model[i] && rd_fig[1] == model[31 - i], $sformatf("row %0d", i));
      check(rd_emp[0] == node_t'{5'd0, NIL, NIL, 4'd0}, $sformatf("empty row %0d", i));
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; we = 1'b0; wr_addr = '0; wr_mask = '0; wr_row = '0;
    rd_addr[0] = '0; rd_addr[1] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    load_fig();
    scan();
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0;
      wr_addr = addr_t'($urandom_range(0, 31));
      wr_mask = node_mask_t'($urandom_range(0, 15));
      wr_row  = node_t'($urandom);
      rd_addr[0] = addr_t'($urandom_range(0, 31));
      rd_addr[1] = wr_addr;
      @(posedge clk);
      if (we) begin
        if (wr_mask.val)   model[wr_addr].val   = wr_row.val;
        if (wr_mask.left)  model[wr_addr].left  = wr_row.left;
        if (wr_mask.right) model[wr_addr].right = wr_row.right;
        if (wr_mask.cnt)   model[wr_addr].cnt   = wr_row.cnt;
      end
      #1;
      check(rd_fig[0] == model[rd_addr[0]] && rd_fig[1] == model[rd_addr[1]],
            $sformatf("after write to row %0d", wr_addr));
    end
    @(negedge clk);
    we = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    load_fig();
    scan();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
