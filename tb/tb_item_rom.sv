// tb_item_rom: self-checking testbench of the ROM item source.
//
// Reads the ROM through its stream with a randomly stalling consumer and
// checks the items in order against the list written here, that valid drops
// after the last item, that an item is held while ready is low, and that
// restart rewinds to the first item.
module tb_item_rom;
  import hfsm_pkg::*;

  logic  clk = 1'b0;
  logic  rst, restart, valid, ready;
  data_t item;

  int checks = 0, failures = 0;

  item_rom dut (.*);

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

  localparam int EXP [12] = '{5, 4, 9, 3, 6, 1, 2, 8, 7, 10, 4, 9};

  task automatic read_all();
    int k = 0, guard = 0;
    while (k < 12 && guard < 200) begin
      ready = $urandom_range(0, 1);
      #1;
      check(valid && int'(item) == EXP[k], $sformatf("item %0d = %0d, expected %0d", k, item, EXP[k]));
      @(negedge clk);
      if (ready) k++;
      guard++;
    end
    ready = 1'b1;
    #1;
    check(!valid, "valid after the last item");
    @(negedge clk);
    check(!valid, "still empty");
  endtask

  initial begin
    rst = 1'b1; restart = 1'b0; ready = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    read_all();
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
