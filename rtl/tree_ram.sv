// tree_ram: memory holding a binary search tree of 5-bit unsigned integers.
//
// Row i is one node: its value, a pointer to its left sub-tree (smaller
// values), a pointer to its right sub-tree (larger values) and a count of how
// often the value arrived. The pointer code 31 (NIL) means "no sub-tree", so
// rows 0..30 can hold nodes and values 0..30 can be stored. The row size and
// the NIL code follow the source design; the count field and its 4-bit width
// are this design's choice.
//
// Two asynchronous read ports let a state test a node and act on it in the same
// cycle, and let two FSMs walk the tree at once. One synchronous write port
// writes any subset of the four fields of a row (wr_mask). Reset and clear load
// the reset image: with INIT_FIG1 = 1 the ten-node example tree
//   row: 0  1  2  3  4  5  6  7  8  9
//   val: 5  4  9  3  6  1  2  7  8  10
// (left/right pointers in fig1_row below), otherwise every row is empty
// {0, NIL, NIL, 0}. A write in the same cycle as clear is dropped.
module tree_ram
  import hfsm_pkg::*;
#(
  parameter int unsigned ROWS      = 32,
  parameter bit          INIT_FIG1 = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  addr_t      rd_addr [2],
  output node_t      rd_row  [2],
  input  logic       we,
  input  addr_t      wr_addr,
  input  node_mask_t wr_mask,
  input  node_t      wr_row
);

  node_t mem [ROWS];

  // Reset image of one row.
  function automatic node_t init_row(int unsigned i);
    node_t n;
    n = '{val: '0, left: NIL, right: NIL, cnt: '0};
    if (INIT_FIG1) begin
      unique case (i)
        0: n = '{val: 5'd5,  left: 5'd1, right: 5'd2, cnt: 4'd1};
        1: n = '{val: 5'd4,  left: 5'd3, right: NIL,  cnt: 4'd1};
        2: n = '{val: 5'd9,  left: 5'd4, right: 5'd9, cnt: 4'd1};
        3: n = '{val: 5'd3,  left: 5'd5, right: NIL,  cnt: 4'd1};
        4: n = '{val: 5'd6,  left: NIL,  right: 5'd8, cnt: 4'd1};
        5: n = '{val: 5'd1,  left: NIL,  right: 5'd6, cnt: 4'd1};
        6: n = '{val: 5'd2,  left: NIL,  right: NIL,  cnt: 4'd1};
        7: n = '{val: 5'd7,  left: NIL,  right: NIL,  cnt: 4'd1};
        8: n = '{val: 5'd8,  left: 5'd7, right: NIL,  cnt: 4'd1};
        9: n = '{val: 5'd10, left: NIL,  right: NIL,  cnt: 4'd1};
        default: ;
      endcase
    end
    return n;
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++) rd_row[p] = mem[rd_addr[p]];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int unsigned i = 0; i < ROWS; i++) mem[i] <= init_row(i);
    end else if (we) begin
      if (wr_mask.val)   mem[wr_addr].val   <= wr_row.val;
      if (wr_mask.left)  mem[wr_addr].left  <= wr_row.left;
      if (wr_mask.right) mem[wr_addr].right <= wr_row.right;
      if (wr_mask.cnt)   mem[wr_addr].cnt   <= wr_row.cnt;
    end
  end

endmodule
