// output_stack: collects the sorted sequence produced by the tree traversal.
//
// push appends din at output_sp and advances output_sp; clear sets output_sp to
// 0 (clear wins over push). Entries hold the value widened to 8 bits with three
// leading zeros, as in the source design, plus the node's occurrence count (this
// design's addition). Any entry can be read combinationally through rd_idx, so
// a display or a host can scan the result; count tells how many are valid.
// A push at a full stack is ignored. Reset is synchronous.
module output_stack
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned IDX_W = $clog2(DEPTH),
  localparam int unsigned CNT_W_ = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              push,
  input  out_entry_t        din,
  input  logic [IDX_W-1:0]  rd_idx,
  output out_entry_t        rd_entry,
  output logic [CNT_W_-1:0] count
);

  out_entry_t mem [DEPTH];

  assign rd_entry = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (push && 32'(count) < DEPTH) begin
      mem[count[IDX_W-1:0]] <= din;
      count                 <= count + 1'b1;
    end
  end

endmodule
