// local_stack: the stack of node addresses used by the recursive tree modules.
//
// Before a recursive call the caller saves its node (LS_PUSH: write at sp, then
// sp++). A callee that finishes leaves its result, a node address, in the slot
// at sp (LS_PUT) and then returns with LS_POP (sp-- when sp > 0), restoring the
// caller's node from `top`. Back in the caller, the callee's result sits one
// slot above the pointer and is read through `above`. The two read taps are
// therefore local_stack[sp-1] (top) and local_stack[sp+1] (above), the access
// pattern of the source design's tree modules.
//
// Reads are combinational, writes and pointer moves happen on the clock edge,
// reset is synchronous. A push at a full stack is refused and sets the sticky
// overflow flag (this design's choice; the depth is not given by the source).
module local_stack
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH = 36,
  localparam int unsigned SP_W = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst,
  input  ls_op_t          op,
  input  addr_t           din,
  output addr_t           top,
  output addr_t           above,
  output logic [SP_W-1:0] sp,
  output logic            overflow
);

  addr_t mem [DEPTH];

  // Taps outside the array read as NIL.
  always_comb begin
    top   = (sp != '0)                 ? mem[sp - 1'b1] : NIL;
    above = (32'(sp) + 1 < DEPTH)      ? mem[sp + 1'b1] : NIL;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sp       <= '0;
      overflow <= 1'b0;
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= NIL;
    end else begin
      unique case (op)
        LS_NONE: ;
        LS_PUSH: begin
          if (32'(sp) < DEPTH - 1) begin
            mem[sp] <= din;
            sp      <= sp + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end
        LS_PUT: if (32'(sp) < DEPTH) mem[sp] <= din;
        LS_POP: if (sp != '0) sp <= sp - 1'b1;
      endcase
    end
  end

endmodule
