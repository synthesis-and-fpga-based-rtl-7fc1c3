// hfsm_stack: the core of a hierarchical FSM - a module stack and a state stack
// that share one stack pointer.
//
// The entry at the pointer names the active module (cur_mod) and its state
// (cur_state); both are read combinationally, so the active module's logic sees
// them in the same cycle. Each cycle the active module asks for one operation:
//   STK_HOLD  nothing changes
//   STK_NEXT  state entry := ns
//   STK_CALL  state entry := ns (the state to resume in after the return), then
//             the pointer moves up and the new level holds {callee, state a0}
//   STK_RET   the pointer moves down, resuming the caller; at level 0 the top
//             module has finished and ends is set
// A call made when the stack is full is ignored, as in the source design; the
// sticky overflow flag is this design's addition. While ends is set the stack
// ignores all operations. start restarts module start_mod in state a0; so does reset when
// RUN_AFTER_RESET = 1, while with RUN_AFTER_RESET = 0 reset leaves the HFSM
// finished (ends = 1) until the first start.
// All updates happen on the rising clock edge; reset is synchronous.
module hfsm_stack
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH   = 33,
  parameter bit          RUN_AFTER_RESET = 1'b1,
  localparam int unsigned SP_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  mod_t            start_mod,
  input  stk_op_t         op,
  input  state_t          ns,
  input  mod_t            callee,
  output mod_t            cur_mod,
  output state_t          cur_state,
  output logic [SP_W-1:0] sp,
  output logic            ends,
  output logic            overflow
);

  mod_t   m_stack   [DEPTH];
  state_t fsm_stack [DEPTH];

  assign cur_mod   = m_stack[sp];
  assign cur_state = fsm_stack[sp];

  localparam logic [SP_W-1:0] SP_MAX = SP_W'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (rst || start) begin
      sp           <= '0;
      m_stack[0]   <= start_mod;
      fsm_stack[0] <= '0;
      ends         <= rst ? !RUN_AFTER_RESET : 1'b0;
      if (rst) overflow <= 1'b0;
    end else if (!ends) begin
      unique case (op)
        STK_HOLD: ;
        STK_NEXT: fsm_stack[sp] <= ns;
        STK_CALL: begin
          fsm_stack[sp] <= ns;
          if (sp != SP_MAX) begin
            sp                <= sp + 1'b1;
            m_stack[sp + 1'b1]   <= callee;
            fsm_stack[sp + 1'b1] <= '0;
          end else begin
            overflow <= 1'b1;
          end
        end
        STK_RET: begin
          if (sp == '0) ends <= 1'b1;
          else          sp   <= sp - 1'b1;
        end
      endcase
    end
  end

  // The pointer never leaves the stack.
  a_sp_range: assert property (@(posedge clk) disable iff (rst) sp <= SP_MAX);

endmodule
