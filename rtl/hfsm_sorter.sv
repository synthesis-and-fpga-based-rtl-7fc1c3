// hfsm_sorter: sorts a stream of 5-bit unsigned integers with a recursive
// hierarchical FSM, keeping the received data permanently sorted.
//
// Every item that arrives is inserted into a binary search tree held in a
// tree memory; a value seen before only increments its node's count. After
// every insertion that added a node the whole tree is traversed in order and
// written to the output stack, so between items the output stack always holds
// the sorted set of all values received so far, each with its count.
//
// Control: an hfsm_stack runs three modules - z0 (top, hgs_z0_sort), z4
// (recursive insertion, hgs_z4_insert) and z3 (recursive traversal,
// hgs_z3_sort). The module stack and the state stack share one pointer; a
// recursive call pushes a new level for the same module. Execution unit: the
// node address register reg, the local stack that saves reg across recursive
// calls and returns node addresses to the caller, the write pointer RAM_w of
// the last allocated row, the output stack, and the flag added.
//
// Interface:
//   in_valid/in_item/in_ready  item stream; an item is consumed in the cycle
//                              in_valid and in_ready are both high. in_valid
//                              must stay high until then. 31 is consumed and
//                              dropped (it is the no-sub-tree code).
//   clear                      withdraws all data: empties the tree and the
//                              output stack and restarts z0.
//   idle                       z0 waits for an item; the output stack holds the
//                              sorted sequence.
//   so_idx/so_entry/so_count   output stack read port and fill level; entry
//                              so_count-1 is the smallest value (LEFT_FIRST=0).
// Timing: one HFSM state per cycle. An item that lands at depth d costs
// 1 + (4d + 3) + 1 cycles, plus 5n + 2(n+1) cycles for sorting a tree of n
// nodes when a node was added.
// Sizes: DEPTH = 33 levels lets z0 call a recursion 32 deep, which a 31-node
// degenerate tree plus its empty sub-tree needs; the local stack depth follows.
// Both depths are this design's choice.
module hfsm_sorter
  import hfsm_pkg::*;
#(
  parameter int unsigned DEPTH      = 33,
  parameter int unsigned LS_DEPTH   = 36,
  parameter bit          LEFT_FIRST = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       in_valid,
  input  data_t      in_item,
  output logic       in_ready,
  output logic       idle,
  input  addr_t      so_idx,
  output out_entry_t so_entry,
  output logic [5:0] so_count
);

  localparam int unsigned SP_W  = $clog2(DEPTH);
  localparam int unsigned LSP_W = $clog2(LS_DEPTH + 1);

  // HFSM core
  mod_t            cur_mod;
  state_t          cur_state;
  logic [SP_W-1:0] sp;
  logic            ends, overflow;
  hfsm_ctl_t       ctl;
  uop_t            uop;

  hfsm_stack #(.DEPTH(DEPTH), .RUN_AFTER_RESET(1'b1)) u_stack (
    .clk, .rst, .start(clear), .start_mod(Z0),
    .op(ctl.op), .ns(ctl.ns), .callee(ctl.callee),
    .cur_mod, .cur_state, .sp, .ends, .overflow
  );

  // Execution unit registers
  addr_t rg;        // reg: node address register
  addr_t ram_w;     // RAM_w: last allocated row, NIL when the tree is empty
  logic  added;     // the current z4 run allocated a node

  // Rows 0..30 hold nodes and values 0..30 can be stored, so a new value always
  // finds a free row: no "tree full" case exists.
  addr_t root, new_addr;
  assign root     = (ram_w == NIL) ? NIL : addr_t'(0);
  assign new_addr = ram_w + 1'b1;

  // Tree memory
  addr_t      rd_addr [2];
  node_t      rd_row  [2];
  node_t      node;
  logic       t_we;
  addr_t      t_waddr;
  node_mask_t t_mask;
  node_t      t_wrow;

  assign rd_addr[0] = rg;
  assign rd_addr[1] = NIL;
  assign node       = rd_row[0];

  tree_ram #(.ROWS(32), .INIT_FIG1(1'b0)) u_tree (
    .clk, .rst, .clear,
    .rd_addr, .rd_row,
    .we(t_we), .wr_addr(t_waddr), .wr_mask(t_mask), .wr_row(t_wrow)
  );

  // Local stack
  ls_op_t           ls_op;
  addr_t            ls_din, ls_top, ls_above;
  logic [LSP_W-1:0] ls_sp;
  logic             ls_overflow;

  local_stack #(.DEPTH(LS_DEPTH)) u_ls (
    .clk, .rst(rst || clear), .op(ls_op), .din(ls_din),
    .top(ls_top), .above(ls_above), .sp(ls_sp), .overflow(ls_overflow)
  );

  // Output stack
  out_entry_t so_din;
  assign so_din = '{cnt: node.cnt, val: {3'b000, node.val}};

  output_stack #(.DEPTH(32)) u_out (
    .clk, .rst, .clear(clear || uop.out_clear), .push(uop.out_push), .din(so_din),
    .rd_idx(so_idx), .rd_entry(so_entry), .count(so_count)
  );

  // Modules (HGSs)
  hfsm_ctl_t ctl0, ctl3, ctl4;
  uop_t      uop0, uop3, uop4;

  hgs_z0_sort u_z0 (
    .state(cur_state), .in_valid, .item_is_nil(in_item == NIL), .added,
    .ctl(ctl0), .uop(uop0)
  );
  hgs_z3_sort #(.LEFT_FIRST(LEFT_FIRST)) u_z3 (
    .state(cur_state), .reg_is_nil(rg == NIL), .ctl(ctl3), .uop(uop3)
  );
  hgs_z4_insert u_z4 (
    .state(cur_state), .reg_is_nil(rg == NIL),
    .item_eq(in_item == node.val), .item_gt(in_item > node.val),
    .ctl(ctl4), .uop(uop4)
  );

  // First switch level: select the active module.
  always_comb begin
    ctl = CTL_HOLD;
    uop = UOP_NONE;
    if (!ends && !clear) begin
      unique case (cur_mod)
        Z0:      begin ctl = ctl0; uop = uop0; end
        Z3:      begin ctl = ctl3; uop = uop3; end
        Z4:      begin ctl = ctl4; uop = uop4; end
        default: ctl.op = STK_RET;
      endcase
    end
  end

  // Micro-operations on the tree memory and the local stack
  always_comb begin
    t_we    = 1'b0;
    t_waddr = rg;
    t_mask  = '0;
    t_wrow  = node;
    if (uop.alloc) begin
      t_we    = 1'b1;
      t_waddr = new_addr;
      t_mask  = '1;
      t_wrow  = '{val: in_item, left: NIL, right: NIL, cnt: cnt_t'(1)};
    end else if (uop.link_left) begin
      t_we        = 1'b1;
      t_mask.left = 1'b1;
      t_wrow.left = ls_above;
    end else if (uop.link_right) begin
      t_we         = 1'b1;
      t_mask.right = 1'b1;
      t_wrow.right = ls_above;
    end else if (uop.cnt_inc) begin
      t_we       = 1'b1;
      t_mask.cnt = 1'b1;
      t_wrow.cnt = (node.cnt == '1) ? node.cnt : node.cnt + 1'b1;
    end

    ls_op  = uop.ls_op;
    ls_din = (uop.ls_src == LSD_NEW) ? new_addr : rg;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      rg    <= NIL;
      ram_w <= NIL;
      added <= 1'b0;
    end else begin
      unique case (uop.reg_src)
        REG_LEFT:  rg <= node.left;
        REG_RIGHT: rg <= node.right;
        REG_ROOT:  rg <= root;
        REG_POP:   if (ls_sp != '0) rg <= ls_top;
        default:   ;
      endcase
      if (cur_mod == Z0 && ctl.op == STK_CALL && ctl.callee == Z4) added <= 1'b0;
      if (uop.alloc) begin
        ram_w <= new_addr;
        added <= 1'b1;
      end
    end
  end

  assign in_ready = uop.in_take;
  assign idle     = !clear && cur_mod == Z0 && cur_state == '0;

  // Stream rule: an offered item stays offered until it is taken.
  a_in_hold: assert property (@(posedge clk) disable iff (rst || clear)
                              in_valid && !in_ready |=> in_valid);
  // The recursion never runs out of stack.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !overflow && !ls_overflow);

endmodule
