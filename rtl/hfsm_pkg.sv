// hfsm_pkg: types and constants shared by the hierarchical FSM (HFSM) designs.
//
// An HFSM runs a set of modules (hierarchical graph-schemes, HGSs) z0, z1, ...
// Each module is a small FSM; one module can invoke another like a subroutine.
// Every module is written here as a combinational "HGS" block. It reads its own
// state and some logic conditions. It returns a control word for the module and
// state stacks (hfsm_ctl_t) and a set of micro-operations for the datapath
// (uop_t). The data words follow the tree memory of the design: 5-bit values and
// 5-bit node pointers, where the code 31 means "no sub-tree".
//
// The data sizes come from the source design. The encodings of modules, states,
// stack operations and micro-operations are this design's own.
package hfsm_pkg;

  // Tree data: 5-bit unsigned values 0..30; 31 marks an absent sub-tree.
  localparam int unsigned DATA_W = 5;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned CNT_W  = 4;        // occurrence counter per node
  localparam int unsigned OUT_W  = 8;        // output stack word: 3'b000 @ value
  localparam logic [ADDR_W-1:0] NIL = '1;    // 31

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  // One tree node: stored value, left/right sub-tree pointers, repeat count.
  typedef struct packed {
    data_t val;
    addr_t left;
    addr_t right;
    cnt_t  cnt;
  } node_t;

  // Field enables of a tree write.
  typedef struct packed {
    logic val;
    logic left;
    logic right;
    logic cnt;
  } node_mask_t;

  // Module codes. z0 is always the top module of a project.
  localparam int unsigned MOD_W = 3;
  typedef enum logic [MOD_W-1:0] {
    Z0 = 3'd0,
    Z1 = 3'd1,
    Z2 = 3'd2,
    Z3 = 3'd3,
    Z4 = 3'd4
  } mod_t;

  // State codes a0..a7 inside one module.
  localparam int unsigned ST_W = 3;
  typedef logic [ST_W-1:0] state_t;

  // Stack operation requested by the active module in the current cycle.
  //   STK_HOLD : stay in the current state
  //   STK_NEXT : next_state(ns)
  //   STK_CALL : next_state(ns) and new_module(callee)
  //   STK_RET  : end_module()
  typedef enum logic [1:0] {
    STK_HOLD = 2'd0,
    STK_NEXT = 2'd1,
    STK_CALL = 2'd2,
    STK_RET  = 2'd3
  } stk_op_t;

  typedef struct packed {
    stk_op_t op;
    state_t  ns;
    mod_t    callee;
  } hfsm_ctl_t;

  // Source of the node address register reg.
  typedef enum logic [2:0] {
    REG_HOLD  = 3'd0,
    REG_LEFT  = 3'd1,   // reg = RAM[reg].left
    REG_RIGHT = 3'd2,   // reg = RAM[reg].right
    REG_ROOT  = 3'd3,   // reg = root of the tree (0, or NIL when empty)
    REG_POP   = 3'd4    // reg = local_stack[local_sp-1] (restore the caller's node)
  } reg_src_t;

  // Local stack operations.
  typedef enum logic [1:0] {
    LS_NONE = 2'd0,
    LS_PUSH = 2'd1,     // local_stack[sp] = din; sp++
    LS_PUT  = 2'd2,     // local_stack[sp] = din
    LS_POP  = 2'd3      // if (sp > 0) sp--
  } ls_op_t;

  // What is written by LS_PUSH / LS_PUT.
  typedef enum logic {
    LSD_REG = 1'b0,     // the current node address
    LSD_NEW = 1'b1      // the address of the node being allocated
  } ls_src_t;

  // Micro-operations. Each HGS drives only the fields it uses; the rest stay 0.
  typedef struct packed {
    reg_src_t reg_src;
    ls_op_t   ls_op;
    ls_src_t  ls_src;
    logic     res_min;     // result[0] = RAM[reg].val  (y2 of z1)
    logic     res_max;     // result[1] = RAM[reg].val  (y2 of z2)
    logic     alloc;       // new node {item, NIL, NIL, 1} at RAM_w+1
    logic     link_left;   // RAM[reg].left  = local_stack[sp+1]
    logic     link_right;  // RAM[reg].right = local_stack[sp+1]
    logic     cnt_inc;     // RAM[reg].cnt++
    logic     out_clear;   // output_sp = 0
    logic     out_push;    // output_stack[output_sp++] = RAM[reg]
    logic     in_take;     // consume the incoming item
    logic     fork_b;      // start module fork_mod on the parallel branch stack
    mod_t     fork_mod;
  } uop_t;

  localparam uop_t UOP_NONE = '0;
  localparam hfsm_ctl_t CTL_HOLD = '{op: STK_HOLD, ns: '0, callee: Z0};

  // Output stack entry: occurrence count and 000@value.
  typedef struct packed {
    cnt_t             cnt;
    logic [OUT_W-1:0] val;
  } out_entry_t;

endpackage
