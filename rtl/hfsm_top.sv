// hfsm_top: the hierarchical-FSM demonstrators side by side.
//
//  - Sequential min/max (hfsm_minmax): one HFSM whose top module z0 calls z1
//    (minimum) and then z2 (maximum) on a binary search tree.
//  - Parallel min/max (minmax_parallel): the same two modules as autonomous
//    FSMs started together and joined when both have finished.
//  - Parallel-stack min/max (hfsm_qstack_minmax): one HFSM with two module/
//    state stacks; z0 invokes {z1, z2} in one node and waits for both.
//  - Minimum then sort (hfsm_min_sort): the sequential HFSM with z2 replaced
//    by the recursive sorting module z3, writing the tree sorted to its own
//    output stack.
//  - Sorter (hfsm_sorter): a recursive HFSM that inserts every incoming item
//    into a tree and re-sorts it into the output stack. Its items come either
//    from the internal ROM (item_rom, src_sel = 0) or from an external stream
//    (src_sel = 1), such as a pointing device whose "add" button supplies a
//    coordinate; clear, the "withdraw all data" button, empties the sorter and
//    rewinds the ROM.
// The four tree-walking designs each hold their own tree memory, reset to the
// ten-node example tree; one loader port (tree_we/tree_addr/tree_row) writes
// the same row into all of them. so_idx addresses both output stacks. All
// ports are synchronous to clk; rst is a synchronous active-high reset.
// src_sel should change only while sort_idle is high.
module hfsm_top
  import hfsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // sequential min/max
  input  logic       mm_start,
  output logic       mm_done,
  output data_t      mm_min,
  output data_t      mm_max,
  // parallel min/max
  input  logic       pm_start,
  output logic       pm_done,
  output data_t      pm_min,
  output data_t      pm_max,
  // parallel-stack min/max
  input  logic       qm_start,
  output logic       qm_done,
  output data_t      qm_min,
  output data_t      qm_max,
  // minimum then sort
  input  logic       ms_start,
  output logic       ms_done,
  output data_t      ms_min,
  output out_entry_t ms_so_entry,
  output logic [5:0] ms_so_count,
  // tree loader for the four tree-walking designs
  input  logic       tree_we,
  input  addr_t      tree_addr,
  input  node_t      tree_row,
  // sorter
  input  logic       src_sel,
  input  logic       ext_valid,
  input  data_t      ext_item,
  output logic       ext_ready,
  input  logic       clear,
  output logic       sort_idle,
  output logic       rom_empty,
  input  addr_t      so_idx,
  output out_entry_t so_entry,
  output logic [5:0] so_count
);

  hfsm_minmax u_minmax (
    .clk, .rst, .start(mm_start), .done(mm_done),
    .result_min(mm_min), .result_max(mm_max),
    .tree_we, .tree_addr, .tree_row
  );

  minmax_parallel u_parallel (
    .clk, .rst, .start(pm_start), .done(pm_done),
    .result_min(pm_min), .result_max(pm_max),
    .tree_we, .tree_addr, .tree_row
  );

  hfsm_qstack_minmax u_qstack (
    .clk, .rst, .start(qm_start), .done(qm_done),
    .result_min(qm_min), .result_max(qm_max),
    .tree_we, .tree_addr, .tree_row
  );

  hfsm_min_sort u_min_sort (
    .clk, .rst, .start(ms_start), .done(ms_done), .result_min(ms_min),
    .tree_we, .tree_addr, .tree_row,
    .so_idx, .so_entry(ms_so_entry), .so_count(ms_so_count)
  );

  // Item source selection
  logic  rom_valid, rom_ready, s_valid, s_ready;
  data_t rom_item, s_item;

  item_rom u_rom (
    .clk, .rst, .restart(clear),
    .valid(rom_valid), .item(rom_item), .ready(rom_ready)
  );

  assign s_valid   = src_sel ? ext_valid : rom_valid;
  assign s_item    = src_sel ? ext_item  : rom_item;
  assign rom_ready = !src_sel && s_ready;
  assign ext_ready = src_sel && s_ready;
  assign rom_empty = !rom_valid;

  hfsm_sorter u_sorter (
    .clk, .rst, .clear,
    .in_valid(s_valid), .in_item(s_item), .in_ready(s_ready),
    .idle(sort_idle), .so_idx, .so_entry, .so_count
  );

endmodule
