// item_rom: the internal data source of the ROM-fed sorter.
//
// A read-only table of N_ITEMS 5-bit integers, presented one at a time on a
// valid/ready stream: item = ROM[ROM_address], valid while ROM_address <
// N_ITEMS, and ROM_address advances in every cycle where valid and ready are both
// high. restart sets ROM_address back to 0. The source design only says the
// ROM holds arbitrary data; the contents below are this design's choice. Their
// first ten items build a tree of the same shape as the ten-node example tree,
// and the last two repeat values already present.
module item_rom
  import hfsm_pkg::*;
#(
  parameter int unsigned N_ITEMS = 12,
  localparam int unsigned A_W    = $clog2(N_ITEMS + 1)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  restart,
  output logic  valid,
  output data_t item,
  input  logic  ready
);

  localparam data_t CONTENTS [12] = '{5'd5, 5'd4, 5'd9, 5'd3, 5'd6, 5'd1,
                                      5'd2, 5'd8, 5'd7, 5'd10, 5'd4, 5'd9};

  logic [A_W-1:0] rom_address;

  // Beyond the listed contents the table repeats them.
  function automatic data_t rom_word(logic [A_W-1:0] a);
    return CONTENTS[32'(a) % 12];
  endfunction

  assign valid = 32'(rom_address) < N_ITEMS;
  assign item  = rom_word(rom_address);

  always_ff @(posedge clk) begin
    if (rst || restart)      rom_address <= '0;
    else if (valid && ready) rom_address <= rom_address + 1'b1;
  end

endmodule
