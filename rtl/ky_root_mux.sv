// ky_root_mux: index multiplexer in front of the DDG-tree ROM.
//
// For the first read of a sampling it forwards the fixed ROOT_INDEX so that
// the walk starts from the root of the tree; for every later read it forwards
// the ROM's previous output, the index of the node reached so far. Purely
// combinational. ROOT_INDEX defaults to 19, the number of leaves of the FALCON
// tree, as the root is indexed right after the leaves.
module ky_root_mux #(
  parameter int unsigned W          = ky_pkg::FALCON_W,
  parameter logic [W-1:0] ROOT_INDEX = W'(ky_pkg::FALCON_N)
) (
  input  logic         load_root,  // 1: start from the root
  input  logic [W-1:0] rom_data,   // index read from the ROM in the previous cycle
  output logic [W-1:0] index       // index presented to the ROM
);

  always_comb index = load_root ? ROOT_INDEX : rom_data;

endmodule
