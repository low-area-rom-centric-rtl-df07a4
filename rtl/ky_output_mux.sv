// ky_output_mux: output multiplexer of the sampler.
//
// While ready is high the ROM output holds the index of the leaf reached,
// which is the sampled value itself, so its low L bits are driven on sample.
// In every other cycle sample shows IDLE_CODE. IDLE_CODE defaults to 31
// (all ones on 5 bits), a value no FALCON sample (0..18) can take; that value
// is this design's choice. Purely combinational.
module ky_output_mux #(
  parameter int unsigned W         = ky_pkg::FALCON_W,
  parameter int unsigned L         = ky_pkg::FALCON_L,
  parameter logic [L-1:0] IDLE_CODE = '1
) (
  input  logic         ready,     // sample valid this cycle
  input  logic [W-1:0] rom_data,  // current ROM output (leaf index when ready)
  output logic [L-1:0] sample
);

  always_comb sample = ready ? rom_data[L-1:0] : IDLE_CODE;

endmodule
