// ky_sampler: constant-time Knuth-Yao discrete half-Gaussian sampler built
// around a ROM that holds the precomputed DDG tree.
//
// The tree of the FALCON base distribution chi (values 0..18, sigma0 = 1.8205,
// probabilities on 72 bits) is indexed and stored so that each ROM read moves
// one step, or RAND_BITS steps, down the tree: address = {random bits, index
// of the current node}, data = index of the child. The walk starts at the
// root, selected by ky_root_mux for the first read; afterwards the ROM output
// is fed straight back as the next index. Leaves point to themselves, so the
// walk is simply continued with dummy reads until THETA / RAND_BITS reads have
// been made, which makes the sampling time independent of the value drawn.
// The leaf index equals the sampled value, and ky_output_mux drives it on
// sample in the ready cycle, IDLE_CODE otherwise.
//
// Interface: start requests a sample (taken when idle); random_bit must carry
// fresh uniform bits in every cycle of a sampling, from the start cycle on,
// the MSB being used first; ready pulses for one cycle with the sample.
// Timing: ready comes THETA / RAND_BITS cycles after start (72 for the default
// FALCON configuration, 36, 24 and 18 with 2, 3 and 4 bits per cycle), and a
// new start may be given in the ready cycle.
//
// Defaults are the FALCON configuration with one random bit per cycle
// (W = 9, L = 5, THETA = 72). For RAND_BITS = 2, 3 or 4 set W = 8. The
// random number generator is outside this module. Reset style and IDLE_CODE
// are this design's choices.
module ky_sampler #(
  parameter int unsigned N         = ky_pkg::FALCON_N,
  parameter int unsigned THETA     = ky_pkg::FALCON_THETA,
  parameter int unsigned RAND_BITS = 1,
  parameter int unsigned W         = ky_pkg::FALCON_W,
  parameter int unsigned L         = ky_pkg::FALCON_L,
  parameter logic [THETA-1:0] PROB [N] = ky_pkg::FALCON_CHI,
  parameter logic [L-1:0] IDLE_CODE = '1
) (
  input  logic                 clk,
  input  logic                 rst,         // synchronous, active high
  input  logic                 start,       // request a sample
  input  logic [RAND_BITS-1:0] random_bit,  // uniform random bits for this cycle's read
  output logic                 ready,       // one-cycle pulse: sample valid
  output logic [L-1:0]         sample       // sampled value, IDLE_CODE when not ready
);

  localparam int unsigned STEPS = THETA / RAND_BITS;

  logic         load_root;
  logic [W-1:0] index;
  logic [W-1:0] rom_data;

  ky_fsm #(.STEPS(STEPS)) u_fsm (
    .clk,
    .rst,
    .start,
    .load_root,
    .ready
  );

  ky_root_mux #(.W(W), .ROOT_INDEX(W'(N))) u_root_mux (
    .load_root,
    .rom_data,
    .index
  );

  ky_ddg_rom #(
    .N(N), .THETA(THETA), .RAND_BITS(RAND_BITS), .W(W), .PROB(PROB)
  ) u_rom (
    .clk,
    .rbits (random_bit),
    .index,
    .data  (rom_data)
  );

  ky_output_mux #(.W(W), .L(L), .IDLE_CODE(IDLE_CODE)) u_out_mux (
    .ready,
    .rom_data,
    .sample
  );

endmodule
