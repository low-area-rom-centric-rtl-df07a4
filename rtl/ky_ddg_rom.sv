// ky_ddg_rom: ROM holding the indexed discrete distribution generating (DDG)
// tree of a Knuth-Yao sampler.
//
// Every node of the tree has an index. Leaves take the value they stand for
// (0..N-1), the root takes N, and the intermediate nodes take N+1, N+2, ...
// level by level from the top, and within a level from the rightmost node to
// the leftmost. The ROM address is {random bits, node index}; the word stored
// there is the index of the child reached with those bits. A leaf is its own
// child, so once a leaf is read every later read returns it again.
//
// With RAND_BITS = X > 1 the tree is compacted: only every X-th level is kept,
// and the X bits of a read walk X levels at once. A leaf met on a skipped
// level is returned directly. The first-used bit of the group is the MSB of
// `rbits`, so feeding the same bit stream MSB first gives the same sample as
// the one-bit tree.
//
// Nothing is stored by hand: the whole table is computed at elaboration from
// the probability matrix PROB (N rows of THETA bits, MSB = first tree level)
// by the constant function build_rom(). Within a level the leaves sit to the
// right of the intermediate nodes; the leaf at distance k from the right edge
// is the row holding the k-th one of that column, counted from the highest
// row down. Bit value 0 selects the right child, 1 the left child. Unused
// addresses hold 0.
//
// Timing: one synchronous read per clock, data valid the cycle after the
// address, like an FPGA block RAM in ROM mode. The output register has no
// reset, as in a block RAM.
module ky_ddg_rom #(
  parameter int unsigned N         = ky_pkg::FALCON_N,
  parameter int unsigned THETA     = ky_pkg::FALCON_THETA,
  parameter int unsigned RAND_BITS = 1,
  parameter int unsigned W         = ky_pkg::FALCON_W,
  parameter logic [THETA-1:0] PROB [N] = ky_pkg::FALCON_CHI
) (
  input  logic                 clk,
  input  logic [RAND_BITS-1:0] rbits,  // random bits, MSB used first
  input  logic [W-1:0]         index,  // index of the current node
  output logic [W-1:0]         data    // index of the child node
);

  localparam int unsigned DEPTH = 2 ** (W + RAND_BITS);

  typedef logic [W-1:0] rom_t [DEPTH];

  // Number of leaves (ones) in level l of the full tree, l = 1..THETA.
  function automatic int unsigned leaves_at(int unsigned l);
    int unsigned hw = 0;
    for (int unsigned r = 0; r < N; r++) hw += int'(PROB[r][THETA-l]);
    return hw;
  endfunction

  // Value of the leaf at distance k from the right edge of level l.
  function automatic int unsigned leaf_row(int unsigned l, int unsigned k);
    int unsigned seen = 0;
    int unsigned row  = 0;
    for (int r = int'(N) - 1; r >= 0; r--) begin
      if (PROB[r][THETA-l]) begin
        if (seen == k) row = unsigned'(r);
        seen++;
      end
    end
    return row;
  endfunction

  // Total number of indexed nodes: leaves, root and kept intermediate nodes.
  function automatic int unsigned count_nodes();
    int unsigned m     = 1;
    int unsigned total = N + 1;
    for (int unsigned l = 1; l <= THETA; l++) begin
      m = 2 * m - leaves_at(l);
      if (l % RAND_BITS == 0 && l < THETA) total += m;
    end
    return total;
  endfunction

  function automatic rom_t build_rom();
    rom_t        rom;
    int unsigned m    [THETA+1];  // intermediate nodes per level
    int unsigned h    [THETA+1];  // leaves per level
    int unsigned base [THETA+1];  // index of the rightmost intermediate node of a kept level
    int unsigned next_idx;
    int unsigned cur_l, cur_t, k, self_idx, child_idx;
    bit          hit;

    for (int unsigned a = 0; a < DEPTH; a++) rom[a] = '0;

    m[0] = 1;
    h[0] = 0;
    for (int unsigned l = 1; l <= THETA; l++) begin
      h[l] = leaves_at(l);
      m[l] = 2 * m[l-1] - h[l];
    end

    next_idx = N + 1;
    for (int unsigned l = 0; l <= THETA; l++) begin
      base[l] = 0;
      if (l > 0 && l % RAND_BITS == 0 && l < THETA) begin
        base[l]   = next_idx;
        next_idx += m[l];
      end
    end

    // Leaves are their own children for every bit pattern.
    for (int unsigned v = 0; v < N; v++)
      for (int unsigned b = 0; b < 2 ** RAND_BITS; b++)
        rom[b * (2 ** W) + v] = W'(v);

    // Root and kept intermediate nodes.
    for (int unsigned l = 0; l < THETA; l += RAND_BITS) begin
      for (int unsigned t = 0; t < m[l]; t++) begin
        self_idx = (l == 0) ? N : base[l] + t;
        for (int unsigned b = 0; b < 2 ** RAND_BITS; b++) begin
          cur_l     = l;
          cur_t     = t;
          hit       = 1'b0;
          child_idx = 0;
          for (int unsigned i = 0; i < RAND_BITS; i++) begin
            if (!hit) begin
              k     = 2 * cur_t + ((b >> (RAND_BITS - 1 - i)) & 1);
              cur_l = cur_l + 1;
              if (k < h[cur_l]) begin
                hit       = 1'b1;
                child_idx = leaf_row(cur_l, k);
              end else begin
                cur_t = k - h[cur_l];
              end
            end
          end
          if (!hit) child_idx = base[cur_l] + cur_t;
          rom[b * (2 ** W) + self_idx] = W'(child_idx);
        end
      end
    end
    return rom;
  endfunction

  localparam int unsigned NODES = count_nodes();
  localparam rom_t        ROM   = build_rom();

  // Elaboration-time checks of the configuration.
  if (THETA % RAND_BITS != 0) begin : gen_bad_rand_bits
    $error("ky_ddg_rom: RAND_BITS=%0d does not divide THETA=%0d", RAND_BITS, THETA);
  end
  if (NODES > 2 ** W) begin : gen_bad_width
    $error("ky_ddg_rom: %0d tree nodes do not fit in W=%0d index bits", NODES, W);
  end

  always_ff @(posedge clk) data <= ROM[{rbits, index}];

endmodule
