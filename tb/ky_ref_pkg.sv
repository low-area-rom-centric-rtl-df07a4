// ky_ref_pkg: reference models for the Knuth-Yao sampler testbenches.
//
// The references work directly on the probability matrix, column by column,
// with the distance method: d is the distance of the visited node from the
// right edge of its level; a random bit b moves to d' = 2d + b (0 = right
// child, 1 = left child), then the ones of the column are subtracted from the
// highest row down and the row whose one makes d negative is the sample.
// They share no code with the ROM builder of the design.
package ky_ref_pkg;

  localparam int unsigned THETA = 72;
  localparam int unsigned N     = 19;

  // Sample for a 72-bit random string, bits[71] used first. Also returns the
  // tree depth (number of bits) at which the leaf was reached.
  function automatic int unsigned falcon_sample(input logic [THETA-1:0] bits,
                                                output int unsigned depth);
    longint d = 0;
    for (int col = 0; col < THETA; col++) begin
      d = 2 * d + longint'(bits[THETA-1-col]);
      for (int row = N - 1; row >= 0; row--) begin
        d -= longint'(ky_pkg::FALCON_CHI[row][THETA-1-col]);
        if (d == -1) begin
          depth = col + 1;
          return unsigned'(row);
        end
      end
    end
    depth = THETA + 1;
    return N;  // never reached: the probabilities sum to 2^72
  endfunction

  // Random string that reaches the shallowest leaf of value v; the bits after
  // that leaf are taken from fill. The leaf of v on level l sits at distance
  // k = (ones of column l-1 in rows above v) from the right edge. Walking up,
  // the node at distance k on level l has parent distance k/2 among the
  // intermediate nodes of level l-1, that is k/2 + (ones of column l-2) among
  // all its nodes, and the bit used is k mod 2.
  function automatic logic [THETA-1:0] path_to_leaf(input int unsigned v,
                                                    input logic [THETA-1:0] fill,
                                                    output int unsigned depth);
    logic [THETA-1:0] bits;
    longint k = 0;
    int lvl = 0;
    bits = fill;
    for (int l = 1; l <= THETA && lvl == 0; l++)
      if (ky_pkg::FALCON_CHI[v][THETA-l]) lvl = l;
    for (int row = int'(v) + 1; row < N; row++)
      k += longint'(ky_pkg::FALCON_CHI[row][THETA-lvl]);
    for (int l = lvl; l >= 1; l--) begin
      bits[THETA-l] = k[0];
      k = k / 2;
      if (l > 1)
        for (int row = 0; row < N; row++)
          k += longint'(ky_pkg::FALCON_CHI[row][THETA-(l-1)]);
    end
    depth = unsigned'(lvl);
    return bits;
  endfunction

  // Random string that reaches the leaf of value 18, whose only one is in
  // the last column, so the whole 72-bit path is fixed.
  function automatic logic [THETA-1:0] path_to_last_leaf();
    int unsigned depth;
    return path_to_leaf(N - 1, '0, depth);
  endfunction

  // Sample of the 4-value, 6-bit example distribution.
  localparam logic [5:0] EX_PROB [4] = '{6'b011110, 6'b010011, 6'b001110, 6'b000001};

  function automatic int unsigned example_sample(input logic [5:0] bits);
    int d = 0;
    for (int col = 0; col < 6; col++) begin
      d = 2 * d + int'(bits[5-col]);
      for (int row = 3; row >= 0; row--) begin
        d -= int'(EX_PROB[row][5-col]);
        if (d == -1) return unsigned'(row);
      end
    end
    return 4;
  endfunction

endpackage
