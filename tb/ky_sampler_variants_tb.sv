// ky_sampler_variants_tb: the sampler with 1, 2, 3 and 4 random bits per
// cycle on the FALCON distribution, and on the 4-value example distribution
// (theta = 6).
//
// The four FALCON samplers get the same 72-bit random string per sample, cut
// into groups of 1, 2, 3 or 4 bits, the first-used bit being the MSB of each
// group. All must return the matrix-based reference sample, with ready
// exactly 72, 36, 24 and 18 cycles after start, and back-to-back samples at
// that period. Compacting the tree must not change any sample. The example
// sampler is run on all 64 six-bit strings, including 110010, which must
// give 2 after 6 cycles.
module ky_sampler_variants_tb;

  localparam int unsigned NSAMPLES = 400;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, start;
  logic [3:0] rb1;
  logic [1:0] rb2;
  logic [2:0] rb3;
  logic [3:0] rb4;
  logic [3:0] ready;
  logic [4:0] s [4];

  ky_sampler                            u_x1 (.clk, .rst, .start, .random_bit(rb1[0]), .ready(ready[0]), .sample(s[0]));
  ky_sampler #(.RAND_BITS(2), .W(8))    u_x2 (.clk, .rst, .start, .random_bit(rb2),    .ready(ready[1]), .sample(s[1]));
  ky_sampler #(.RAND_BITS(3), .W(8))    u_x3 (.clk, .rst, .start, .random_bit(rb3),    .ready(ready[2]), .sample(s[2]));
  ky_sampler #(.RAND_BITS(4), .W(8))    u_x4 (.clk, .rst, .start, .random_bit(rb4),    .ready(ready[3]), .sample(s[3]));

  // Example distribution: 4 values, theta = 6, W = 4, 3-bit sample, idle 7.
  logic       e_start, e_rb, e_ready;
  logic [2:0] e_sample;
  ky_sampler #(.N(4), .THETA(6), .RAND_BITS(1), .W(4), .L(3),
               .PROB(ky_ref_pkg::EX_PROB), .IDLE_CODE(3'd7))
    u_ex (.clk, .rst, .start(e_start), .random_bit(e_rb), .ready(e_ready), .sample(e_sample));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NSAMPLES * 80 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [71:0] bits [4];     // string being consumed by each sampler
    int unsigned exp [4];
    int unsigned cyc [4];      // cycle within the current sampling
    int unsigned nsamp [4];
    int unsigned depth;
    int unsigned x, period;
    logic [5:0] eb;

    rst = 1; start = 0; rb1 = '0; rb2 = '0; rb3 = '0; rb4 = '0;
    e_start = 0; e_rb = 0;
    repeat (2) @(negedge clk);
    rst = 0;

    // ---- FALCON, 1..4 bits per cycle, each sampler restarted in its ready cycle
    for (int i = 0; i < 4; i++) begin
      bits[i] = 72'({$urandom, $urandom, $urandom});
      exp[i]  = ky_ref_pkg::falcon_sample(bits[i], depth);
      cyc[i]  = 0;
      nsamp[i] = 0;
    end
    start = 1;  // all four sample continuously
    while (nsamp[3] < NSAMPLES) begin
      for (int i = 0; i < 4; i++) begin
        x = i + 1;
        period = 72 / x;
        // outputs of this cycle
        if (cyc[i] == period) begin
          check(ready[i], $sformatf("X=%0d: no ready after %0d cycles", x, period));
          check(s[i] == 5'(exp[i]), $sformatf("X=%0d: sample %0d expected %0d", x, s[i], exp[i]));
          nsamp[i]++;
          bits[i] = 72'({$urandom, $urandom, $urandom});
          exp[i]  = ky_ref_pkg::falcon_sample(bits[i], depth);
          cyc[i]  = 0;
        end else begin
          check(!ready[i], $sformatf("X=%0d: ready at cycle %0d", x, cyc[i]));
          check(s[i] == 5'd31, $sformatf("X=%0d: sample %0d while not ready", x, s[i]));
        end
      end
      // random bits of this cycle
      rb1 = 4'(bits[0][71 - cyc[0]]);
      rb2 = bits[1][71 - 2 * cyc[1] -: 2];
      rb3 = bits[2][71 - 3 * cyc[2] -: 3];
      rb4 = bits[3][71 - 4 * cyc[3] -: 4];
      for (int i = 0; i < 4; i++) cyc[i]++;
      @(negedge clk);
    end
    // same elapsed time: samples in the ratio 1:2:3:4
    for (int i = 0; i < 4; i++)
      check(nsamp[i] == NSAMPLES * (i + 1) / 4, $sformatf("X=%0d: %0d samples", i + 1, nsamp[i]));
    $display("samples X=1:%0d X=2:%0d X=3:%0d X=4:%0d", nsamp[0], nsamp[1], nsamp[2], nsamp[3]);
    start = 0;

    // ---- example distribution, all 64 strings, published sequence first
    for (int n = -1; n < 64; n++) begin
      eb = (n < 0) ? 6'b110010 : 6'(n);
      // wait until idle: one spare cycle
      @(negedge clk);
      e_start = 1;
      for (int c = 0; c < 6; c++) begin
        e_rb = eb[5 - c];
        @(negedge clk);
        e_start = 0;
        if (c < 5) check(!e_ready, "example: early ready");
      end
      check(e_ready, $sformatf("example %06b: no ready after 6 cycles", eb));
      check(e_sample == 3'(ky_ref_pkg::example_sample(eb)),
            $sformatf("example %06b: sample %0d expected %0d", eb, e_sample, ky_ref_pkg::example_sample(eb)));
      if (n < 0) check(e_sample == 3'd2, "example 110010 must give 2");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
