// ky_sampler_tb: end-to-end test of the sampler in its default configuration
// (FALCON distribution, one random bit per cycle, 72 cycles per sample).
//
// Every cycle gets a fresh random bit. A cycle-level model tracks when a
// start is accepted, records the 72 bits the sampler consumes, and predicts
// the cycle of the ready pulse and the sample from a matrix-based
// Knuth-Yao reference. It checks that:
//   - ready comes exactly 72 cycles after an accepted start, for one cycle,
//   - sample equals the reference in that cycle and the idle code (31)
//     in every other one,
//   - back-to-back sampling (start in the ready cycle), starts ignored while
//     sampling, idle gaps, a reset in the middle of a sampling, the deepest
//     path (value 18, 72 bits), leaves reached early (dummy reads) and every
//     value 0..18 all occur (rare values through forced paths to their
//     shallowest leaf),
//   - the frequencies of 0 and 1 match the distribution (P = 0.3594 and
//     0.3091) within five standard deviations.
module ky_sampler_tb;

  localparam int unsigned NSAMPLES = 3000;
  localparam logic [4:0]  IDLE     = 5'd31;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, start, random_bit, ready;
  logic [4:0] sample;

  ky_sampler dut (.clk, .rst, .start, .random_bit, .ready, .sample);

  int checks = 0, failures = 0;
  int n_b2b = 0, n_ignored = 0, n_gap = 0, n_reset_mid = 0, n_deep = 0, n_early = 0;
  int hist [20];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NSAMPLES * 80 + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          busy, exp_ready, forced;
    int unsigned cnt, exp_sample, depth, start_cyc, done, c;
    logic [71:0] bits, deep;
    int unsigned fdepth;
    real         f0, f1, sd0, sd1;

    foreach (hist[i]) hist[i] = 0;
    busy = 0; exp_ready = 0; forced = 0; cnt = 0; exp_sample = 0; start_cyc = 0;
    done = 0; c = 0;
    rst = 1; start = 0; random_bit = 0;
    repeat (2) @(negedge clk);
    rst = 0;

    while (done < NSAMPLES) begin
      // outputs of this cycle
      check(ready == exp_ready, $sformatf("cycle %0d: ready %0b expected %0b", c, ready, exp_ready));
      if (ready && exp_ready) begin
        check(c - start_cyc == 72, $sformatf("latency %0d, expected 72", c - start_cyc));
        check(sample == 5'(exp_sample), $sformatf("sample %0d expected %0d", sample, exp_sample));
        hist[sample]++;
        done++;
      end else begin
        check(sample == IDLE, $sformatf("cycle %0d: sample %0d while not ready", c, sample));
      end

      // reset in the middle of a sampling, once
      if (done == 100 && busy && cnt == 30 && n_reset_mid == 0) begin
        rst = 1;
        start = 0;
        @(negedge clk);
        rst = 0;
        busy = 0; exp_ready = 0; n_reset_mid++;
        c++;
        continue;
      end

      // inputs of this cycle
      if (!busy) begin
        start = (done % 7 == 3) ? ($urandom_range(0, 2) == 0) : 1'b1;
        if (!start) n_gap++;
      end else begin
        start = ($urandom_range(0, 9) == 0);
        if (start) n_ignored++;
      end
      if (!busy && start) begin
        busy = 1;
        cnt = 0;
        start_cyc = c;
        forced = (done % 100 == 50);
        if (forced) deep = ky_ref_pkg::path_to_leaf((done / 100) % 19, 72'({$urandom, $urandom, $urandom}), fdepth);
        if (exp_ready) n_b2b++;
      end
      random_bit = 1'($urandom);
      if (busy) begin
        if (forced) random_bit = deep[71-cnt];
        bits[71-cnt] = random_bit;
        cnt++;
      end
      exp_ready = 0;
      if (busy && cnt == 72) begin
        busy = 0;
        exp_ready = 1;
        exp_sample = ky_ref_pkg::falcon_sample(bits, depth);
        if (depth == 72) n_deep++;
        if (depth < 72) n_early++;
      end
      @(negedge clk);
      c++;
    end

    f0  = real'(hist[0]) / NSAMPLES;
    f1  = real'(hist[1]) / NSAMPLES;
    sd0 = $sqrt(0.3594 * (1.0 - 0.3594) / NSAMPLES);
    sd1 = $sqrt(0.3091 * (1.0 - 0.3091) / NSAMPLES);
    check(f0 > 0.3594 - 5 * sd0 && f0 < 0.3594 + 5 * sd0, $sformatf("frequency of 0 is %f", f0));
    check(f1 > 0.3091 - 5 * sd1 && f1 < 0.3091 + 5 * sd1, $sformatf("frequency of 1 is %f", f1));
    for (int v = 0; v <= 18; v++) check(hist[v] > 0, $sformatf("value %0d never sampled", v));
    check(n_b2b > 0, "no back-to-back sampling");
    check(n_ignored > 0, "no start ignored while sampling");
    check(n_gap > 0, "no idle gap");
    check(n_reset_mid > 0, "no reset in the middle of a sampling");
    check(n_deep > 0, "no 72-bit path");
    check(n_early > 0, "no leaf reached before the last read");
    $display("samples=%0d back_to_back=%0d ignored_starts=%0d idle_gaps=%0d resets=%0d deep=%0d early=%0d",
             done, n_b2b, n_ignored, n_gap, n_reset_mid, n_deep, n_early);
    for (int v = 0; v < 19; v++) if (hist[v] > 0) $display("value %2d: %0d", v, hist[v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
