// ky_fsm_tb: self-checking test of the sampler control FSM.
//
// Two instances run side by side from the same start/reset stimulus: the
// FALCON one (STEPS = 72) and a short one (STEPS = 3). A cycle-level model
// in the testbench predicts load_root (start seen while idle) and ready
// (exactly STEPS cycles after an accepted start, for one cycle). Random
// starts exercise back-to-back sampling (start in the ready cycle), starts
// ignored while reading, idle gaps and a reset in the middle of a sampling.
module ky_fsm_tb;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, start;
  logic lr_a, rdy_a, lr_b, rdy_b;

  ky_fsm                u_a (.clk, .rst, .start, .load_root(lr_a), .ready(rdy_a));
  ky_fsm #(.STEPS(3))   u_b (.clk, .rst, .start, .load_root(lr_b), .ready(rdy_b));

  int checks = 0, failures = 0;
  int back_to_back = 0, ignored_starts = 0, resets_mid = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model of one FSM.
  class fsm_model;
    int unsigned steps;
    bit busy;
    int unsigned cnt;
    bit ready_next;
    function new(int unsigned s); steps = s; endfunction
    function void do_reset(); busy = 0; cnt = 0; ready_next = 0; endfunction
    // Outputs of the current cycle for a given start.
    function bit load_root(bit st); return !busy && st; endfunction
    // Clock edge.
    function void clock(bit st);
      ready_next = 0;
      if (!busy) begin
        if (st) begin busy = 1; cnt = 1; end
      end else if (cnt == steps - 1) begin
        busy = 0; cnt = 0; ready_next = 1;
      end else cnt++;
    endfunction
  endclass

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fsm_model ma, mb;
    bit ra, rb;
    int unsigned start_cyc, lat;
    ma = new(72);
    mb = new(3);
    ra = 0; rb = 0; start_cyc = 0;
    rst = 1; start = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    ma.do_reset(); mb.do_reset();
    for (int unsigned c = 0; c < 20000; c++) begin
      // outputs of this cycle
      check(rdy_a == ra, $sformatf("cycle %0d: ready(72) %0b expected %0b", c, rdy_a, ra));
      check(rdy_b == rb, $sformatf("cycle %0d: ready(3) %0b expected %0b", c, rdy_b, rb));
      if (rdy_a) begin
        lat = c - start_cyc;
        check(lat == 72, $sformatf("latency %0d, expected 72", lat));
      end
      // inputs of this cycle
      start = ($urandom_range(0, 3) != 0);
      if (c == 5000) begin
        // reset in the middle of a sampling
        rst = 1;
        if (ma.busy) resets_mid++;
        @(negedge clk);
        rst = 0;
        ma.do_reset(); mb.do_reset();
        ra = 0; rb = 0;
        continue;
      end
      #1;
      check(lr_a == ma.load_root(start), $sformatf("cycle %0d: load_root(72) wrong", c));
      check(lr_b == mb.load_root(start), $sformatf("cycle %0d: load_root(3) wrong", c));
      if (ma.load_root(start)) begin
        start_cyc = c;
        if (ra) back_to_back++;
      end
      if (start && ma.busy) ignored_starts++;
      ma.clock(start); mb.clock(start);
      ra = ma.ready_next; rb = mb.ready_next;
      @(negedge clk);
    end
    check(back_to_back > 0, "no back-to-back sampling seen");
    check(ignored_starts > 0, "no start ignored while reading");
    check(resets_mid > 0, "no reset in the middle of a sampling");
    $display("back_to_back=%0d ignored_starts=%0d resets_mid=%0d", back_to_back, ignored_starts, resets_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
