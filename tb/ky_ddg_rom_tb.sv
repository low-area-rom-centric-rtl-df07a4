// ky_ddg_rom_tb: self-checking test of the DDG-tree ROM.
//
// 1. A ROM built from the 4-value example distribution (theta = 6) is read at
//    every used address and compared with the published example table.
// 2. The FALCON ROM (defaults) is read exhaustively: the largest index stored
//    must be 477 (19 leaves + root + 458 intermediate nodes = 478 nodes), the
//    root's children are the first two intermediate nodes, and leaves point
//    to themselves.
// 3. Random 72-bit strings are walked through the FALCON ROM, one read per
//    cycle, and the leaf reached is compared with the matrix-based reference.
// 4. The compacted ROM for 3 random bits per cycle holds 171 nodes.
module ky_ddg_rom_tb;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Example ROM: theta = 6, four values, W = 4.
  logic       ex_rb;
  logic [3:0] ex_idx, ex_data;
  ky_ddg_rom #(.N(4), .THETA(6), .RAND_BITS(1), .W(4), .PROB(ky_ref_pkg::EX_PROB))
    u_ex (.clk, .rbits(ex_rb), .index(ex_idx), .data(ex_data));

  // FALCON ROM, one bit per cycle, all defaults.
  logic       f_rb;
  logic [8:0] f_idx, f_data;
  ky_ddg_rom u_falcon (.clk, .rbits(f_rb), .index(f_idx), .data(f_data));

  // FALCON ROM compacted for three bits per cycle.
  logic [2:0] t_rb;
  logic [7:0] t_idx, t_data;
  ky_ddg_rom #(.RAND_BITS(3), .W(8)) u_three (.clk, .rbits(t_rb), .index(t_idx), .data(t_data));

  // Published example ROM contents, addresses 0..13 and 16..29.
  localparam logic [3:0] EX_TABLE [28] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0101, 4'b0001, 4'b0111,
    4'b0010, 4'b1001, 4'b0010, 4'b1011, 4'b0010, 4'b0000, 4'b0011,
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0110, 4'b0000, 4'b1000,
    4'b0000, 4'b1010, 4'b0000, 4'b1100, 4'b0001, 4'b1101, 4'b0001
  };

  task automatic read_ex(input logic [4:0] addr, output logic [3:0] d);
    {ex_rb, ex_idx} = addr;
    @(posedge clk); #1;
    d = ex_data;
  endtask

  task automatic read_f(input logic [9:0] addr, output logic [8:0] d);
    {f_rb, f_idx} = addr;
    @(posedge clk); #1;
    d = f_data;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] d4;
    logic [8:0] d9, maxd;
    logic [71:0] bits;
    int unsigned exp_v, depth, maxt;

    t_rb = '0; t_idx = '0;
    // 1. example table
    for (int i = 0; i < 28; i++) begin
      logic [4:0] a;
      a = (i < 14) ? 5'(i) : 5'(i + 2);
      read_ex(a, d4);
      check(d4 == EX_TABLE[i], $sformatf("example ROM addr %05b: got %04b expected %04b", a, d4, EX_TABLE[i]));
    end

    // 2. FALCON ROM structure
    maxd = '0;
    for (int a = 0; a < 1024; a++) begin
      read_f(10'(a), d9);
      if (d9 > maxd) maxd = d9;
      if (a[8:0] < 19)
        check(d9 == 9'(a[8:0]), $sformatf("leaf %0d does not point to itself (bit %0d)", a[8:0], a[9]));
    end
    check(maxd == 9'd477, $sformatf("largest stored index %0d, expected 477", maxd));
    read_f({1'b0, 9'd19}, d9);
    check(d9 == 9'd20, $sformatf("root right child %0d, expected 20", d9));
    read_f({1'b1, 9'd19}, d9);
    check(d9 == 9'd21, $sformatf("root left child %0d, expected 21", d9));

    // 3. random walks through the FALCON ROM
    for (int s = 0; s < 300; s++) begin
      bits = 72'({$urandom, $urandom, $urandom});
      exp_v = ky_ref_pkg::falcon_sample(bits, depth);
      f_idx = 9'd19;
      for (int c = 0; c < 72; c++) begin
        f_rb = bits[71-c];
        @(posedge clk); #1;
        f_idx = f_data;
      end
      check(f_data == 9'(exp_v), $sformatf("walk %0d: got %0d expected %0d", s, f_data, exp_v));
    end
    bits = ky_ref_pkg::path_to_last_leaf();
    f_idx = 9'd19;
    for (int c = 0; c < 72; c++) begin
      f_rb = bits[71-c];
      @(posedge clk); #1;
      f_idx = f_data;
    end
    check(f_data == 9'd18, $sformatf("deepest path: got %0d expected 18", f_data));

    // 4. compacted ROM size: largest index 170
    maxt = 0;
    for (int a = 0; a < 2048; a++) begin
      {t_rb, t_idx} = 11'(a);
      @(posedge clk); #1;
      if (int'(t_data) > maxt) maxt = int'(t_data);
    end
    check(maxt == 170, $sformatf("3-bit ROM largest index %0d, expected 170", maxt));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
