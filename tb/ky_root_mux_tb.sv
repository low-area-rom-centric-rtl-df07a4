// ky_root_mux_tb: self-checking test of the root-index multiplexer.
// Random ROM data and select values; with load_root the output must be the
// root index (19 by default, 4 for the example tree), otherwise the ROM data.
module ky_root_mux_tb;

  int checks = 0, failures = 0;

  logic       lr;
  logic [8:0] d9, i9;
  logic [3:0] d4, i4;

  ky_root_mux                               u_f (.load_root(lr), .rom_data(d9), .index(i9));
  ky_root_mux #(.W(4), .ROOT_INDEX(4'd4))   u_e (.load_root(lr), .rom_data(d4), .index(i4));

  initial begin
    for (int i = 0; i < 200; i++) begin
      lr = 1'($urandom);
      d9 = 9'($urandom);
      d4 = 4'($urandom);
      #1;
      checks += 2;
      if (i9 != (lr ? 9'd19 : d9)) begin failures++; $display("FAIL: W=9 lr=%0b d=%0d got %0d", lr, d9, i9); end
      if (i4 != (lr ? 4'd4 : d4))  begin failures++; $display("FAIL: W=4 lr=%0b d=%0d got %0d", lr, d4, i4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
