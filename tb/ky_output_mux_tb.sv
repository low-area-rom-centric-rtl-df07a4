// ky_output_mux_tb: self-checking test of the output multiplexer.
// With ready the sample is the low 5 bits of the ROM data, otherwise the
// idle code 31; a second instance uses a 3-bit sample and idle code 7.
module ky_output_mux_tb;

  int checks = 0, failures = 0;

  logic       rdy;
  logic [8:0] d9;
  logic [4:0] s5;
  logic [3:0] d4;
  logic [2:0] s3;

  ky_output_mux                                   u_f (.ready(rdy), .rom_data(d9), .sample(s5));
  ky_output_mux #(.W(4), .L(3), .IDLE_CODE(3'd7)) u_e (.ready(rdy), .rom_data(d4), .sample(s3));

  initial begin
    for (int i = 0; i < 200; i++) begin
      rdy = 1'($urandom);
      d9  = 9'($urandom_range(0, 18));
      d4  = 4'($urandom_range(0, 3));
      #1;
      checks += 2;
      if (s5 != (rdy ? 5'(d9) : 5'd31)) begin failures++; $display("FAIL: L=5 rdy=%0b d=%0d got %0d", rdy, d9, s5); end
      if (s3 != (rdy ? 3'(d4) : 3'd7))  begin failures++; $display("FAIL: L=3 rdy=%0b d=%0d got %0d", rdy, d4, s3); end
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
