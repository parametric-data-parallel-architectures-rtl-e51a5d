// tb_fp_mul: random and special-case check of the binary32 multiplier
// against binary64 reference arithmetic rounded to binary32.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] e);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h expected %h", a, b, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp(40); b = rnd_fp(40);
      #1 check(ref_mul(a, b));
    end
    // Products near 1.0 and exact powers of two.
    a = 32'h3F80_0000; b = 32'h4049_0FDB; #1 check(32'h4049_0FDB);
    a = 32'h4000_0000; b = 32'hC000_0000; #1 check(32'hC080_0000);
    a = 32'h3FFF_FFFF; b = 32'h3FFF_FFFF; #1 check(ref_mul(a, b));
    // Specials.
    a = 32'h0000_0000; b = 32'hC123_4567; #1 check(32'h8000_0000);
    a = 32'h7F80_0000; b = 32'h3F80_0000; #1 check(32'h7F80_0000);
    a = 32'h7F80_0000; b = 32'h0000_0000; #1 check(32'h7FC0_0000);
    a = 32'h7F00_0000; b = 32'h7F00_0000; #1 check(32'h7F80_0000); // overflow
    a = 32'h0080_0000; b = 32'h0080_0000; #1 check(32'h0000_0000); // underflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
