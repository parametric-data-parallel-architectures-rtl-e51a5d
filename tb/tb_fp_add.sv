// tb_fp_add: random and special-case check of the binary32 adder and
// subtractor against binary64 reference arithmetic rounded to binary32.
// Includes operands of nearly equal magnitude to exercise cancellation.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [31:0] e);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL add %h %s %h = %h expected %h", a, sub ? "-" : "+", b, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 30000; i++) begin
      a   = rnd_fp(30);
      sub = 1'($urandom);
      case (i % 3)
        0: b = rnd_fp(30);
        1: b = {1'($urandom), 8'(int'(a[30:23]) + int'($urandom_range(2)) - 1), 23'($urandom)};
        default: b = {1'($urandom), a[30:23], a[22:0] ^ 23'($urandom_range(7))};
      endcase
      #1 check(ref_add(a, {b[31] ^ sub, b[30:0]}));
    end
    sub = 0;
    a = 32'h3F80_0000; b = 32'hBF80_0000; #1 check(32'h0000_0000);
    a = 32'h8000_0000; b = 32'h8000_0000; #1 check(32'h8000_0000);
    a = 32'h7F80_0000; b = 32'hFF80_0000; #1 check(32'h7FC0_0000);
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; #1 check(32'h7F80_0000);
    a = 32'h4000_0000; b = 32'h0000_0000; #1 check(32'h4000_0000);
    a = 32'h3F80_0000; b = 32'h3380_0000; #1 check(32'h3F80_0000); // tie to even
    a = 32'h3F80_0001; b = 32'h3380_0000; #1 check(32'h3F80_0002); // tie to even, up
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
