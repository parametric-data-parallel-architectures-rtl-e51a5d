// tb_vperm: random byte permutes against a byte-table model, plus a splat
// and a rotation built from permute control vectors.
module tb_vperm;
  localparam int VLMAX = 16, VW = 32 * VLMAX, NB = 4 * VLMAX;
  logic [VW-1:0] va, vb, vc, y;
  int checks = 0, failures = 0;

  vperm #(.VLMAX(VLMAX)) dut (.*);

  function automatic logic [7:0] byt(input logic [VW-1:0] v, input int j);
    return v[32*(j/4) + 31 - 8*(j%4) -: 8];
  endfunction

  task automatic check_all();
    for (int j = 0; j < NB; j++) begin
      int idx;
      logic [7:0] e;
      idx = int'(byt(vc, j)) % (2 * NB);
      e = (idx < NB) ? byt(va, idx) : byt(vb, idx - NB);
      checks++;
      if (byt(y, j) !== e) begin
        failures++;
        if (failures < 5) $display("FAIL byte %0d: %h expected %h", j, byt(y, j), e);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < VW / 32; j++) begin
        va[32*j +: 32] = $urandom; vb[32*j +: 32] = $urandom; vc[32*j +: 32] = $urandom;
      end
      #1 check_all();
    end
    // Splat of element 3 of va: control bytes 12,13,14,15 repeated.
    for (int j = 0; j < NB; j++) vc[32*(j/4) + 31 - 8*(j%4) -: 8] = 8'(12 + j % 4);
    #1;
    for (int i = 0; i < VLMAX; i++) begin
      checks++;
      if (y[32*i +: 32] !== va[127:96]) failures++;
    end
    // Rotation by one element across {va, vb}.
    for (int j = 0; j < NB; j++) vc[32*(j/4) + 31 - 8*(j%4) -: 8] = 8'(j + 4);
    #1;
    checks++;
    if (y[32*(VLMAX-1) +: 32] !== vb[31:0] || y[31:0] !== va[63:32]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
