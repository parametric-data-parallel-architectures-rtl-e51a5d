// tb_vrf: random byte-enabled writes and three-port reads of the vector
// register file against an array model.
module tb_vrf;
  localparam int VRMAX = 16, VLMAX = 16, VW = 32 * VLMAX, NB = 4 * VLMAX;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] ra, rb, rc, wa;
  logic [VW-1:0] qa, qb, qc, wd;
  logic [NB-1:0] we_b;
  logic [7:0] model [VRMAX][NB];
  int checks = 0, failures = 0;

  vrf #(.VRMAX(VRMAX), .VLMAX(VLMAX)) dut (.*);

  function automatic logic [VW-1:0] row(input int r);
    logic [VW-1:0] v;
    for (int j = 0; j < NB; j++) v[32*(j/4) + 31 - 8*(j%4) -: 8] = model[r][j];
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_b = '1;
    for (int r = 0; r < VRMAX; r++) begin
      wa = 4'(r);
      for (int j = 0; j < VW / 32; j++) wd[32*j +: 32] = $urandom;
      for (int j = 0; j < NB; j++) model[r][j] = wd[32*(j/4) + 31 - 8*(j%4) -: 8];
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      wa = 4'($urandom); we_b = {$urandom, $urandom};
      if (t % 4 == 0) we_b = '0;
      for (int j = 0; j < VW / 32; j++) wd[32*j +: 32] = $urandom;
      ra = 4'($urandom); rb = 4'($urandom); rc = 4'($urandom);
      #1;
      checks += 3;
      if (qa !== row(ra) || qb !== row(rb) || qc !== row(rc)) begin
        failures++;
        if (failures < 5) $display("FAIL read at t=%0d", t);
      end
      @(posedge clk);
      for (int j = 0; j < NB; j++)
        if (we_b[j]) model[wa][j] = wd[32*(j/4) + 31 - 8*(j%4) -: 8];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
