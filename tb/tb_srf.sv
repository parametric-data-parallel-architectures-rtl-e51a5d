// tb_srf: reset, random writes and two-port reads of the scalar register
// file against an array model.
module tb_srf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] ra, rb, wa;
  logic [31:0] qa, qb, wd;
  logic we;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  srf #(.SRMAX(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 8; i++) model[i] = '0;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1;
      checks++;
      if (qa !== 32'd0) begin failures++; $display("FAIL reset SR%0d", i); end
    end
    for (int t = 0; t < 2000; t++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = $urandom;
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks++;
      if (qa !== model[ra] || qb !== model[rb]) begin
        failures++;
        if (failures < 5) $display("FAIL read t=%0d", t);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
