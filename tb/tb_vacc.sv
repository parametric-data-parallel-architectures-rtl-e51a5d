// tb_vacc: reset to +0, element-wise writes to either accumulator and reads
// through the select, against a model.
module tb_vacc;
  localparam int VLMAX = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rsel, wsel;
  logic [32*VLMAX-1:0] q, wd;
  logic [VLMAX-1:0] we;
  logic [31:0] model [2][VLMAX];
  int checks = 0, failures = 0;

  vacc #(.VLMAX(VLMAX)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; rsel = 0; wsel = 0; wd = '0;
    @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < 2; s++) for (int i = 0; i < VLMAX; i++) model[s][i] = '0;
    for (int t = 0; t < 2000; t++) begin
      we = VLMAX'($urandom); wsel = 1'($urandom); rsel = 1'($urandom);
      for (int i = 0; i < VLMAX; i++) wd[32*i +: 32] = $urandom;
      #1;
      for (int i = 0; i < VLMAX; i++) begin
        checks++;
        if (q[32*i +: 32] !== model[rsel][i]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d acc%0d[%0d]", t, rsel, i);
        end
      end
      @(posedge clk);
      for (int i = 0; i < VLMAX; i++) if (we[i]) model[wsel][i] = wd[32*i +: 32];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
