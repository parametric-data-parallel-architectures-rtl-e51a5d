// tb_wbuf: random pushes and pops of the write buffer against a queue
// model, including full and empty conditions.
module tb_wbuf;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [29:0] push_waddr, head_waddr;
  logic [31:0] push_data, head_data;
  logic [3:0] push_be, head_be;
  logic [65:0] q [$];
  int checks = 0, failures = 0, nfull = 0;

  wbuf #(.DEPTH(8)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_waddr = 0; push_data = 0; push_be = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      checks++;
      if (full !== (q.size() == 8) || empty !== (q.size() == 0)) begin
        failures++;
        if (failures < 5) $display("FAIL flags t=%0d size=%0d full=%b empty=%b", t, q.size(), full, empty);
      end
      if (q.size() > 0) begin
        checks++;
        if ({head_waddr, head_data, head_be} !== q[0][65:0]) failures++;
      end
      if (full) nfull++;
      push = !full && ($urandom_range(99) < ((t / 500) % 2 ? 70 : 30));
      pop  = !empty && ($urandom_range(99) < ((t / 500) % 2 ? 30 : 70));
      push_waddr = 30'($urandom); push_data = $urandom; push_be = 4'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back({push_waddr, push_data, push_be});
      #1;
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
