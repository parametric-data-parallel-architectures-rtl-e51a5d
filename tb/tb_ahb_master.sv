// tb_ahb_master: the bus controller against the behavioural AHB memory
// (random wait states, random loss of grant). Random full and partial word
// writes from a write-buffer model are checked in memory afterwards; random
// line fills are checked word by word against memory. Every beat must be
// driven only while the master owns the bus.
module tb_ahb_master;
  localparam int VLMAX = 16, VW = 32 * VLMAX, WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wb_empty, wb_pop, fill_req, fill_done;
  logic [29:0] wb_waddr;
  logic [31:0] wb_data, fill_addr;
  logic [3:0] wb_be;
  logic [VW-1:0] fill_data;
  logic HBUSREQ, HGRANT, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE, HBURST;
  int checks = 0, failures = 0;

  ahb_master #(.VLMAX(VLMAX)) dut (.*);
  ahb_mem_model #(.WORDS(WORDS), .MAXWAIT(3), .DROP_PCT(15)) mem (.*);

  logic [31:0] shadow [WORDS];
  logic [65:0] q [$];

  assign wb_empty = (q.size() == 0);
  assign wb_waddr = wb_empty ? '0 : q[0][65:36];
  assign wb_data  = wb_empty ? '0 : q[0][35:4];
  assign wb_be    = wb_empty ? '0 : q[0][3:0];
  always @(posedge clk) if (wb_pop) void'(q.pop_front());

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nfill = 0, nwrite = 0;
  initial begin
    fill_req = 0; fill_addr = 0;
    for (int i = 0; i < WORDS; i++) shadow[i] = mem.init_word(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      if ($urandom_range(2) != 0) begin
        // A burst of writes into the buffer model.
        int n;
        n = $urandom_range(1, 6);
        for (int k = 0; k < n; k++) begin
          logic [29:0] wa; logic [31:0] d; logic [3:0] be;
          wa = 30'($urandom_range(WORDS - 1)); d = $urandom;
          be = ($urandom_range(1) == 0) ? 4'hF : 4'($urandom_range(1, 15));
          q.push_back({wa, d, be});
          for (int b = 0; b < 4; b++) if (be[b]) shadow[wa][31 - 8*b -: 8] = d[31 - 8*b -: 8];
          nwrite++;
        end
      end else begin
        // A line fill, only once the buffer has drained.
        wait (q.size() == 0 && dut.mode == 0);
        @(posedge clk); #1;
        fill_addr = 32'($urandom_range(WORDS / VLMAX - 1)) * 32'(4 * VLMAX);
        fill_req = 1;
        do @(posedge clk); while (!fill_done);
        #1 fill_req = 0;
        for (int w = 0; w < VLMAX; w++) begin
          checks++;
          if (fill_data[32*w +: 32] !== shadow[fill_addr / 4 + 32'(w)]) begin
            failures++;
            if (failures < 5) $display("FAIL fill %h word %0d: %h expected %h", fill_addr, w,
                                       fill_data[32*w +: 32], shadow[fill_addr / 4 + 32'(w)]);
          end
        end
        nfill++;
      end
    end
    wait (q.size() == 0 && dut.mode == 0);
    repeat (5) @(posedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (mem.mem[i] !== shadow[i]) begin
        failures++;
        if (failures < 5) $display("FAIL mem[%0d] %h expected %h", i, mem.mem[i], shadow[i]);
      end
    end
    checks++;
    if (mem.proto_errors != 0 || mem.grant_drops == 0 || nfill == 0) failures++;
    $display("fills=%0d writes=%0d grant_drops=%0d proto_errors=%0d", nfill, nwrite, mem.grant_drops, mem.proto_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
