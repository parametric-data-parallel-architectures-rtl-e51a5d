// tb_vmem: the memory pipe (cache, write buffer, bus controller) against the
// behavioural AHB memory. Random unaligned loads and stores of random length
// (0 .. 4*VLMAX bytes, longer requests are cut to the vector size) are
// checked against a shadow memory: loaded bytes and their enables at each
// load, the whole memory at the end. A load repeated at once must hit and
// complete two cycles after its request.
module tb_vmem;
  localparam int VLMAX = 16, VW = 32 * VLMAX, NB = 4 * VLMAX, WORDS = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req, is_store, busy, done, fill_busy, wb_full;
  logic [31:0] addr;
  logic [6:0] vlen;
  logic [VW-1:0] wdata, rdata;
  logic [NB-1:0] rbe;
  logic HBUSREQ, HGRANT, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE, HBURST;
  int checks = 0, failures = 0;

  vmem #(.VLMAX(VLMAX), .NLINES(16), .WB_DEPTH(4)) dut (.*);
  ahb_mem_model #(.WORDS(WORDS), .MAXWAIT(2), .DROP_PCT(10)) mem (.*);

  logic [31:0] shadow [WORDS];
  function automatic logic [7:0] sbyte(input int a);
    return shadow[(a / 4) % WORDS][31 - 8*(a % 4) -: 8];
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit st, input int a, input int len, output int lat);
    int n, t0;
    @(posedge clk); #1;
    req = 1; is_store = st; addr = 32'(a); vlen = 7'(len);
    for (int j = 0; j < VLMAX; j++) wdata[32*j +: 32] = $urandom;
    t0 = 0;
    @(posedge clk); #1 req = 0;
    t0 = 1;
    while (!done) begin @(posedge clk); #1; t0++; end
    lat = t0;
    n = (len > NB) ? NB : len;
    if (st) begin
      for (int j = 0; j < n; j++)
        shadow[((a + j) / 4) % WORDS][31 - 8*((a + j) % 4) -: 8] = wdata[32*(j/4) + 31 - 8*(j%4) -: 8];
    end else begin
      for (int j = 0; j < NB; j++) begin
        checks++;
        if (rbe[j] !== (j < n) || (j < n && rdata[32*(j/4) + 31 - 8*(j%4) -: 8] !== sbyte(a + j))) begin
          failures++;
          if (failures < 5) $display("FAIL load a=%0d len=%0d byte %0d", a, len, j);
        end
      end
    end
  endtask

  int nst = 0, nld = 0, nfull = 0;
  always @(posedge clk) if (wb_full && dut.state == 3) nfull++;

  initial begin
    int lat;
    req = 0; is_store = 0; addr = 0; vlen = 0; wdata = '0;
    for (int i = 0; i < WORDS; i++) shadow[i] = mem.init_word(i);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int a, len;
      a = $urandom_range(4 * WORDS - 2 * NB - 1);
      if (t % 3 == 0) a = (a / 64) * 64 + 60;  // near a line end
      len = $urandom_range(0, NB + 8);
      if ($urandom_range(2) == 0) begin
        access(1, a, len, lat); nst++;
      end else begin
        access(0, a, len, lat); nld++;
        if (len > 0) begin
          access(0, a, len, lat);
          checks++;
          if (lat != 2) begin
            failures++;
            $display("FAIL repeated load took %0d cycles", lat);
          end
        end
      end
    end
    wait (dut.wb_empty && dut.u_bus.mode == 0);
    repeat (40) @(posedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (mem.mem[i] !== shadow[i]) begin
        failures++;
        if (failures < 5) $display("FAIL mem[%0d] %h expected %h", i, mem.mem[i], shadow[i]);
      end
    end
    checks++;
    if (nfull == 0 || mem.proto_errors != 0) failures++;
    $display("loads=%0d stores=%0d wb_full_cycles=%0d", nld, nst, nfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
