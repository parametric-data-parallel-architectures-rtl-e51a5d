// tb_vdcache: fills, two-line lookups and store merges of the vector cache
// against a model of a direct-mapped cache with even/odd line banks.
module tb_vdcache;
  localparam int VLMAX = 16, NLINES = 64, VW = 32 * VLMAX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] addr;
  logic hit0, hit1;
  logic [VW-1:0] line0, line1, fill_data;
  logic fill_we, st_we;
  logic [25:0] fill_line;
  logic [29:0] st_waddr;
  logic [31:0] st_data;
  logic [3:0] st_be;
  int checks = 0, failures = 0, nhit = 0, nmiss = 0;

  // Model: by line number, what the cache holds (slot = line mod NLINES).
  logic          m_valid [NLINES];
  logic [25:0]   m_line  [NLINES];
  logic [VW-1:0] m_data  [NLINES];

  vdcache #(.VLMAX(VLMAX), .NLINES(NLINES)) dut (.*);

  task automatic look(input logic [25:0] ln);
    int s0, s1;
    logic e0, e1;
    s0 = int'(ln % NLINES); s1 = int'((ln + 1) % NLINES);
    e0 = m_valid[s0] && m_line[s0] == ln;
    e1 = m_valid[s1] && m_line[s1] == ln + 1;
    checks++;
    if (hit0 !== e0 || hit1 !== e1 || (e0 && line0 !== m_data[s0]) || (e1 && line1 !== m_data[s1])) begin
      failures++;
      if (failures < 5) $display("FAIL lookup line %0d: hit %b%b expected %b%b", ln, hit0, hit1, e0, e1);
    end
    if (e0) nhit++; else nmiss++;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_we = 0; st_we = 0; addr = 0; fill_line = 0; st_waddr = 0; st_data = 0; st_be = 0;
    for (int i = 0; i < NLINES; i++) m_valid[i] = 0;
    @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      logic [25:0] ln;
      int k;
      ln = 26'($urandom_range(200));
      addr = {ln, 6'($urandom)};
      #1 look(ln);
      k = $urandom_range(2);
      fill_we = (k == 0);
      st_we = (k == 1);
      fill_line = 26'($urandom_range(200));
      for (int j = 0; j < VLMAX; j++) fill_data[32*j +: 32] = $urandom;
      st_waddr = {26'($urandom_range(200)), 4'($urandom)};
      st_data = $urandom; st_be = 4'($urandom);
      @(posedge clk);
      if (fill_we) begin
        m_valid[fill_line % NLINES] = 1;
        m_line[fill_line % NLINES] = fill_line;
        m_data[fill_line % NLINES] = fill_data;
      end
      if (st_we) begin
        int s;
        s = int'(st_waddr[29:4] % NLINES);
        if (m_valid[s] && m_line[s] == st_waddr[29:4])
          for (int b = 0; b < 4; b++)
            if (st_be[b]) m_data[s][32*st_waddr[3:0] + 31 - 8*b -: 8] = st_data[31 - 8*b -: 8];
      end
      #1;
    end
    checks++;
    if (nhit == 0 || nmiss == 0) failures++;
    $display("hits=%0d misses=%0d", nhit, nmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
