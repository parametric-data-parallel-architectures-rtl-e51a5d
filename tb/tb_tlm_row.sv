// tb_tlm_row: a TLM time-stepping kernel run on the coprocessor at its
// default size.
//
// The kernel is a one-dimensional TLM line of N = 125 shunt nodes (125 is
// one side of the 80 x 100 x 125 benchmark mesh), vectorised along the line
// and strip-mined in VLMAX-element strips, the last one (13 nodes) under
// VLEN. Each time step:
//   scatter  V = A + B, RL = V - A, RR = V - B   (A, B incident pulses from
//            the left and right; RL, RR reflected pulses)
//   connect  A'[i] = RR[i-1], B'[i] = RL[i+1], zero at the two ends
//            (absorbing ends); done with loads one element before / after
//            the strip, i.e. unaligned with respect to the cache lines.
// A CPU model issues the program through the coprocessor channel, stalling
// at random; the AHB memory model adds wait states. After T time steps the
// A and B arrays in memory must equal a reference computed here with the
// same single-precision rounding. The cycle count per node and time step is
// printed.
module tb_tlm_row;
  import fp_ref_pkg::*;
  import vcop_pkg::*;

  localparam int VLMAX = 16, NB = 4 * VLMAX;
  localparam int N = 125, T = 4, WORDS = 4096;
  localparam int A_BASE = 32'h1000, B_BASE = 32'h1400, RL_BASE = 32'h1800, RR_BASE = 32'h1C00;
  localparam int NSTRIP = (N + VLMAX - 1) / VLMAX;
  localparam int NPROG = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cop_valid, cop_no, cop_holdn_in, cop_holdn;
  logic [19:0] cop_opc;
  logic [31:0] cop_din, cop_dout;
  logic        HBUSREQ, HGRANT, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic [2:0]  HSIZE, HBURST;

  vcop dut (.*);
  ahb_mem_model #(.WORDS(WORDS), .MAXWAIT(1), .DROP_PCT(0)) mem (
    .clk, .rst_n, .HBUSREQ, .HGRANT, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST,
    .HWDATA, .HRDATA, .HREADY, .HRESP);

  int checks = 0, failures = 0;

  logic [19:0] prog_opc [NPROG];
  logic [31:0] prog_din [NPROG];
  int nprog = 0;

  function automatic logic [19:0] enc(vop_e op, int d, int a, int b, int c);
    return {op, 4'(d), 4'(a), 4'(b), 4'(c)};
  endfunction
  task automatic emit(input logic [19:0] o, input logic [31:0] din = '0);
    prog_opc[nprog] = o; prog_din[nprog] = din; nprog++;
  endtask

  // SR1..SR4 array bases, SR5 = RR base - 4, SR6 = RL base + 4, SR0 strip
  // offset, SR7 strip length in bytes.
  task automatic strip_setup(input int s);
    int len;
    len = (N - s * VLMAX >= VLMAX) ? NB : 4 * (N - s * VLMAX);
    emit(enc(OP_MVSR2CSR, 0, 0, 0, 0), 32'(s * NB));
    emit(enc(OP_MVSR2CSR, 7, 0, 0, 0), 32'(len));
    emit(enc(OP_MVSR2VLEN, 0, 7, 0, 0));
  endtask

  task automatic gen_program();
    emit(enc(OP_MVSR2CSR, 1, 0, 0, 0), A_BASE);
    emit(enc(OP_MVSR2CSR, 2, 0, 0, 0), B_BASE);
    emit(enc(OP_MVSR2CSR, 3, 0, 0, 0), RL_BASE);
    emit(enc(OP_MVSR2CSR, 4, 0, 0, 0), RR_BASE);
    emit(enc(OP_MVSR2CSR, 5, 0, 0, 0), RR_BASE - 4);
    emit(enc(OP_MVSR2CSR, 6, 0, 0, 0), RL_BASE + 4);
    for (int t = 0; t < T; t++) begin
      for (int s = 0; s < NSTRIP; s++) begin   // scatter
        strip_setup(s);
        emit(enc(OP_VLDU, 0, 1, 0, 0));          // v0 = A
        emit(enc(OP_VLDU, 1, 2, 0, 0));          // v1 = B
        emit(enc(OP_VFPADD, 2, 0, 1, 0));        // v2 = V
        emit(enc(OP_VFPSUB, 3, 2, 0, 0));        // v3 = RL
        emit(enc(OP_VFPSUB, 4, 2, 1, 0));        // v4 = RR
        emit(enc(OP_VSTU, 3, 3, 0, 0));
        emit(enc(OP_VSTU, 4, 4, 0, 0));
      end
      for (int s = 0; s < NSTRIP; s++) begin   // connect
        strip_setup(s);
        emit(enc(OP_VLDU, 5, 5, 0, 0));          // RR[i-1]
        emit(enc(OP_VLDU, 6, 6, 0, 0));          // RL[i+1]
        emit(enc(OP_VSTU, 5, 1, 0, 0));          // A' 
        emit(enc(OP_VSTU, 6, 2, 0, 0));          // B'
      end
    end
  endtask

  // CPU model: one opcode per cycle, held while the coprocessor or the CPU
  // itself stalls; din one cycle after acceptance.
  int pc = 0, cycle = 0;
  logic [31:0] din_q;
  logic hold_rand;
  assign cop_valid    = rst_n && (pc < nprog);
  assign cop_no       = 1'b0;
  assign cop_opc      = (pc < nprog) ? prog_opc[pc] : 20'hF0000;
  assign cop_din      = din_q;
  assign cop_holdn_in = !hold_rand;
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (cop_valid && cop_holdn && cop_holdn_in) begin
      din_q <= prog_din[pc];
      pc <= pc + 1;
    end
    hold_rand <= ($urandom_range(99) < 5);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ra [N], rb [N], rl [N], rr [N];
  initial begin
    int c0;
    hold_rand = 0; din_q = '0;
    for (int i = 0; i < N; i++) begin
      ra[i] = rnd_fp(3); rb[i] = rnd_fp(3);
    end
    for (int i = 0; i < 4 * 256; i++) mem.mem[A_BASE / 4 + i] = '0;   // arrays and guards
    for (int i = 0; i < N; i++) begin
      mem.mem[A_BASE / 4 + i] = ra[i];
      mem.mem[B_BASE / 4 + i] = rb[i];
    end
    gen_program();
    // Reference.
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < N; i++) begin
        logic [31:0] v;
        v = ref_add(ra[i], rb[i]);
        rl[i] = ref_add(v, {~ra[i][31], ra[i][30:0]});
        rr[i] = ref_add(v, {~rb[i][31], rb[i][30:0]});
      end
      for (int i = 0; i < N; i++) begin
        ra[i] = (i == 0) ? 32'd0 : rr[i - 1];
        rb[i] = (i == N - 1) ? 32'd0 : rl[i + 1];
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c0 = cycle;
    wait (pc == nprog);
    repeat (10) @(posedge clk);
    wait (!dut.u_mem.busy && dut.u_mem.wb_empty && dut.u_mem.u_bus.mode == 0 && !mem.dp);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (mem.mem[A_BASE / 4 + i] !== ra[i] || mem.mem[B_BASE / 4 + i] !== rb[i]) begin
        failures++;
        if (failures < 5) $display("FAIL node %0d: A %h/%h B %h/%h", i, mem.mem[A_BASE / 4 + i], ra[i],
                                   mem.mem[B_BASE / 4 + i], rb[i]);
      end
    end
    // Guards beyond the line ends stay zero.
    checks += 2;
    if (mem.mem[RR_BASE / 4 - 1] !== 0 || mem.mem[RL_BASE / 4 + N] !== 0) failures++;
    $display("N=%0d T=%0d instructions=%0d cycles=%0d cycles/node/step=%0.2f", N, T, nprog, cycle - c0,
             real'(cycle - c0) / real'(N * T));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
