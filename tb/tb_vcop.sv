// tb_vcop: end-to-end test of the vector coprocessor at its default size.
//
// A small CPU model drives the coprocessor channel with a program: it
// presents one opcode per cycle, keeps it while cop_holdn is low, supplies
// din one cycle after an opcode is accepted, and lowers its own holdn at
// random. Memory is the behavioural AHB model with random wait states and
// random loss of the bus grant. A reference model executes each instruction
// architecturally at the moment it is accepted; values returned on dout are
// compared in order (with their latency: two cycles plus frozen cycles), and
// at the end the vector and scalar registers, accumulators, VLEN and memory
// are compared with the model. Each mechanism of the design is counted and
// must occur at least once.
module tb_vcop;
  import fp_ref_pkg::*;
  import vcop_pkg::*;

  localparam int VLMAX = 16, VRMAX = 16, SRMAX = 8;
  localparam int NB = 4 * VLMAX;
  localparam int NPROG = 3000;
  localparam int WORDS = 4096;

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
  ahb_mem_model #(.WORDS(WORDS), .MAXWAIT(2), .DROP_PCT(10)) mem (
    .clk, .rst_n, .HBUSREQ, .HGRANT, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST,
    .HWDATA, .HRDATA, .HREADY, .HRESP);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [19:0] prog_opc [NPROG];
  logic [31:0] prog_din [NPROG];

  function automatic logic [19:0] enc(vop_e op, int d, int a, int b, int c);
    return {op, 4'(d), 4'(a), 4'(b), 4'(c)};
  endfunction

  // ---------------------------------------------------------------- reference model
  logic [31:0] m_vr [VRMAX][VLMAX];
  logic [31:0] m_sr [SRMAX];
  logic [31:0] m_acc [2][VLMAX];
  int          m_vlen;
  logic [31:0] shadow [WORDS];

  function automatic logic [7:0] vbyte(input logic [31:0] v [VLMAX], input int j);
    return v[j/4][31 - 8*(j%4) -: 8];
  endfunction

  int pc = 0, cycle = 0, frozen = 0;
  logic [31:0] exp_dout [$];
  int          exp_frz  [$];
  int          exp_cyc  [$];

  task automatic model_exec(input logic [19:0] opc, input logic [31:0] din);
    int d, a, b, c, ve, ad;
    logic [31:0] ta [VLMAX], tb [VLMAX], tc [VLMAX], r [VLMAX];
    d = int'(opc[15:12]); a = int'(opc[11:8]); b = int'(opc[7:4]); c = int'(opc[3:0]);
    ve = (m_vlen > NB) ? NB : m_vlen;
    ta = m_vr[a]; tb = m_vr[b]; tc = m_vr[c];
    case (vop_e'(opc[19:16]))
      OP_MVSR2VLEN: m_vlen = int'(m_sr[a % SRMAX][9:0]);
      OP_MVSR2CSR:  m_sr[d % SRMAX] = din;
      OP_MVCSR2R:   begin exp_dout.push_back(m_sr[a % SRMAX]); exp_frz.push_back(frozen); exp_cyc.push_back(cycle); end
      OP_MVSR2CVEL: m_vr[d][c] = din;
      OP_MVCVEL2R:  begin exp_dout.push_back(m_vr[a][c]); exp_frz.push_back(frozen); exp_cyc.push_back(cycle); end
      OP_VLDU: begin
        ad = int'(m_sr[a % SRMAX] + m_sr[b % SRMAX]);
        for (int j = 0; j < ve; j++)
          m_vr[d][j/4][31 - 8*(j%4) -: 8] = shadow[((ad + j) / 4) % WORDS][31 - 8*((ad + j) % 4) -: 8];
      end
      OP_VSTU: begin
        ad = int'(m_sr[a % SRMAX] + m_sr[b % SRMAX]);
        for (int j = 0; j < ve; j++)
          shadow[((ad + j) / 4) % WORDS][31 - 8*((ad + j) % 4) -: 8] = vbyte(m_vr[d], j);
      end
      OP_VPERM: begin
        for (int j = 0; j < NB; j++) begin
          int idx;
          idx = int'(vbyte(tc, j)) % (2 * NB);
          r[j/4][31 - 8*(j%4) -: 8] = (idx < NB) ? vbyte(ta, idx) : vbyte(tb, idx - NB);
        end
        m_vr[d] = r;
      end
      OP_VSPLAT: for (int i = 0; i < VLMAX; i++) m_vr[d][i] = m_sr[a % SRMAX];
      OP_VFPADD, OP_VFPSUB, OP_VFPMUL: begin
        for (int i = 0; i < VLMAX; i++)
          if (4 * i + 4 <= ve) begin
            case (vop_e'(opc[19:16]))
              OP_VFPADD: m_vr[d][i] = ref_add(ta[i], tb[i]);
              OP_VFPSUB: m_vr[d][i] = ref_add(ta[i], {~tb[i][31], tb[i][30:0]});
              default:   m_vr[d][i] = ref_mul(ta[i], tb[i]);
            endcase
          end
      end
      OP_VFPMAC: begin
        for (int i = 0; i < VLMAX; i++) begin
          logic [31:0] acc;
          acc = c[1] ? 32'd0 : m_acc[c % 2][i];
          r[i] = ref_add(acc, ref_mul(ta[i], tb[i]));
          m_acc[c % 2][i] = r[i];
        end
        m_vr[d] = r;
      end
      default: ;
    endcase
  endtask

  // ---------------------------------------------------------------- CPU model
  logic [31:0] din_q;
  logic        hold_rand;
  int n_hazard = 0, n_vbypass = 0, n_sbypass = 0, n_memhold = 0, n_fill = 0, n_twoline = 0,
      n_loadhit = 0, n_push = 0, n_wbfull = 0, n_cpufreeze = 0, n_vlenmask = 0, n_macclr = 0,
      n_macacc = 0, n_perm = 0, n_splat = 0, n_elem = 0, n_dout = 0, n_store = 0, n_load = 0;

  assign cop_valid    = rst_n && (pc < NPROG);
  assign cop_no       = 1'b0;
  assign cop_opc      = (pc < NPROG) ? prog_opc[pc] : 20'hF0000;
  assign cop_din      = din_q;
  assign cop_holdn_in = !hold_rand;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    // mechanisms
    if (dut.hazard && cop_holdn_in && !dut.hold_mem) n_hazard++;
    if (dut.valid_d && ((dut.byp_a && dut.ctl_d.reads_va) || (dut.byp_b && dut.ctl_d.reads_vb) ||
        (dut.byp_c && (dut.ctl_d.reads_vc || dut.ctl_d.reads_vd)))) n_vbypass++;
    if (dut.valid_d && (dut.sbyp_a || dut.sbyp_b)) n_sbypass++;
    if (dut.hold_mem) n_memhold++;
    if (dut.u_mem.fill_we) n_fill++;
    if (dut.u_mem.state == 1 && dut.u_mem.hit0 && dut.u_mem.need1 && dut.u_mem.hit1) n_twoline++;
    if (dut.u_mem.state == 1 && dut.u_mem.hit0 && (dut.u_mem.hit1 || !dut.u_mem.need1)) n_loadhit++;
    if (dut.u_mem.push) n_push++;
    if (dut.u_mem.state == 3 && dut.u_mem.wb_full) n_wbfull++;
    if (!cop_holdn_in) n_cpufreeze++;
    if (!dut.back_adv) frozen <= frozen + 1;
    // dout in M
    if (dut.back_adv && dut.m_valid && dut.m_ctl.to_risc) begin
      n_dout++;
      if (exp_dout.size() == 0) check(0, "unexpected dout");
      else begin
        logic [31:0] e; int fz, cy;
        e = exp_dout.pop_front(); fz = exp_frz.pop_front(); cy = exp_cyc.pop_front();
        check(cop_dout === e, $sformatf("dout %h expected %h", cop_dout, e));
        check(cycle - cy == 2 + (frozen - fz),
              $sformatf("dout latency %0d cycles with %0d frozen", cycle - cy, frozen - fz));
      end
    end
    // acceptance of the opcode in D
    if (cop_valid && cop_holdn && cop_holdn_in) begin
      logic [19:0] o;
      o = prog_opc[pc];
      model_exec(o, prog_din[pc]);
      case (vop_e'(o[19:16]))
        OP_VFPADD, OP_VFPSUB, OP_VFPMUL: if (m_vlen < NB) n_vlenmask++;
        OP_VFPMAC: if (o[1]) n_macclr++; else n_macacc++;
        OP_VPERM: n_perm++;
        OP_VSPLAT: n_splat++;
        OP_MVSR2CVEL: n_elem++;
        OP_VSTU: n_store++;
        OP_VLDU: n_load++;
        default: ;
      endcase
      din_q <= prog_din[pc];
      pc <= pc + 1;
    end
    hold_rand <= ($urandom_range(99) < 8);
  end

  // ---------------------------------------------------------------- program generation
  task automatic gen_program();
    int n = 0;
    // Scalars: SR0..SR3 addresses and offsets, SR4..SR5 lengths, SR6..SR7 values.
    for (int i = 0; i < SRMAX; i++) begin
      prog_opc[n] = enc(OP_MVSR2CSR, i, 0, 0, 0);
      prog_din[n] = (i < 4) ? 32'($urandom_range(1500)) : (i < 6) ? 32'($urandom_range(70)) : rnd_fp(8);
      n++;
    end
    // Fill all vector registers by loads (VLEN = 64 after reset).
    for (int r = 0; r < VRMAX; r++) begin
      prog_opc[n] = enc(OP_MVSR2CSR, 0, 0, 0, 0); prog_din[n] = 32'(64 * r + $urandom_range(3)); n++;
      prog_opc[n] = enc(OP_MVSR2CSR, 1, 0, 0, 0); prog_din[n] = 32'd0; n++;
      prog_opc[n] = enc(OP_VLDU, r, 0, 1, 0); prog_din[n] = '0; n++;
    end
    // Directed: back-to-back dependent FP ops (hazard, then bypass).
    prog_opc[n] = enc(OP_VFPADD, 1, 2, 3, 0); n++;
    prog_opc[n] = enc(OP_VFPMUL, 4, 1, 5, 0); n++;
    prog_opc[n] = enc(OP_MVSR2CSR, 3, 0, 0, 0); prog_din[n] = 32'd100; n++;
    prog_opc[n] = enc(OP_MVCSR2R, 0, 3, 0, 0); n++;
    prog_opc[n] = enc(OP_VFPSUB, 6, 4, 1, 0); n++;
    prog_opc[n] = enc(OP_VFPMAC, 7, 6, 6, 2); n++;
    prog_opc[n] = enc(OP_VFPMAC, 7, 4, 6, 0); n++;
    prog_opc[n] = enc(OP_MVCVEL2R, 0, 7, 0, 5); n++;
    while (n < NPROG) begin
      int k, d, a, b, c;
      k = $urandom_range(99);
      d = $urandom_range(VRMAX - 1); a = $urandom_range(VRMAX - 1);
      b = $urandom_range(VRMAX - 1); c = $urandom_range(15);
      prog_din[n] = '0;
      if (k < 8) begin
        d = $urandom_range(SRMAX - 1);
        prog_opc[n] = enc(OP_MVSR2CSR, d, 0, 0, 0);
        prog_din[n] = (d < 4) ? 32'($urandom_range(1500)) : (d < 6) ? 32'($urandom_range(70)) : rnd_fp(8);
      end
      else if (k < 11) prog_opc[n] = enc(OP_MVSR2VLEN, 0, 4 + $urandom_range(1), 0, 0);
      else if (k < 14) prog_opc[n] = enc(OP_MVCSR2R, 0, $urandom_range(SRMAX - 1), 0, 0);
      else if (k < 18) begin prog_opc[n] = enc(OP_MVSR2CVEL, d, 0, 0, c); prog_din[n] = rnd_fp(8); end
      else if (k < 22) prog_opc[n] = enc(OP_MVCVEL2R, 0, a, 0, c);
      else if (k < 32) prog_opc[n] = enc(OP_VLDU, d, $urandom_range(3), $urandom_range(3), 0);
      else if (k < 40) prog_opc[n] = enc(OP_VSTU, d, $urandom_range(3), $urandom_range(3), 0);
      else if (k < 44) prog_opc[n] = enc(OP_VPERM, d, a, b, c);
      else if (k < 48) prog_opc[n] = enc(OP_VSPLAT, d, 6 + $urandom_range(1), 0, 0);
      else if (k < 62) prog_opc[n] = enc(OP_VFPADD, d, a, b, 0);
      else if (k < 72) prog_opc[n] = enc(OP_VFPSUB, d, a, b, 0);
      else if (k < 84) prog_opc[n] = enc(OP_VFPMUL, d, a, b, 0);
      else             prog_opc[n] = enc(OP_VFPMAC, d, a, b, $urandom_range(3));
      n++;
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: pc=%0d", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  initial begin
    hold_rand = 0;
    din_q = '0;
    // Memory below 4 KiB holds normal single-precision numbers.
    for (int i = 0; i < 1024; i++) mem.mem[i] = rnd_fp(8);
    for (int i = 0; i < WORDS; i++) shadow[i] = mem.mem[i];
    for (int r = 0; r < VRMAX; r++)
      for (int i = 0; i < VLMAX; i++) m_vr[r][i] = 32'hFFFF_FFFF;  // replaced after reset
    gen_program();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // The register file is not reset: the model starts from its contents.
    for (int r = 0; r < VRMAX; r++)
      for (int i = 0; i < VLMAX; i++) m_vr[r][i] = dut.u_vrf.mem[r][32*i +: 32];
    for (int i = 0; i < SRMAX; i++) m_sr[i] = '0;
    for (int i = 0; i < VLMAX; i++) begin m_acc[0][i] = '0; m_acc[1][i] = '0; end
    m_vlen = NB;
    wait (pc == NPROG);
    // Drain the pipeline and the write buffer.
    repeat (10) @(posedge clk);
    wait (!dut.u_mem.busy && dut.u_mem.wb_empty && dut.u_mem.u_bus.mode == 0 && !mem.dp);
    repeat (5) @(posedge clk);
    for (int r = 0; r < VRMAX; r++)
      for (int i = 0; i < VLMAX; i++)
        check(dut.u_vrf.mem[r][32*i +: 32] === m_vr[r][i],
              $sformatf("VR%0d[%0d] = %h expected %h", r, i, dut.u_vrf.mem[r][32*i +: 32], m_vr[r][i]));
    for (int i = 0; i < SRMAX; i++) check(dut.u_srf.r[i] === m_sr[i], $sformatf("SR%0d", i));
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < VLMAX; i++)
        check(dut.u_acc.acc[s][32*i +: 32] === m_acc[s][i], $sformatf("VACC%0d[%0d]", s, i));
    check(int'(dut.vlen_q) == m_vlen, "VLEN");
    for (int i = 0; i < WORDS; i++)
      check(mem.mem[i] === shadow[i], $sformatf("mem[%0d] = %h expected %h", i, mem.mem[i], shadow[i]));
    check(exp_dout.size() == 0, "all dout values returned");
    check(mem.proto_errors == 0, "AHB ownership");
    $display("cycles=%0d instructions=%0d", cycle, NPROG);
    $display("hazard=%0d vbypass=%0d sbypass=%0d memhold=%0d fill=%0d twoline=%0d loadhit=%0d push=%0d wbfull=%0d",
             n_hazard, n_vbypass, n_sbypass, n_memhold, n_fill, n_twoline, n_loadhit, n_push, n_wbfull);
    $display("cpufreeze=%0d vlenmask=%0d macclr=%0d macacc=%0d perm=%0d splat=%0d elem=%0d dout=%0d loads=%0d stores=%0d grantdrops=%0d bursts=%0d",
             n_cpufreeze, n_vlenmask, n_macclr, n_macacc, n_perm, n_splat, n_elem, n_dout, n_load, n_store,
             mem.grant_drops, mem.bursts);
    check(n_hazard > 0, "hazard stall seen");
    check(n_vbypass > 0, "vector bypass seen");
    check(n_sbypass > 0, "scalar bypass seen");
    check(n_memhold > 0, "memory hold seen");
    check(n_fill > 0, "cache fill seen");
    check(n_twoline > 0, "two-line unaligned load seen");
    check(n_push > 0, "write-buffer push seen");
    check(n_wbfull > 0, "write buffer full seen");
    check(n_cpufreeze > 0, "CPU freeze seen");
    check(n_vlenmask > 0, "VLEN masking seen");
    check(n_macclr > 0 && n_macacc > 0, "accumulate seen");
    check(n_perm > 0 && n_splat > 0 && n_elem > 0 && n_dout > 0, "permute/splat/moves seen");
    check(mem.grant_drops > 0, "bus grant lost seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
