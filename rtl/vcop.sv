// vcop: parametric vector coprocessor for TLM (transmission-line matrix)
// field solvers, attached to a RISC CPU through a coprocessor channel and to
// the on-chip AHB bus through its own memory pipe.
//
// Programmer's model: VRMAX vector registers of VLMAX single-precision
// elements, SRMAX 32-bit scalar registers, two vector accumulators and a
// 10-bit vector length register VLEN counting bytes. The instruction set
// (opcode layout in vcop_pkg) moves scalars between the CPU and the
// coprocessor, sets VLEN, loads and stores vectors at any byte address under
// VLEN, permutes bytes, splats a scalar, and adds, subtracts, multiplies
// and multiply-accumulates vectors element by element.
//
// Pipeline, in lockstep with the CPU:
//   D  the opcode is on the channel: decode, register-file reads, bypass,
//      VLEN masks, permute/splat; a memory address SR[a]+SR[b] is formed.
//   E  first FP stage (multiply); a load or store runs in the memory pipe
//      and holds the whole pipeline until it completes; din (a value from
//      the CPU, one cycle after its opcode) is written to SR or carried on.
//   M  second FP stage (add, accumulate); accumulators are updated at its
//      end; a value for the CPU is on cop_dout.
//   W  intermediate result register; VR[d] is written at its end, bytes
//      selected by the instruction's byte mask.
// Hazards: an instruction in D that reads a vector register still being
// produced in E or M waits in D (cop_holdn low, a bubble enters E); a value
// in W is bypassed to D. SR values written from din in E are bypassed to D.
// cop_holdn_in low (the CPU stalled for its own reasons) freezes every stage.
// The channel signal names, the two FP stages, the result register and the
// AHB memory pipe follow the accelerator's description; encodings, hazard
// handling and channel timing details are this design's choices.
module vcop #(
  parameter int VLMAX    = 16,
  parameter int VRMAX    = 16,
  parameter int SRMAX    = 8,
  parameter int NLINES   = 64,
  parameter int WB_DEPTH = 8,
  parameter bit COP_ID   = 1'b0,
  localparam int VW = 32 * VLMAX,
  localparam int NB = 4 * VLMAX,
  localparam int LW = $clog2(NB + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // coprocessor channel from the CPU (cop_in)
  input  logic        cop_valid,
  input  logic        cop_no,
  input  logic        cop_holdn_in,
  input  logic [19:0] cop_opc,
  input  logic [31:0] cop_din,
  // coprocessor channel to the CPU (cop_out)
  output logic [31:0] cop_dout,
  output logic        cop_holdn,
  // AHB master port
  output logic        HBUSREQ,
  input  logic        HGRANT,
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [2:0]  HSIZE,
  output logic [2:0]  HBURST,
  output logic [31:0] HWDATA,
  input  logic [31:0] HRDATA,
  input  logic        HREADY,
  input  logic [1:0]  HRESP
);
  import vcop_pkg::*;

  localparam int RAW = $clog2(VRMAX);
  localparam int SAW = $clog2(SRMAX);
  localparam int EIW = (VLMAX > 1) ? $clog2(VLMAX) : 1;

  // ---------------------------------------------------------------- D stage
  ctl_t ctl_d;
  logic valid_d;
  vdecode u_dec (.opc(cop_opc), .ctl(ctl_d));
  assign valid_d = cop_valid && (cop_no == COP_ID) && ctl_d.valid;

  // Pipeline registers.
  logic          e_valid, m_valid, w_valid;
  ctl_t          e_ctl, m_ctl, w_ctl;
  logic [NB-1:0] e_be, m_be, w_be;
  logic [31:0]   e_dout, m_dout;
  logic [31:0]   e_addr;
  logic [LW-1:0] e_vlen;
  logic [VW-1:0] e_sdata;
  logic [31:0]   m_din, w_din;
  logic [VW-1:0] m_ld, w_ld;
  logic [9:0]    vlen_q;

  // Stall conditions.
  logic hazard, hold_mem, back_adv, d_adv;

  // Register files.
  logic [VW-1:0] vq_a, vq_b, vq_c;
  logic [31:0]   sq_a, sq_b;
  logic [NB-1:0] vrf_we;
  logic [VW-1:0] w_data;
  logic          sr_we;

  vrf #(.VRMAX(VRMAX), .VLMAX(VLMAX)) u_vrf (
    .clk, .ra(ctl_d.a[RAW-1:0]), .rb(ctl_d.b[RAW-1:0]),
    .rc(ctl_d.reads_vd ? ctl_d.d[RAW-1:0] : ctl_d.c[RAW-1:0]),
    .qa(vq_a), .qb(vq_b), .qc(vq_c),
    .we_b(vrf_we), .wa(w_ctl.d[RAW-1:0]), .wd(w_data));

  srf #(.SRMAX(SRMAX)) u_srf (
    .clk, .rst_n, .ra(ctl_d.a[SAW-1:0]), .rb(ctl_d.b[SAW-1:0]), .qa(sq_a), .qb(sq_b),
    .we(sr_we), .wa(e_ctl.d[SAW-1:0]), .wd(cop_din));

  // Vector bypass from W (merged under W's byte mask).
  function automatic logic [VW-1:0] merge(input logic [VW-1:0] q, input logic [VW-1:0] w,
                                          input logic [NB-1:0] be);
    logic [VW-1:0] r;
    for (int j = 0; j < NB; j++)
      r[32*(j/4) + 31 - 8*(j%4) -: 8] = be[j] ? w[32*(j/4) + 31 - 8*(j%4) -: 8]
                                              : q[32*(j/4) + 31 - 8*(j%4) -: 8];
    return r;
  endfunction

  logic          w_writes;
  logic          byp_a, byp_b, byp_c;
  logic [3:0]    rc_idx;
  logic [VW-1:0] va, vb, vc;
  assign w_writes = w_valid && w_ctl.vwrite;
  assign rc_idx   = ctl_d.reads_vd ? ctl_d.d : ctl_d.c;
  assign byp_a    = w_writes && (w_ctl.d == ctl_d.a);
  assign byp_b    = w_writes && (w_ctl.d == ctl_d.b);
  assign byp_c    = w_writes && (w_ctl.d == rc_idx);
  assign va = byp_a ? merge(vq_a, w_data, w_be) : vq_a;
  assign vb = byp_b ? merge(vq_b, w_data, w_be) : vq_b;
  assign vc = byp_c ? merge(vq_c, w_data, w_be) : vq_c;

  // Scalar bypass of din being written in E.
  logic        sbyp_a, sbyp_b;
  logic [31:0] sa, sb;
  assign sbyp_a = e_valid && e_ctl.sr_write && (e_ctl.d[SAW-1:0] == ctl_d.a[SAW-1:0]);
  assign sbyp_b = e_valid && e_ctl.sr_write && (e_ctl.d[SAW-1:0] == ctl_d.b[SAW-1:0]);
  assign sa = sbyp_a ? cop_din : sq_a;
  assign sb = sbyp_b ? cop_din : sq_b;

  // Hazard: a vector source still in flight in E or M.
  function automatic logic pending(input logic v, input ctl_t c, input logic [3:0] r);
    return v && c.vwrite && (c.d == r);
  endfunction
  always_comb begin
    hazard = 1'b0;
    if (valid_d) begin
      if (ctl_d.reads_va && (pending(e_valid, e_ctl, ctl_d.a) || pending(m_valid, m_ctl, ctl_d.a))) hazard = 1'b1;
      if (ctl_d.reads_vb && (pending(e_valid, e_ctl, ctl_d.b) || pending(m_valid, m_ctl, ctl_d.b))) hazard = 1'b1;
      if ((ctl_d.reads_vc || ctl_d.reads_vd) &&
          (pending(e_valid, e_ctl, rc_idx) || pending(m_valid, m_ctl, rc_idx))) hazard = 1'b1;
    end
  end

  // VLEN masks. Effective length saturates at the vector size.
  logic [LW-1:0] vlen_eff;
  logic [NB-1:0] be_d;
  assign vlen_eff = (32'(vlen_q) > NB) ? LW'(NB) : LW'(vlen_q);
  always_comb begin
    be_d = '1;
    if (ctl_d.vlen_mask && !ctl_d.is_mem)
      for (int i = 0; i < VLMAX; i++) be_d[4*i +: 4] = {4{(4*i + 4) <= 32'(vlen_eff)}};
    if (ctl_d.op == OP_MVSR2CVEL) begin
      be_d = '0;
      be_d[4*EIW'(ctl_d.c) +: 4] = 4'hF;
    end
  end

  // Permute and lane operands.
  logic [VW-1:0] perm_y, lane_a;
  vperm #(.VLMAX(VLMAX)) u_perm (.va(va), .vb(vb), .vc(vc), .y(perm_y));
  always_comb begin
    case (ctl_d.op)
      OP_VPERM:  lane_a = perm_y;
      OP_VSPLAT: lane_a = {VLMAX{sa}};
      default:   lane_a = va;
    endcase
  end

  // Value for the CPU.
  logic [31:0] dout_d;
  assign dout_d = (ctl_d.op == OP_MVCVEL2R) ? va[32*EIW'(ctl_d.c) +: 32] : sa;

  // ------------------------------------------------------------ lanes, M, W
  logic [VW-1:0] acc_q, acc_in, m_y, res_w;
  logic [VLMAX-1:0] acc_we;
  for (genvar i = 0; i < VLMAX; i++) begin : g_lane
    vlane u_lane (
      .clk, .en(back_adv), .s1_d(ctl_d.s1), .s2_d(ctl_d.s2),
      .a_d(lane_a[32*i +: 32]), .b_d(vb[32*i +: 32]),
      .acc_m(acc_in[32*i +: 32]), .m_y(m_y[32*i +: 32]), .res_w(res_w[32*i +: 32]));
    assign acc_we[i] = back_adv && m_valid && m_ctl.acc_write && m_be[4*i];
  end

  vacc #(.VLMAX(VLMAX)) u_acc (
    .clk, .rst_n, .rsel(m_ctl.c[0]), .q(acc_q), .we(acc_we), .wsel(m_ctl.c[0]), .wd(m_y));
  assign acc_in = m_ctl.c[1] ? '0 : acc_q;

  always_comb begin
    case (w_ctl.wsrc)
      WB_ELEM: w_data = {VLMAX{w_din}};
      WB_LOAD: w_data = w_ld;
      default: w_data = res_w;
    endcase
  end
  assign vrf_we = (back_adv && w_writes) ? w_be : '0;

  // ------------------------------------------------------------ memory pipe
  logic          mem_issued, mem_fin, mem_req, mem_busy, mem_done;
  logic [VW-1:0] mem_rdata;
  logic [NB-1:0] mem_rbe;
  logic          mem_fill_busy, mem_wb_full;
  assign mem_req  = e_valid && e_ctl.is_mem && !mem_issued && !mem_busy;
  assign hold_mem = e_valid && e_ctl.is_mem && !(mem_done || mem_fin);

  vmem #(.VLMAX(VLMAX), .NLINES(NLINES), .WB_DEPTH(WB_DEPTH)) u_mem (
    .clk, .rst_n, .req(mem_req), .is_store(e_ctl.is_store), .addr(e_addr), .vlen(e_vlen),
    .wdata(e_sdata), .busy(mem_busy), .done(mem_done), .rdata(mem_rdata), .rbe(mem_rbe),
    .fill_busy(mem_fill_busy), .wb_full(mem_wb_full),
    .HBUSREQ, .HGRANT, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST, .HWDATA,
    .HRDATA, .HREADY, .HRESP);

  // ------------------------------------------------------------ control
  assign back_adv  = cop_holdn_in && !hold_mem;
  assign d_adv     = back_adv && !hazard;
  assign cop_holdn = !(hazard || hold_mem);
  assign sr_we     = back_adv && e_valid && e_ctl.sr_write;
  assign cop_dout  = m_dout;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_valid <= 1'b0; m_valid <= 1'b0; w_valid <= 1'b0;
      e_ctl <= '0; m_ctl <= '0; w_ctl <= '0;
      vlen_q <= 10'(NB);
      mem_issued <= 1'b0; mem_fin <= 1'b0;
      m_dout <= '0;
    end else begin
      if (mem_req) mem_issued <= 1'b1;
      if (mem_done) mem_fin <= 1'b1;
      if (back_adv) begin
        mem_issued <= 1'b0;
        mem_fin    <= 1'b0;
        // D -> E
        e_valid <= d_adv && valid_d;
        e_ctl   <= ctl_d;
        e_be    <= be_d;
        e_dout  <= dout_d;
        e_addr  <= sa + sb;
        e_vlen  <= vlen_eff;
        e_sdata <= vc;
        if (d_adv && valid_d && ctl_d.op == OP_MVSR2VLEN) vlen_q <= sa[9:0];
        // E -> M
        m_valid <= e_valid;
        m_ctl   <= e_ctl;
        m_be    <= (e_ctl.is_mem && !e_ctl.is_store) ? mem_rbe : e_be;
        m_dout  <= e_dout;
        m_din   <= cop_din;
        m_ld    <= mem_rdata;
        // M -> W
        w_valid <= m_valid;
        w_ctl   <= m_ctl;
        w_be    <= m_be;
        w_din   <= m_din;
        w_ld    <= m_ld;
      end
    end
  end

  // The memory pipe is only asked when idle.
  a_mem_idle: assert property (@(posedge clk) disable iff (!rst_n) mem_req |-> !mem_busy);
endmodule
