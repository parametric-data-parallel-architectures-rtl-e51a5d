// vlane: one element lane of the vector datapath.
//
// Three register stages follow decode. At the end of decode the resolved
// operands (after register read and bypass) are clocked into the lane's
// input registers. Stage E runs the first FP execute stage: the multiplier,
// or a pass-through of operand a. Stage M runs the second: the adder with
// operand b (add or subtract), the adder with the accumulator element
// (multiply-accumulate) or a pass-through. The stage-M value is clocked into
// the intermediate result register (stage W), from which the coprocessor
// commits it to the register file one cycle later. `m_y` is the stage-M
// value, used to update the accumulator at the end of M. All registers move
// only when `en` is high (pipeline not held). The two-stage split and the
// result register follow the accelerator's pipeline; which operation sits in
// which stage is this design's choice.
module vlane (
  input  logic             clk,
  input  logic             en,
  input  vcop_pkg::s1_e    s1_d,
  input  vcop_pkg::s2_e    s2_d,
  input  logic [31:0]      a_d,
  input  logic [31:0]      b_d,
  input  logic [31:0]      acc_m,
  output logic [31:0]      m_y,
  output logic [31:0]      res_w
);
  import vcop_pkg::*;

  s1_e         s1_e_q;
  s2_e         s2_e_q, s2_m_q;
  logic [31:0] a_e, b_e, x_m, b_m;
  logic [31:0] mul_y, add_y, s1_y;
  logic        add_sub;
  logic [31:0] add_a, add_b;

  fp_mul u_mul (.a(a_e), .b(b_e), .y(mul_y));
  assign s1_y = (s1_e_q == S1_MUL) ? mul_y : a_e;

  always_comb begin
    add_a   = x_m;
    add_b   = b_m;
    add_sub = (s2_m_q == S2_SUB_B);
    if (s2_m_q == S2_ADD_ACC) begin
      add_a = acc_m;
      add_b = x_m;
    end
  end
  fp_add u_add (.a(add_a), .b(add_b), .sub(add_sub), .y(add_y));
  assign m_y = (s2_m_q == S2_PASS) ? x_m : add_y;

  always_ff @(posedge clk) begin
    if (en) begin
      a_e    <= a_d;
      b_e    <= b_d;
      s1_e_q <= s1_d;
      s2_e_q <= s2_d;
      x_m    <= s1_y;
      b_m    <= b_e;
      s2_m_q <= s2_e_q;
      res_w  <= m_y;
    end
  end
endmodule
