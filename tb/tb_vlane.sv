// tb_vlane: one lane fed with a random stream of pass, add, subtract,
// multiply and accumulate operations; each result must appear in the result
// register exactly three enabled clock edges after its operands, and must
// equal the reference arithmetic. `en` drops at random to hold the lane.
module tb_vlane;
  import vcop_pkg::*;
  import fp_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  s1_e s1_d;
  s2_e s2_d;
  logic [31:0] a_d, b_d, acc_m, m_y, res_w;
  int checks = 0, failures = 0;
  logic [31:0] exp_q [$];
  logic [31:0] accv;

  vlane dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int issued = 0;
  initial begin
    en = 0; accv = rnd_fp(5);
    acc_m = accv;
    for (int t = 0; t < 6000; t++) begin
      int k;
      en = ($urandom_range(9) != 0);
      k = $urandom_range(4);
      a_d = rnd_fp(10); b_d = rnd_fp(10);
      case (k)
        0: begin s1_d = S1_PASS_A; s2_d = S2_PASS; end
        1: begin s1_d = S1_PASS_A; s2_d = S2_ADD_B; end
        2: begin s1_d = S1_PASS_A; s2_d = S2_SUB_B; end
        3: begin s1_d = S1_MUL;    s2_d = S2_PASS; end
        default: begin s1_d = S1_MUL; s2_d = S2_ADD_ACC; end
      endcase
      @(posedge clk);
      if (en) begin
        case (k)
          0: exp_q.push_back(a_d);
          1: exp_q.push_back(ref_add(a_d, b_d));
          2: exp_q.push_back(ref_add(a_d, {~b_d[31], b_d[30:0]}));
          3: exp_q.push_back(ref_mul(a_d, b_d));
          default: exp_q.push_back(ref_add(accv, ref_mul(a_d, b_d)));
        endcase
        issued++;
        // The result of the operation issued three enabled edges ago is now
        // in the result register.
        if (exp_q.size() == 3) begin
          logic [31:0] e;
          e = exp_q.pop_front();
          #1;
          checks++;
          if (res_w !== e) begin
            failures++;
            if (failures < 5) $display("FAIL t=%0d res=%h expected %h", t, res_w, e);
          end
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
