// tb_vdecode: every operation code with random register fields; the
// expected control fields are written out per instruction here.
module tb_vdecode;
  import vcop_pkg::*;
  logic [19:0] opc;
  ctl_t ctl;
  int checks = 0, failures = 0;

  vdecode dut (.*);

  task automatic expect_ctl(input string name, input bit valid, input bit vwrite, input bit ra, input bit rb,
                            input bit rc, input bit rd, input bit mem, input bit st, input bit tor,
                            input bit fromr, input s1_e s1, input s2_e s2, input wsrc_e ws,
                            input bit accw, input bit srw, input bit vm);
    checks++;
    if (ctl.valid !== valid || (valid && (ctl.vwrite !== vwrite || ctl.reads_va !== ra || ctl.reads_vb !== rb ||
        ctl.reads_vc !== rc || ctl.reads_vd !== rd || ctl.is_mem !== mem || ctl.is_store !== st ||
        ctl.to_risc !== tor || ctl.from_risc !== fromr || ctl.s1 !== s1 || ctl.s2 !== s2 ||
        ctl.wsrc !== ws || ctl.acc_write !== accw || ctl.sr_write !== srw || ctl.vlen_mask !== vm ||
        ctl.d !== opc[15:12] || ctl.a !== opc[11:8] || ctl.b !== opc[7:4] || ctl.c !== opc[3:0]))) begin
      failures++;
      $display("FAIL %s: %p", name, ctl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int op = 0; op < 16; op++) begin
        opc = {4'(op), 16'($urandom)};
        #1;
        case (op)
          0:  expect_ctl("MVSR2VLEN", 1,0,0,0,0,0,0,0,0,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
          1:  expect_ctl("MVSR2CSR",  1,0,0,0,0,0,0,0,0,1, S1_PASS_A, S2_PASS, WB_LANE, 0,1,0);
          2:  expect_ctl("MVCSR2R",   1,0,0,0,0,0,0,0,1,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
          3:  expect_ctl("MVSR2CVEL", 1,1,0,0,0,0,0,0,0,1, S1_PASS_A, S2_PASS, WB_ELEM, 0,0,0);
          4:  expect_ctl("MVCVEL2R",  1,0,1,0,0,0,0,0,1,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
          5:  expect_ctl("VLDU",      1,1,0,0,0,0,1,0,0,0, S1_PASS_A, S2_PASS, WB_LOAD, 0,0,1);
          6:  expect_ctl("VSTU",      1,0,0,0,0,1,1,1,0,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,1);
          7:  expect_ctl("VPERM",     1,1,1,1,1,0,0,0,0,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
          8:  expect_ctl("VSPLAT",    1,1,0,0,0,0,0,0,0,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
          9:  expect_ctl("VFPADD",    1,1,1,1,0,0,0,0,0,0, S1_PASS_A, S2_ADD_B, WB_LANE, 0,0,1);
          10: expect_ctl("VFPSUB",    1,1,1,1,0,0,0,0,0,0, S1_PASS_A, S2_SUB_B, WB_LANE, 0,0,1);
          11: expect_ctl("VFPMUL",    1,1,1,1,0,0,0,0,0,0, S1_MUL, S2_PASS, WB_LANE, 0,0,1);
          12: expect_ctl("VFPMAC",    1,1,1,1,0,0,0,0,0,0, S1_MUL, S2_ADD_ACC, WB_LANE, 1,0,0);
          default: expect_ctl("undefined", 0,0,0,0,0,0,0,0,0,0, S1_PASS_A, S2_PASS, WB_LANE, 0,0,0);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
