// vdecode: coprocessor opcode decoder.
//
// Turns the 20-bit coprocessor opcode (layout in vcop_pkg; the instruction
// list is the accelerator's, the bit encoding this design's) into the control
// fields that travel down the coprocessor's control pipeline: which vector
// registers are read, whether VR[d] is written through the lanes, what the
// two FP stages do, where the write-back value comes from, and whether the
// instruction talks to the RISC CPU or to memory. Unknown operation codes
// decode as no-ops (valid = 0). The VLEN mask applies to the instructions
// the instruction set lists as working "under VLEN": loads, stores, add,
// subtract and multiply. Combinational.
module vdecode (
  input  logic [19:0]          opc,
  output vcop_pkg::ctl_t       ctl
);
  import vcop_pkg::*;

  always_comb begin
    ctl   = '0;
    ctl.d = opc[15:12];
    ctl.a = opc[11:8];
    ctl.b = opc[7:4];
    ctl.c = opc[3:0];
    ctl.op    = vop_e'(opc[19:16]);
    ctl.valid = 1'b1;
    ctl.s1    = S1_PASS_A;
    ctl.s2    = S2_PASS;
    ctl.wsrc  = WB_LANE;
    case (opc[19:16])
      OP_MVSR2VLEN: ;
      OP_MVSR2CSR:  begin ctl.from_risc = 1'b1; ctl.sr_write = 1'b1; end
      OP_MVCSR2R:   ctl.to_risc = 1'b1;
      OP_MVSR2CVEL: begin ctl.from_risc = 1'b1; ctl.vwrite = 1'b1; ctl.wsrc = WB_ELEM; end
      OP_MVCVEL2R:  begin ctl.to_risc = 1'b1; ctl.reads_va = 1'b1; end
      OP_VLDU:      begin ctl.is_mem = 1'b1; ctl.vwrite = 1'b1; ctl.wsrc = WB_LOAD; ctl.vlen_mask = 1'b1; end
      OP_VSTU:      begin ctl.is_mem = 1'b1; ctl.is_store = 1'b1; ctl.reads_vd = 1'b1; ctl.vlen_mask = 1'b1; end
      OP_VPERM:     begin ctl.vwrite = 1'b1; ctl.wsrc = WB_LANE;
                          ctl.reads_va = 1'b1; ctl.reads_vb = 1'b1; ctl.reads_vc = 1'b1; end
      OP_VSPLAT:    begin ctl.vwrite = 1'b1; ctl.wsrc = WB_LANE; end
      OP_VFPADD:    begin ctl.vwrite = 1'b1; ctl.s2 = S2_ADD_B; ctl.vlen_mask = 1'b1; ctl.reads_va = 1'b1; ctl.reads_vb = 1'b1; end
      OP_VFPSUB:    begin ctl.vwrite = 1'b1; ctl.s2 = S2_SUB_B; ctl.vlen_mask = 1'b1; ctl.reads_va = 1'b1; ctl.reads_vb = 1'b1; end
      OP_VFPMUL:    begin ctl.vwrite = 1'b1; ctl.s1 = S1_MUL; ctl.vlen_mask = 1'b1; ctl.reads_va = 1'b1; ctl.reads_vb = 1'b1; end
      OP_VFPMAC:    begin ctl.vwrite = 1'b1; ctl.s1 = S1_MUL; ctl.s2 = S2_ADD_ACC; ctl.acc_write = 1'b1;
                          ctl.reads_va = 1'b1; ctl.reads_vb = 1'b1; end
      default:      ctl.valid = 1'b0;
    endcase
  end
endmodule
