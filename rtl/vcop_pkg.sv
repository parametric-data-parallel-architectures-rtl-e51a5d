// vcop_pkg: types and constants shared by the vector coprocessor.
//
// The coprocessor opcode is 20 bits wide, as carried on the channel from the
// RISC CPU. Its field layout is this design's own choice:
//   [19:16] operation (vop_e), [15:12] destination d, [11:8] source a,
//   [7:4] source b, [3:0] source c / accumulator select / element index.
// Vectors are packed with element i in bits [32*i+31 : 32*i]. Memory byte
// order is big-endian within a 32-bit word, as on the Sparc V8 host: byte
// 4*i+k of a vector is element i, bits [31-8*k -: 8].
package vcop_pkg;

  typedef enum logic [3:0] {
    OP_MVSR2VLEN = 4'd0,   // VLEN <- SR[a]
    OP_MVSR2CSR  = 4'd1,   // SR[d] <- din (RISC register)
    OP_MVCSR2R   = 4'd2,   // dout <- SR[a]
    OP_MVSR2CVEL = 4'd3,   // VR[d].elem[c] <- din
    OP_MVCVEL2R  = 4'd4,   // dout <- VR[a].elem[c]
    OP_VLDU      = 4'd5,   // VR[d] <- mem[SR[a]+SR[b]] under VLEN
    OP_VSTU      = 4'd6,   // mem[SR[a]+SR[b]] <- VR[d] under VLEN
    OP_VPERM     = 4'd7,   // VR[d] <- perm(VR[a], VR[b], VR[c])
    OP_VSPLAT    = 4'd8,   // VR[d] <- all elements SR[a]
    OP_VFPADD    = 4'd9,   // VR[d] <- VR[a] + VR[b]
    OP_VFPSUB    = 4'd10,  // VR[d] <- VR[a] - VR[b]
    OP_VFPMUL    = 4'd11,  // VR[d] <- VR[a] * VR[b]
    OP_VFPMAC    = 4'd12   // VACC[c0] <- (c1 ? 0 : VACC[c0]) + VR[a]*VR[b]; VR[d] <- same
  } vop_e;

  // Stage-1 (multiplier) and stage-2 (adder) operation of a lane.
  typedef enum logic [1:0] {S1_PASS_A, S1_MUL} s1_e;
  typedef enum logic [1:0] {S2_PASS, S2_ADD_B, S2_SUB_B, S2_ADD_ACC} s2_e;

  // Where the write-back value of an instruction comes from.
  typedef enum logic [1:0] {WB_LANE, WB_ELEM, WB_LOAD} wsrc_e;

  typedef struct packed {
    logic        valid;      // a recognised opcode
    vop_e        op;
    logic [3:0]  d, a, b, c;
    logic        vwrite;     // writes VR[d] (at the end of stage W)
    logic        reads_va;   // reads VR[a]
    logic        reads_vb;   // reads VR[b]
    logic        reads_vc;   // reads VR[c]
    logic        reads_vd;   // reads VR[d] (store data)
    logic        is_mem;     // VLDU / VSTU
    logic        is_store;
    logic        to_risc;    // result goes to the RISC CPU on dout
    logic        from_risc;  // takes din one cycle later
    s1_e         s1;
    s2_e         s2;
    wsrc_e       wsrc;
    logic        acc_write;
    logic        sr_write;   // writes SR[d] (from din)
    logic        vlen_mask;  // element/byte mask from VLEN applies
  } ctl_t;


  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  // Byte k of word w, big-endian.
  function automatic logic [7:0] be_byte(input logic [31:0] w, input int k);
    return w[31-8*k -: 8];
  endfunction

endpackage
