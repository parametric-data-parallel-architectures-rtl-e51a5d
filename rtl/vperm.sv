// vperm: three-operand byte permute.
//
// The two data vectors va and vb are viewed as one table of 8*VLMAX bytes
// in memory order (va's bytes first, big-endian within each element). Byte
// j of the result is the table byte indexed by byte j of the control vector
// vc, modulo the table size. Splats, element moves, byte and halfword
// shuffles and rotations all reduce to this operation. Combinational. The
// byte granularity and the index rule are this design's reading of the
// "generalised permute" of the instruction set.
module vperm #(
  parameter int VLMAX = 16,
  localparam int VW = 32 * VLMAX,
  localparam int NB = 4 * VLMAX,
  localparam int IW = $clog2(2 * NB)
) (
  input  logic [VW-1:0] va,
  input  logic [VW-1:0] vb,
  input  logic [VW-1:0] vc,
  output logic [VW-1:0] y
);
  logic [7:0] tbl [2*NB];
  logic [7:0] ctl [NB];
  logic [7:0] res [NB];

  always_comb begin
    for (int j = 0; j < NB; j++) begin
      tbl[j]      = va[32*(j/4) + 31 - 8*(j%4) -: 8];
      tbl[NB + j] = vb[32*(j/4) + 31 - 8*(j%4) -: 8];
      ctl[j]      = vc[32*(j/4) + 31 - 8*(j%4) -: 8];
    end
    for (int j = 0; j < NB; j++)
      res[j] = tbl[ctl[j][IW-1:0]];
    for (int j = 0; j < NB; j++)
      y[32*(j/4) + 31 - 8*(j%4) -: 8] = res[j];
  end
endmodule
