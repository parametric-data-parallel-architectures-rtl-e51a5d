// vrf: vector register file of the coprocessor.
//
// VRMAX registers of VLMAX 32-bit elements. Three combinational read ports
// serve the decode stage (two FP sources, plus the permute control vector or
// the store data); one write port writes on the rising clock edge with one
// enable per byte, so that VLEN masking, which counts bytes, and single
// element moves use the same port. The register count and element count are
// the programmer's-model parameters; the third read port and byte enables
// are this design's choices. Enable bit j is vector byte j in memory order:
// element j/4, bits [31-8*(j%4) -: 8] (big-endian). The array is not reset.
module vrf #(
  parameter int VRMAX = 16,
  parameter int VLMAX = 16,
  localparam int AW = $clog2(VRMAX),
  localparam int VW = 32 * VLMAX
) (
  input  logic              clk,
  input  logic [AW-1:0]     ra,
  input  logic [AW-1:0]     rb,
  input  logic [AW-1:0]     rc,
  output logic [VW-1:0]     qa,
  output logic [VW-1:0]     qb,
  output logic [VW-1:0]     qc,
  input  logic [4*VLMAX-1:0] we_b,
  input  logic [AW-1:0]     wa,
  input  logic [VW-1:0]     wd
);
  logic [VW-1:0] mem [VRMAX];

  assign qa = mem[ra];
  assign qb = mem[rb];
  assign qc = mem[rc];

  always_ff @(posedge clk) begin
    for (int j = 0; j < 4 * VLMAX; j++)
      if (we_b[j]) mem[wa][32*(j/4) + 31 - 8*(j%4) -: 8] <= wd[32*(j/4) + 31 - 8*(j%4) -: 8];
  end
endmodule
