// vacc: the two vector accumulators VACC0 and VACC1.
//
// Each holds VLMAX single-precision elements. One accumulator is read
// combinationally (rsel) by the second FP stage of the lanes during a
// multiply-accumulate; the updated elements are written back on the same
// clock edge that ends that stage (we per element, wsel), so back-to-back
// accumulations need no bypass. Synchronous active-low reset to +0.0.
// The two accumulators of VLMAX elements belong to the programmer's model;
// the read/write timing and the reset are this design's choices.
module vacc #(
  parameter int VLMAX = 16,
  localparam int VW = 32 * VLMAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rsel,
  output logic [VW-1:0]    q,
  input  logic [VLMAX-1:0] we,
  input  logic             wsel,
  input  logic [VW-1:0]    wd
);
  logic [VW-1:0] acc [2];

  assign q = acc[rsel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc[0] <= '0;
      acc[1] <= '0;
    end else begin
      for (int i = 0; i < VLMAX; i++)
        if (we[i]) acc[wsel][32*i +: 32] <= wd[32*i +: 32];
    end
  end
endmodule
