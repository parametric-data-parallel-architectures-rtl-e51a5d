// srf: scalar register file of the coprocessor.
//
// SRMAX 32-bit registers used for address computation (base + index), for
// immediates passed from the RISC CPU and as the source of splats. Two
// combinational read ports, one write port on the rising edge, synchronous
// active-low reset to zero (the reset is this design's choice).
module srf #(
  parameter int SRMAX = 8,
  localparam int AW = $clog2(SRMAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [31:0]   qa,
  output logic [31:0]   qb,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd
);
  logic [31:0] r [SRMAX];

  assign qa = r[ra];
  assign qb = r[rb];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < SRMAX; i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end
endmodule
