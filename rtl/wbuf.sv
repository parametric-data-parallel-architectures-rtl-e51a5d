// wbuf: write buffer of the vector memory pipe.
//
// A DEPTH-entry FIFO of pending word writes, each a word address, a 32-bit
// word and four byte enables (enable bit k is the byte at address offset k,
// which sits in bits [31-8k -: 8], big-endian). The store path pushes, the AHB bus
// controller pops the head when it has written it. Push when full and pop
// when empty are ignored (and flagged by assertions). Synchronous
// active-low reset empties it. The depth is this design's choice.
module wbuf #(
  parameter int DEPTH = 8,
  localparam int PW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [29:0] push_waddr,
  input  logic [31:0] push_data,
  input  logic [3:0]  push_be,
  input  logic        pop,
  output logic [29:0] head_waddr,
  output logic [31:0] head_data,
  output logic [3:0]  head_be,
  output logic        full,
  output logic        empty
);
  logic [29:0] q_addr [DEPTH];
  logic [31:0] q_data [DEPTH];
  logic [3:0]  q_be   [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [PW:0]   cnt;

  assign full  = (cnt == (PW+1)'(DEPTH));
  assign empty = (cnt == '0);
  assign head_waddr = q_addr[rd];
  assign head_data  = q_data[rd];
  assign head_be    = q_be[rd];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (push && !full) begin
        q_addr[wr] <= push_waddr;
        q_data[wr] <= push_data;
        q_be[wr]   <= push_be;
        wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (pop && !empty)
        rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
