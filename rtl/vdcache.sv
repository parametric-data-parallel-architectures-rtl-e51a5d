// vdcache: vector data cache of the coprocessor's memory pipe.
//
// Direct-mapped, NLINES lines of one vector each (VLMAX 32-bit words,
// 4*VLMAX bytes), split into an even-line and an odd-line bank. An
// unaligned vector access touches at most two consecutive lines, one in
// each bank, so both are looked up in the same cycle: `addr` names the
// first line, the second is the next line. Lookups are combinational.
// A line fill writes data, tag and valid bit of one line. A store updates
// the bytes of one word if its line is present (write-through cache without
// write-allocate; the memory copy is written through the write buffer).
// Synchronous active-low reset invalidates all lines. Organisation, size and
// write policy are this design's choices.
module vdcache #(
  parameter int VLMAX  = 16,
  parameter int NLINES = 64,
  localparam int VW  = 32 * VLMAX,
  localparam int LOB = $clog2(4 * VLMAX),     // byte offset bits in a line
  localparam int HIB = $clog2(NLINES / 2),    // index bits per bank
  localparam int LNW = 32 - LOB               // line-number width
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup of line(addr) and the following line
  input  logic [31:0]      addr,
  output logic             hit0,
  output logic             hit1,
  output logic [VW-1:0]    line0,
  output logic [VW-1:0]    line1,
  // line fill
  input  logic             fill_we,
  input  logic [LNW-1:0]   fill_line,
  input  logic [VW-1:0]    fill_data,
  // store update of one word
  input  logic             st_we,
  input  logic [29:0]      st_waddr,
  input  logic [31:0]      st_data,
  input  logic [3:0]       st_be
);
  localparam int TW = LNW - 1 - HIB;

  logic [VW-1:0] data  [2][NLINES/2];
  logic [TW-1:0] tag   [2][NLINES/2];
  logic          valid [2][NLINES/2];

  logic [LNW-1:0] ln0, ln1, st_ln;
  logic [LOB-3:0] st_wi;

  function automatic logic [HIB-1:0] idx_of(input logic [LNW-1:0] l);
    return l[HIB:1];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [LNW-1:0] l);
    return l[LNW-1:HIB+1];
  endfunction

  assign ln0   = addr[31:LOB];
  assign ln1   = ln0 + 1'b1;
  assign st_ln = st_waddr[29:LOB-2];
  assign st_wi = st_waddr[LOB-3:0];

  assign hit0  = valid[ln0[0]][idx_of(ln0)] && (tag[ln0[0]][idx_of(ln0)] == tag_of(ln0));
  assign hit1  = valid[ln1[0]][idx_of(ln1)] && (tag[ln1[0]][idx_of(ln1)] == tag_of(ln1));
  assign line0 = data[ln0[0]][idx_of(ln0)];
  assign line1 = data[ln1[0]][idx_of(ln1)];

  logic st_hit;
  assign st_hit = valid[st_ln[0]][idx_of(st_ln)] && (tag[st_ln[0]][idx_of(st_ln)] == tag_of(st_ln));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NLINES / 2; i++) valid[b][i] <= 1'b0;
    end else begin
      if (fill_we) begin
        data[fill_line[0]][idx_of(fill_line)]  <= fill_data;
        tag[fill_line[0]][idx_of(fill_line)]   <= tag_of(fill_line);
        valid[fill_line[0]][idx_of(fill_line)] <= 1'b1;
      end else if (st_we && st_hit) begin
        for (int k = 0; k < 4; k++)
          if (st_be[k])
            data[st_ln[0]][idx_of(st_ln)][32*st_wi + 31 - 8*k -: 8] <= st_data[31-8*k -: 8];
      end
    end
  end
endmodule
