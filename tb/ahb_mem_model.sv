// ahb_mem_model: behavioural AHB slave memory and single-master arbiter for
// the testbenches (it stands in for the SDRAM controller, the SDRAM and the
// bus arbiter of the real system).
//
// WORDS 32-bit words of big-endian memory at address 0, initialised with
// init_word(i). Address phases are taken at rising edges with HREADY high;
// each data phase gets a random number of wait states (0..MAXWAIT). Byte,
// halfword and word writes update only the addressed bytes. HGRANT follows
// HBUSREQ, dropping at random (DROP_PCT percent of cycles) to exercise a
// master that loses the bus. `proto_errors` counts address phases driven by
// the master while it did not own the bus. `mem` is read and written by
// testbenches directly (hierarchically) for checking.
module ahb_mem_model #(
  parameter int WORDS    = 4096,
  parameter int MAXWAIT  = 2,
  parameter int DROP_PCT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        HBUSREQ,
  output logic        HGRANT,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP
);
  logic [31:0] mem [WORDS];
  int proto_errors = 0;
  int bursts = 0, writes = 0, grant_drops = 0;

  function automatic logic [31:0] init_word(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h5A5A_0F0F;
  endfunction

  initial for (int i = 0; i < WORDS; i++) mem[i] = init_word(i);

  logic        dp, dp_w;
  logic [31:0] dp_a;
  logic [2:0]  dp_sz;
  int          waitc;
  logic        owner;

  assign HREADY = !(dp && waitc > 0);
  assign HRESP  = 2'b00;
  assign HRDATA = dp ? mem[(dp_a >> 2) % WORDS] : 32'hDEAD_BEEF;

  always @(posedge clk) begin
    if (!rst_n) begin
      dp <= 0; waitc <= 0; HGRANT <= 0; owner <= 0;
    end else begin
      if (HBUSREQ && ($urandom_range(99) >= DROP_PCT)) HGRANT <= 1'b1;
      else begin
        if (HGRANT && HBUSREQ) grant_drops <= grant_drops + 1;
        HGRANT <= 1'b0;
      end
      if (dp && waitc > 0) begin
        waitc <= waitc - 1;
      end else begin
        if (HREADY) owner <= HGRANT;
        if (dp && dp_w) begin
          for (int k = 0; k < 4; k++)
            if ((dp_sz == 3'b010) || (dp_sz == 3'b001 && (k / 2) == int'(dp_a[1])) ||
                (dp_sz == 3'b000 && k == int'(dp_a[1:0])))
              mem[(dp_a >> 2) % WORDS][31 - 8*k -: 8] <= HWDATA[31 - 8*k -: 8];
        end
        dp <= 1'b0;
        if (HTRANS[1]) begin
          if (!owner) proto_errors <= proto_errors + 1;
          dp    <= 1'b1;
          dp_a  <= HADDR;
          dp_w  <= HWRITE;
          dp_sz <= HSIZE;
          waitc <= int'($urandom_range(MAXWAIT));
          if (HWRITE) writes <= writes + 1;
          if (HTRANS == 2'b10 && HBURST == 3'b001) bursts <= bursts + 1;
        end
      end
    end
  end
endmodule
