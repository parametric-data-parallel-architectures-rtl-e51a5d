// vmem: memory pipe of the vector coprocessor.
//
// Executes one unaligned vector load (VLDU) or store (VSTU) of `vlen` bytes
// at any byte address. The access touches at most two consecutive cache
// lines; the "window" is those two lines seen as 8*VLMAX bytes, and the
// access starts at byte `off` (the address modulo the line size) of it.
//
// Load: both lines are looked up in the vector cache in one cycle. A missing
// line is filled from memory by the AHB bus controller (first line first);
// a fill waits until the write buffer is empty, so a load always sees
// earlier stores. When both lines are present, byte i of the result is
// window byte off+i, and rbe marks the bytes below vlen, which are the only
// ones written to the destination register.
// Store: the vector's bytes are placed at window bytes off..off+vlen-1, and
// each touched word is pushed, with its byte enables, into the write buffer
// (one word per cycle, waiting while it is full) and merged into the cache
// if its line is present (write-through, no write-allocate).
//
// Handshake: `req` is taken when `busy` is low; `done` pulses one cycle
// with `rdata`/`rbe` valid for a load. A load that hits both lines takes
// two cycles from req to done. The cache/write-buffer/bus-controller
// structure follows the accelerator's memory pipe; sizes, policies and
// timing are this design's choices.
module vmem #(
  parameter int VLMAX    = 16,
  parameter int NLINES   = 64,
  parameter int WB_DEPTH = 8,
  localparam int VW  = 32 * VLMAX,
  localparam int NB  = 4 * VLMAX,
  localparam int LOB = $clog2(NB),
  localparam int LW  = $clog2(NB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          is_store,
  input  logic [31:0]   addr,
  input  logic [LW-1:0] vlen,
  input  logic [VW-1:0] wdata,
  output logic          busy,
  output logic          done,
  output logic [VW-1:0] rdata,
  output logic [NB-1:0] rbe,
  // status for observation
  output logic          fill_busy,
  output logic          wb_full,
  // AHB master port
  output logic          HBUSREQ,
  input  logic          HGRANT,
  output logic [31:0]   HADDR,
  output logic [1:0]    HTRANS,
  output logic          HWRITE,
  output logic [2:0]    HSIZE,
  output logic [2:0]    HBURST,
  output logic [31:0]   HWDATA,
  input  logic [31:0]   HRDATA,
  input  logic          HREADY,
  input  logic [1:0]    HRESP
);
  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_FILL, S_STORE} state_e;
  state_e state;

  logic [31:0]   a_q;
  logic [LW-1:0] vlen_q;
  logic [VW-1:0] wdata_q;
  logic          second;           // the fill in progress is for line 1
  logic [LOB-2:0] wi, wlast;       // window word index (0 .. 2*VLMAX-1)

  logic [LOB-1:0] off;
  logic           need1;
  assign off   = a_q[LOB-1:0];
  assign need1 = (32'(off) + 32'(vlen_q)) > NB;

  // Cache, write buffer, bus controller.
  logic          hit0, hit1;
  logic [VW-1:0] line0, line1;
  logic          fill_we, fill_req, fill_done;
  logic [VW-1:0] fill_data;
  logic [31:0]   fill_addr;
  logic          push, wb_empty, wb_pop;
  logic [29:0]   push_waddr, wb_waddr;
  logic [31:0]   push_data, wb_data;
  logic [3:0]    push_be, wb_be;

  assign fill_addr = {a_q[31:LOB] + (32-LOB)'(second), {LOB{1'b0}}};

  vdcache #(.VLMAX(VLMAX), .NLINES(NLINES)) u_cache (
    .clk, .rst_n, .addr(a_q), .hit0, .hit1, .line0, .line1,
    .fill_we, .fill_line(fill_addr[31:LOB]), .fill_data,
    .st_we(push), .st_waddr(push_waddr), .st_data(push_data), .st_be(push_be));

  wbuf #(.DEPTH(WB_DEPTH)) u_wbuf (
    .clk, .rst_n, .push, .push_waddr, .push_data, .push_be,
    .pop(wb_pop), .head_waddr(wb_waddr), .head_data(wb_data), .head_be(wb_be),
    .full(wb_full), .empty(wb_empty));

  ahb_master #(.VLMAX(VLMAX)) u_bus (
    .clk, .rst_n, .wb_empty, .wb_waddr, .wb_data, .wb_be, .wb_pop,
    .fill_req, .fill_addr, .fill_done, .fill_data,
    .HBUSREQ, .HGRANT, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST, .HWDATA,
    .HRDATA, .HREADY, .HRESP);

  // Load data: rotate the two-line window by `off`.
  logic [7:0]    win [2*NB];
  logic [VW-1:0] ld_data;
  logic [NB-1:0] ld_be;
  always_comb begin
    for (int m = 0; m < NB; m++) begin
      win[m]      = line0[32*(m/4) + 31 - 8*(m%4) -: 8];
      win[NB + m] = line1[32*(m/4) + 31 - 8*(m%4) -: 8];
    end
    for (int i = 0; i < NB; i++) begin
      ld_data[32*(i/4) + 31 - 8*(i%4) -: 8] = win[32'(off) + i];
      ld_be[i] = (i < 32'(vlen_q));
    end
  end

  // Store data: place the vector at window bytes off .. off+vlen-1.
  logic [7:0]    swin [2*NB];
  logic          sbe  [2*NB];
  always_comb begin
    for (int m = 0; m < 2 * NB; m++) begin
      swin[m] = 8'd0;
      sbe[m]  = 1'b0;
      if (m >= 32'(off) && m < 32'(off) + 32'(vlen_q)) begin
        swin[m] = wdata_q[32*((m - 32'(off))/4) + 31 - 8*((m - 32'(off))%4) -: 8];
        sbe[m]  = 1'b1;
      end
    end
    for (int k = 0; k < 4; k++) begin
      push_data[31-8*k -: 8] = swin[4*32'(wi) + k];
      push_be[k]             = sbe[4*32'(wi) + k];
    end
    push_waddr = {a_q[31:LOB], {(LOB-2){1'b0}}} + 30'(wi);
  end

  assign push      = (state == S_STORE) && !wb_full;
  assign fill_req  = (state == S_FILL) && !fill_done && wb_empty;
  assign fill_we   = (state == S_FILL) && fill_done;
  assign busy      = (state != S_IDLE);
  assign fill_busy = (state == S_FILL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      second <= 1'b0;
      wi     <= '0;
      wlast  <= '0;
      a_q    <= '0;
      vlen_q <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (req) begin
          a_q     <= addr;
          vlen_q  <= (vlen > LW'(NB)) ? LW'(NB) : vlen;
          wdata_q <= wdata;
          wi      <= (LOB-1)'(addr[LOB-1:2]);
          wlast   <= (LOB-1)'((32'(addr[LOB-1:0]) + 32'((vlen > LW'(NB)) ? LW'(NB) : vlen) - 1) >> 2);
          if (vlen == '0) begin
            done <= 1'b1;
            rbe  <= '0;
          end
          else state <= is_store ? S_STORE : S_LOOK;
        end
        S_LOOK: begin
          if (hit0 && (hit1 || !need1)) begin
            rdata <= ld_data;
            rbe   <= ld_be;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            second <= hit0;
            state  <= S_FILL;
          end
        end
        S_FILL: if (fill_done) state <= S_LOOK;
        S_STORE: if (!wb_full) begin
          wi <= wi + 1'b1;
          if (wi == wlast) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy);
endmodule
