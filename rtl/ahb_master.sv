// ahb_master: AHB bus controller of the vector coprocessor.
//
// Serves two clients of the memory pipe. A pending write-buffer entry is
// written first: a full word as one NONSEQ word transfer, a partial word as
// one NONSEQ byte transfer per enabled byte (plain AHB has no byte strobes).
// Otherwise a requested line fill is read as an incrementing burst
// (HBURST=INCR) of VLMAX word beats, NONSEQ then SEQ. HBUSREQ is held while
// addresses remain to be issued; the master drives the address bus only in
// cycles it owns (HGRANT seen high at a rising edge with HREADY high). If
// ownership is lost mid-burst the remaining beats restart with NONSEQ.
// Address and data phases are pipelined: a phase ends at a rising edge with
// HREADY high. `wb_pop` pulses when a write-buffer entry has been written
// (the head is not looked at in that cycle, while the buffer advances),
// `fill_done` when the whole line is in `fill_data`. Byte lanes are
// big-endian. HRESP is not examined (errors, retries and splits are not
// handled). The protocol details are this design's choices; the bus itself
// is the on-chip AHB the accelerator shares with the CPU.
module ahb_master #(
  parameter int VLMAX = 16,
  localparam int VW = 32 * VLMAX,
  localparam int BW = $clog2(VLMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write buffer head
  input  logic          wb_empty,
  input  logic [29:0]   wb_waddr,
  input  logic [31:0]   wb_data,
  input  logic [3:0]    wb_be,
  output logic          wb_pop,
  // line fill
  input  logic          fill_req,
  input  logic [31:0]   fill_addr,     // line-aligned byte address
  output logic          fill_done,
  output logic [VW-1:0] fill_data,
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
  localparam logic [1:0] T_IDLE = 2'b00, T_NONSEQ = 2'b10, T_SEQ = 2'b11;

  typedef enum logic [1:0] {M_IDLE, M_WRITE, M_READ} mode_e;
  mode_e mode;

  logic          owner;
  logic [BW-1:0] ai;            // next read beat to issue
  logic [3:0]    pend;          // write bytes (or whole word) still to issue
  logic          wfull;         // current write is a full word
  logic [31:0]   base;          // transaction base address
  logic [31:0]   wdata_q;
  logic          dp_valid;      // a data phase is in progress
  logic [BW-1:0] dp_idx;
  logic          last_ours;     // previous address phase was ours, same burst
  logic          issuing;
  logic [1:0]    k_lo;          // lowest pending byte

  always_comb begin
    k_lo = 2'd0;
    for (int k = 3; k >= 0; k--) if (pend[k]) k_lo = 2'(k);
  end

  // Address-phase outputs.
  always_comb begin
    HADDR   = base;
    HTRANS  = T_IDLE;
    HWRITE  = (mode == M_WRITE);
    HSIZE   = 3'b010;
    HBURST  = 3'b000;
    issuing = 1'b0;
    if (owner && mode == M_READ && ai < BW'(VLMAX)) begin
      issuing = 1'b1;
      HADDR   = base + (32'(ai) << 2);
      HTRANS  = last_ours ? T_SEQ : T_NONSEQ;
      HBURST  = 3'b001;
    end else if (owner && mode == M_WRITE && pend != 4'd0) begin
      issuing = 1'b1;
      HTRANS  = T_NONSEQ;
      if (!wfull) begin
        HADDR = base + {30'd0, k_lo};
        HSIZE = 3'b000;
      end
    end
  end

  assign HBUSREQ = (mode == M_READ && ai < BW'(VLMAX)) || (mode == M_WRITE && pend != 4'd0)
                   || (mode == M_IDLE && ((!wb_empty && !wb_pop) || (fill_req && !fill_done)));
  assign HWDATA  = wdata_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= M_IDLE;
      owner     <= 1'b0;
      ai        <= '0;
      pend      <= '0;
      wfull     <= 1'b0;
      base      <= '0;
      wdata_q   <= '0;
      dp_valid  <= 1'b0;
      dp_idx    <= '0;
      last_ours <= 1'b0;
      wb_pop    <= 1'b0;
      fill_done <= 1'b0;
    end else begin
      wb_pop    <= 1'b0;
      fill_done <= 1'b0;
      if (HREADY) owner <= HGRANT;
      case (mode)
        M_IDLE: begin
          if (!wb_empty && !wb_pop) begin
            mode    <= M_WRITE;
            base    <= {wb_waddr, 2'b00};
            wdata_q <= wb_data;
            wfull   <= (wb_be == 4'hF);
            pend    <= (wb_be == 4'hF) ? 4'b0001 : wb_be;
          end else if (fill_req && !fill_done) begin
            mode <= M_READ;
            base <= fill_addr;
            ai   <= '0;
          end
          last_ours <= 1'b0;
        end
        default: begin
          if (HREADY) begin
            // Data phase completes.
            if (dp_valid && mode == M_READ)
              fill_data[32*dp_idx +: 32] <= HRDATA;
            // Address phase moves to the data phase.
            dp_valid  <= issuing;
            last_ours <= issuing;
            if (issuing) begin
              dp_idx <= ai;
              if (mode == M_READ) ai <= ai + 1'b1;
              else if (wfull) pend <= 4'd0;
              else pend[k_lo] <= 1'b0;
            end
            // Transaction ends once everything is issued and the last data
            // phase has completed.
            if (!issuing && dp_valid &&
                ((mode == M_READ && ai == BW'(VLMAX)) || (mode == M_WRITE && pend == 4'd0))) begin
              mode <= M_IDLE;
              if (mode == M_READ) fill_done <= 1'b1;
              else wb_pop <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  // A burst never crosses a 1 KB boundary: lines are aligned and small.
  a_line_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == M_IDLE && wb_empty && fill_req) |-> (fill_addr[$clog2(4*VLMAX)-1:0] == '0));
endmodule
