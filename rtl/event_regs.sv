// event_regs: configurable event registers of the event generation module.
//
// Each event register holds a trigger condition (address, data and access
// control values, each with a mask so that only some bits need to match), or
// a request to trigger on a protocol violation, and the trace mode, trace
// direction and trace depth to use when it fires. The control register starts
// a backward trace, stops or clears the tracer and selects the mode of a
// backward trace; two more registers set the code region that marks program
// addresses. The event format (condition with mask, mode, direction, depth)
// follows the paper; the register map and the AHB write port are this
// design's.
//
// The registers are written through a zero-wait AHB slave port selected by
// HSEL0 (write-only: the tracer drives no read data). Register map, byte
// offsets in HADDR[11:0]:
//   0x000 CTRL       [0] arm backward trace (pulse) [1] stop (pulse)
//                    [2] clear (pulse) [6:4] mode of a backward trace
//   0x004 CODE_BASE  0x008 CODE_MASK  (program fetch: (addr & mask) == base)
//   0x100 + 0x20*i   event i: +0x00 addr value, +0x04 addr mask,
//                    +0x08 data value, +0x0C data mask,
//                    +0x10 [26:16] control mask, [10:0] control value,
//                    +0x14 [31] enable [30] on violation [29] backward
//                          [18:16] mode [15:0] depth
// Timing: a write takes effect at the end of its data phase; arm/stop/clear
// are one-cycle pulses in the cycle after it.
module event_regs
  import tracer_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 4
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL0,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic        HREADY,
  input  logic [31:0] HWDATA,
  output event_t      events [NUM_EVENTS],
  output logic        arm,
  output logic        stop,
  output logic        clear,
  output trace_mode_e bwd_mode,
  output logic [31:0] code_base,
  output logic [31:0] code_mask
);
  logic        wr_pend;
  logic [11:0] wr_addr;
  localparam int unsigned EW = (NUM_EVENTS > 1) ? $clog2(NUM_EVENTS) : 1;
  logic [EW-1:0] ev_sel;
  logic          ev_ok;

  assign ev_sel = wr_addr[5 +: EW];
  assign ev_ok  = 32'(wr_addr[7:5]) < NUM_EVENTS;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      wr_pend   <= 1'b0;
      wr_addr   <= '0;
      arm       <= 1'b0;
      stop      <= 1'b0;
      clear     <= 1'b0;
      bwd_mode  <= MODE_FC;
      code_base <= 32'h0000_0000;
      code_mask <= 32'hF000_0000;
      for (int i = 0; i < NUM_EVENTS; i++) events[i] <= '0;
    end else begin
      arm   <= 1'b0;
      stop  <= 1'b0;
      clear <= 1'b0;
      if (HREADY) begin
        wr_pend <= HSEL0 && HTRANS[1] && HWRITE;
        wr_addr <= HADDR[11:0];
      end
      if (wr_pend && HREADY) begin
        if (wr_addr[11:8] == 4'h0) begin
          case (wr_addr[7:2])
            6'd0: begin
              arm      <= HWDATA[0];
              stop     <= HWDATA[1];
              clear    <= HWDATA[2];
              bwd_mode <= trace_mode_e'(HWDATA[6:4]);
            end
            6'd1: code_base <= HWDATA;
            6'd2: code_mask <= HWDATA;
            default: ;
          endcase
        end else if (wr_addr[11:8] == 4'h1 && ev_ok) begin
          case (wr_addr[4:2])
            3'd0: events[ev_sel].addr_val  <= HWDATA;
            3'd1: events[ev_sel].addr_mask <= HWDATA;
            3'd2: events[ev_sel].data_val  <= HWDATA;
            3'd3: events[ev_sel].data_mask <= HWDATA;
            3'd4: begin
              events[ev_sel].ctrl_mask <= HWDATA[16 +: ACS_W];
              events[ev_sel].ctrl_val  <= HWDATA[0 +: ACS_W];
            end
            3'd5: begin
              events[ev_sel].en       <= HWDATA[31];
              events[ev_sel].on_viol  <= HWDATA[30];
              events[ev_sel].backward <= HWDATA[29];
              events[ev_sel].mode     <= trace_mode_e'(HWDATA[18:16]);
              events[ev_sel].depth    <= HWDATA[15:0];
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
