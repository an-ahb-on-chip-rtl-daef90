// abstraction: timing and signal abstraction of the AHB bus.
//
// Data classification splits the bus into program addresses (reads inside a
// configurable code region), data address/value (all other transfers),
// access control signals ACS = {HWRITE, HSIZE, HBURST, HMASTER} and protocol
// control signals PCS = {HTRANS, HREADY, HRESP, HBUSREQ, HGRANT, HLOCK,
// HMASTLOCK, HSEL0}. The trace mode then decides what is recorded:
//   FC  all signals, every cycle
//   FT  all signals, only when their value changes
//   BC  all signals with the PCS encoded as a bus state, every cycle
//   BT  as BC, only when the values change
//   MT  master operations: each completed transfer, and the bus state when
//       it becomes IDLE or WAIT MASTER
// Completed transfers (address, data, direction) are recorded in every mode.
// The modes and what they record follow the paper; the bus-state
// encoding, the code-region classification and the record format are this
// design's (see tracer_pkg).
//
// Timing: one registered record per cycle at most, one cycle after the bus
// cycle it describes. trace_en/mode come from the event trigger in the same
// cycle. The first record of a trace carries start; in the cycle after the
// trace ends a record with only flush set is sent.
module abstraction
  import tracer_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [3:0]  HMASTER,
  input  logic        HREADY,
  input  logic [1:0]  HRESP,
  input  logic        HBUSREQ,
  input  logic        HGRANT,
  input  logic        HLOCK,
  input  logic        HMASTLOCK,
  input  logic        HSEL0,
  input  xfer_t       x,           // completed transfer, from ahb_xfer_tracker
  input  logic        trace_en,
  input  trace_mode_e mode,
  input  logic [31:0] code_base,
  input  logic [31:0] code_mask,
  output abs_rec_t    rec
);
  logic [ACS_W-1:0]  acs;
  logic [PCS_W-1:0]  pcs;
  bus_state_e        state, last_state;
  logic [CTRL_W-1:0] full_ctrl, bs_ctrl, last_ctrl;
  logic              trace_q;
  trace_mode_e       mode_q;
  logic              first, is_prog;
  logic              ctrl_valid;
  logic [CTRL_W-1:0] ctrl;

  assign acs = {HWRITE, HSIZE, HBURST, HMASTER};
  assign pcs = {HTRANS, HREADY, HRESP, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0};

  always_comb begin
    if (HRESP == HRESP_ERROR)      state = BS_ERROR;
    else if (HRESP == HRESP_RETRY) state = BS_RETRY;
    else if (HRESP == HRESP_SPLIT) state = BS_SPLIT;
    else if (!HREADY)              state = BS_WAIT;
    else begin
      case (HTRANS)
        HTRANS_NONSEQ: state = BS_NONSEQ;
        HTRANS_SEQ:    state = BS_SEQ;
        HTRANS_BUSY:   state = BS_BUSY;
        default:       state = (HBUSREQ && !HGRANT) ? BS_WAIT_MASTER : BS_IDLE;
      endcase
    end
  end

  assign full_ctrl = {acs, pcs};
  assign bs_ctrl   = {acs, {(PCS_W-4){1'b0}}, 4'(state)};
  assign first     = trace_en && (!trace_q || mode != mode_q);
  assign is_prog   = !x.write && ((x.addr & code_mask) == code_base);

  always_comb begin
    ctrl       = bs_ctrl;
    ctrl_valid = 1'b0;
    case (mode)
      MODE_FC: begin ctrl = full_ctrl; ctrl_valid = 1'b1; end
      MODE_FT: begin ctrl = full_ctrl; ctrl_valid = first || full_ctrl != last_ctrl; end
      MODE_BC: begin ctrl_valid = 1'b1; end
      MODE_BT: begin ctrl_valid = first || bs_ctrl != last_ctrl; end
      default: begin  // MODE_MT
        if (x.done) ctrl = {x.acs, {(PCS_W-4){1'b0}}, 4'(state)};
        ctrl_valid = first || x.done ||
                     ((state == BS_IDLE || state == BS_WAIT_MASTER) && state != last_state);
      end
    endcase
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      rec        <= '0;
      trace_q    <= 1'b0;
      mode_q     <= MODE_FC;
      last_ctrl  <= '0;
      last_state <= BS_IDLE;
    end else begin
      trace_q    <= trace_en;
      mode_q     <= mode;
      last_state <= state;
      rec        <= '0;
      if (trace_en) begin
        rec.valid      <= ctrl_valid || x.done;
        rec.start      <= !trace_q;
        rec.mode       <= mode;
        rec.ctrl_valid <= ctrl_valid;
        rec.ctrl       <= ctrl_valid ? ctrl : '0;
        rec.pa_valid   <= x.done && is_prog;
        rec.pa         <= x.addr;
        rec.pa_size    <= x.size;
        rec.da_valid   <= x.done && !is_prog;
        rec.da         <= x.addr;
        rec.dv         <= x.data;
        rec.write      <= x.write;
        if (ctrl_valid) last_ctrl <= ctrl;
      end else if (trace_q) begin
        rec.valid <= 1'b1;
        rec.flush <= 1'b1;
        rec.mode  <= mode_q;
      end
    end
  end
endmodule
