// event_trigger: matching circuit and trace trigger.
//
// Every completed transfer is compared with all enabled event registers: an
// address, data and access control match under the masks, or a protocol
// violation reported by an external protocol checker for events that ask for
// it. The lowest-numbered matching event fires. The trigger then starts and
// stops the trace and sets its mode:
//   IDLE  a forward event starts a forward trace in the event's mode.
//   PRE   (entered by arm) backward tracing into the circular buffer before
//         the target point, in the mode chosen by the control register.
//   FWD   forward trace; a further forward event switches the mode on the fly
//         (the depth count of the trace goes on).
//   POST  a backward event was reached: trace depth more cycles, then stop.
//   DONE  trace frozen for read-out until arm or clear.
// A backward event in FWD also ends the trace after its depth. Events can
// switch the mode in PRE as well. The event contents and the dynamic mode
// change follow the paper; the state machine, the meaning of depth
// (cycles traced after the trigger cycle) and the arm/stop/clear controls are
// this design's.
//
// Timing: trace_en/mode are combinational, so the triggering cycle is traced.
module event_trigger
  import tracer_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  event_t      events [NUM_EVENTS],
  input  xfer_t       x,
  input  logic        prot_violation,
  input  logic        arm,
  input  logic        stop,
  input  logic        clear,
  input  trace_mode_e bwd_mode,
  output logic        trace_en,
  output trace_mode_e mode,
  output logic        backward,   // trace goes to a circular buffer
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_FWD, S_POST, S_DONE} state_e;

  state_e             state;
  trace_mode_e        cur_mode;
  logic [DEPTH_W-1:0] cnt;
  logic               hit;
  event_t             ev;

  function automatic logic ev_match(event_t e, xfer_t t, logic viol);
    if (!e.en) return 1'b0;
    if (e.on_viol) return viol;
    return t.done &&
           ((t.addr ^ e.addr_val) & e.addr_mask) == '0 &&
           ((t.data ^ e.data_val) & e.data_mask) == '0 &&
           ((t.acs  ^ e.ctrl_val) & e.ctrl_mask) == '0;
  endfunction

  always_comb begin
    hit = 1'b0;
    ev  = '0;
    for (int i = NUM_EVENTS - 1; i >= 0; i--) begin
      if (ev_match(events[i], x, prot_violation)) begin
        hit = 1'b1;
        ev  = events[i];
      end
    end
  end

  always_comb begin
    mode     = cur_mode;
    trace_en = state == S_PRE || state == S_FWD || state == S_POST;
    if (!stop && !clear && !arm && hit &&
        (state == S_IDLE || state == S_PRE || state == S_FWD)) begin
      mode     = ev.mode;
      trace_en = 1'b1;
    end
    if (stop || clear) trace_en = 1'b0;
  end

  assign backward = state == S_PRE || state == S_POST;
  assign done     = state == S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur_mode <= MODE_FC;
      cnt      <= '0;
    end else if (clear) begin
      state <= S_IDLE;
    end else if (stop) begin
      if (state != S_IDLE) state <= S_DONE;
    end else if (arm) begin
      state    <= S_PRE;
      cur_mode <= bwd_mode;
    end else begin
      case (state)
        S_FWD, S_POST: begin
          if (cnt <= 1) state <= S_DONE;
          else          cnt   <= cnt - 1'b1;
        end
        default: ;
      endcase
      if (hit && (state == S_IDLE || state == S_PRE || state == S_FWD)) begin
        cur_mode <= ev.mode;
        if (ev.backward) begin
          // target point reached: trace depth more cycles, then stop
          state <= (ev.depth == '0) ? S_DONE : S_POST;
          cnt   <= ev.depth;
        end else if (state == S_IDLE) begin
          state <= (ev.depth == '0) ? S_DONE : S_FWD;
          cnt   <= ev.depth;
        end
      end
    end
  end
endmodule
