// tb_event_trigger: random event registers, random completed transfers drawn
// from a small address/data/control set so that events really match, random
// protocol violations and occasional arm/stop/clear pulses. A cycle model of
// the trigger (trace of the trigger cycle plus depth more cycles, lowest
// event wins, forward events switch the mode of a running forward trace,
// backward events end it after their depth) is compared with trace_en, mode,
// backward and done every cycle. Each kind of trigger must have happened.
module tb_event_trigger;
  import tracer_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, prot_violation = 0, arm = 0, stop = 0, clear = 0;
  event_t events [N];
  xfer_t x;
  trace_mode_e bwd_mode, mode;
  logic trace_en, backward, done;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0, n_switch = 0, n_viol = 0, n_done = 0, n_pre = 0, n_pre_hit = 0;

  event_trigger #(.NUM_EVENTS(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {M_IDLE, M_PRE, M_FWD, M_POST, M_DONE} mstate_e;
  mstate_e ms;
  trace_mode_e m_mode;
  int left;

  function automatic bit [31:0] pick();
    return {28'h1234_000, 2'($urandom), 2'b00};
  endfunction

  task automatic config_events();
    for (int i = 0; i < N; i++) begin
      events[i] = '0;
      events[i].en        = ($urandom % 4) != 0;
      events[i].on_viol   = ($urandom % 5) == 0;
      events[i].backward  = ($urandom % 3) == 0;
      events[i].mode      = trace_mode_e'($urandom % 5);
      events[i].depth     = 16'($urandom % 40);
      events[i].addr_val  = pick();
      events[i].addr_mask = ($urandom % 2) ? 32'hFFFF_FFFF : 32'h0000_000C;
      events[i].data_val  = pick();
      events[i].data_mask = ($urandom % 2) ? 32'h0 : 32'h0000_000C;
      events[i].ctrl_val  = ACS_W'($urandom);
      events[i].ctrl_mask = ($urandom % 2) ? '0 : ACS_W'(1 << ($urandom % ACS_W));
    end
  endtask

  function automatic bit mmatch(event_t e);
    if (!e.en) return 0;
    if (e.on_viol) return prot_violation;
    if (!x.done) return 0;
    for (int b = 0; b < 32; b++) if (e.addr_mask[b] && x.addr[b] != e.addr_val[b]) return 0;
    for (int b = 0; b < 32; b++) if (e.data_mask[b] && x.data[b] != e.data_val[b]) return 0;
    for (int b = 0; b < ACS_W; b++) if (e.ctrl_mask[b] && x.acs[b] != e.ctrl_val[b]) return 0;
    return 1;
  endfunction

  initial begin
    bit hit; event_t ev; bit e_en; trace_mode_e e_mode; bit can;
    ms = M_IDLE; m_mode = MODE_FC; left = 0;
    x = '0; bwd_mode = MODE_FC;
    config_events();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      @(negedge clk);
      if (cyc % 600 == 0) config_events();
      x = '0;
      x.done = ($urandom % 3) == 0;
      x.addr = pick(); x.data = pick(); x.acs = ACS_W'($urandom);
      prot_violation = ($urandom % 50) == 0;
      arm   = ($urandom % 700) == 0;
      stop  = ($urandom % 900) == 0;
      clear = ($urandom % 1500) == 0;
      if (ms == M_DONE && ($urandom % 20) == 0) begin
        if ($urandom % 2) arm = 1; else clear = 1;
      end
      bwd_mode = trace_mode_e'($urandom % 5);
      // model outputs
      hit = 0; ev = '0;
      for (int i = 0; i < N; i++) if (!hit && mmatch(events[i])) begin hit = 1; ev = events[i]; end
      can = hit && !stop && !clear && !arm && ms inside {M_IDLE, M_PRE, M_FWD};
      e_en   = ms inside {M_PRE, M_FWD, M_POST} || can;
      if (stop || clear) e_en = 0;
      e_mode = can ? ev.mode : m_mode;
      #1;
      checks++;
      if (trace_en !== e_en || (e_en && mode !== e_mode) ||
          backward !== (ms inside {M_PRE, M_POST}) || done !== (ms == M_DONE)) begin
        failures++;
        if (failures < 6) $display("FAIL cycle %0d state %s en %b/%b mode %0d/%0d", cyc, ms.name(), trace_en, e_en, mode, e_mode);
      end
      // model next state
      if (clear) ms = M_IDLE;
      else if (stop) begin if (ms != M_IDLE) ms = M_DONE; end
      else if (arm) begin ms = M_PRE; m_mode = bwd_mode; n_pre++; end
      else begin
        mstate_e ns;
        ns = ms;
        if (ms inside {M_FWD, M_POST}) begin
          left--;
          if (left <= 0) ns = M_DONE;
        end
        if (hit && ms inside {M_IDLE, M_PRE, M_FWD}) begin
          if (ev.on_viol) n_viol++;
          if (ms == M_PRE) n_pre_hit++;
          if (ms == M_FWD && !ev.backward && ev.mode != m_mode) n_switch++;
          m_mode = ev.mode;
          if (ev.backward) begin
            n_bwd++;
            left = ev.depth; ns = ev.depth == 0 ? M_DONE : M_POST;
          end else if (ms == M_IDLE) begin
            n_fwd++;
            left = ev.depth; ns = ev.depth == 0 ? M_DONE : M_FWD;
          end
        end
        if (ns == M_DONE && ms != M_DONE) n_done++;
        ms = ns;
      end
    end
    checks++;
    if (n_fwd == 0 || n_bwd == 0 || n_switch == 0 || n_viol == 0 || n_done == 0 || n_pre == 0 || n_pre_hit == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("forward starts %0d backward events %0d mode switches %0d violation triggers %0d done %0d arms %0d", n_fwd, n_bwd, n_switch, n_viol, n_done, n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
