// tb_event_regs: random AHB traffic on the register port, pipelined and with
// wait states, including reads, unselected transfers, IDLE/BUSY cycles,
// writes to unmapped offsets and to event numbers that do not exist. A model
// of the register map follows each completed write; every cycle all event
// registers, the code region and the control pulses are compared with it.
module tb_event_regs;
  import tracer_pkg::*;
  localparam int N = 4;
  logic HCLK = 0, HRESETn = 0, HSEL0 = 0, HWRITE = 0, HREADY = 1;
  logic [31:0] HADDR = 0, HWDATA = 0;
  logic [1:0] HTRANS = 0;
  event_t events [N];
  logic arm, stop, clear;
  trace_mode_e bwd_mode;
  logic [31:0] code_base, code_mask;
  int checks = 0, failures = 0, n_wr = 0, n_ev = 0, n_pulse = 0;

  event_regs #(.NUM_EVENTS(N)) dut (.*);

  always #5 HCLK = ~HCLK;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  event_t m_ev [N];
  bit m_arm, m_stop, m_clear;
  trace_mode_e m_mode;
  bit [31:0] m_base, m_mask;
  // address phase captured by the model
  bit p_wr; bit [11:0] p_addr;

  task automatic m_write(bit [11:0] a, bit [31:0] d);
    n_wr++;
    if (a[11:8] == 0) begin
      if (a[7:2] == 0) begin
        m_arm = d[0]; m_stop = d[1]; m_clear = d[2]; m_mode = trace_mode_e'(d[6:4]);
        if (d[2:0] != 0) n_pulse++;
      end
      if (a[7:2] == 1) m_base = d;
      if (a[7:2] == 2) m_mask = d;
    end else if (a[11:8] == 1 && a[7:5] < N) begin
      int i = a[7:5];
      n_ev++;
      case (a[4:2])
        0: m_ev[i].addr_val = d;
        1: m_ev[i].addr_mask = d;
        2: m_ev[i].data_val = d;
        3: m_ev[i].data_mask = d;
        4: begin m_ev[i].ctrl_mask = d[26:16]; m_ev[i].ctrl_val = d[10:0]; end
        5: begin
          m_ev[i].en = d[31]; m_ev[i].on_viol = d[30]; m_ev[i].backward = d[29];
          m_ev[i].mode = trace_mode_e'(d[18:16]); m_ev[i].depth = d[15:0];
        end
        default: ;
      endcase
    end
  endtask

  function automatic bit [11:0] rand_addr();
    case ($urandom % 4)
      0: return 12'(4 * ($urandom % 4));
      1, 2: return 12'h100 + 12'(32 * ($urandom % 8)) + 12'(4 * ($urandom % 8));
      default: return 12'($urandom);
    endcase
  endfunction

  initial begin
    foreach (m_ev[i]) m_ev[i] = '0;
    m_arm = 0; m_stop = 0; m_clear = 0; m_mode = MODE_FC;
    m_base = 0; m_mask = 32'hF000_0000; p_wr = 0; p_addr = 0;
    repeat (2) @(negedge HCLK);
    HRESETn = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit [31:0] wd;
      @(negedge HCLK);
      // drive: new address phase only when the previous cycle completed
      HREADY = ($urandom % 4) != 0;
      wd = $urandom;
      if (($urandom % 4) == 0) wd[2:0] = 0;  // fewer control pulses
      HWDATA = wd;
      HSEL0  = ($urandom % 8) != 0;
      HTRANS = 2'($urandom);
      HWRITE = ($urandom % 6) != 0;
      HADDR  = {20'($urandom), rand_addr()};
      @(posedge HCLK);
      // model: data phase of the previous address phase completes now
      m_arm = 0; m_stop = 0; m_clear = 0;
      if (p_wr && HREADY) m_write(p_addr, HWDATA);
      if (HREADY) begin p_wr = HSEL0 && HTRANS[1] && HWRITE; p_addr = HADDR[11:0]; end
      #1;
      checks++;
      if (arm !== m_arm || stop !== m_stop || clear !== m_clear || bwd_mode !== m_mode ||
          code_base !== m_base || code_mask !== m_mask) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d control regs", cyc);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (events[i] !== m_ev[i]) begin
          failures++;
          if (failures < 5) $display("FAIL cycle %0d event %0d", cyc, i);
        end
      end
    end
    checks++;
    if (n_wr < 1000 || n_ev < 500 || n_pulse < 50) begin
      failures++; $display("FAIL coverage writes %0d events %0d pulses %0d", n_wr, n_ev, n_pulse);
    end
    $display("writes %0d event writes %0d pulses %0d", n_wr, n_ev, n_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
