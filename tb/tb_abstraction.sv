// tb_abstraction: random bus control signals and random completed transfers
// (program fetches inside the code region, data reads and writes outside it),
// with the trace switched on and off in random runs and the mode changed at
// random. A model of the five recording rules predicts the record of every
// cycle (one cycle later); all fields are compared. Each mode, the start and
// flush records, the FT/BT change detection and the MT idle/wait-master
// records must all have been seen.
module tb_abstraction;
  import tracer_pkg::*;
  logic HCLK = 0, HRESETn = 0;
  logic [1:0] HTRANS, HRESP;
  logic HWRITE, HREADY, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0;
  logic [2:0] HSIZE, HBURST;
  logic [3:0] HMASTER;
  xfer_t x;
  logic trace_en;
  trace_mode_e mode;
  logic [31:0] code_base, code_mask;
  abs_rec_t rec;
  int checks = 0, failures = 0;
  int n_mode [5], n_start = 0, n_flush = 0, n_skip = 0, n_mt_state = 0, n_prog = 0, n_data = 0;

  abstraction dut (.*);

  always #5 HCLK = ~HCLK;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bus_state_e bstate();
    if (HRESP == 2'b01) return BS_ERROR;
    if (HRESP == 2'b10) return BS_RETRY;
    if (HRESP == 2'b11) return BS_SPLIT;
    if (!HREADY) return BS_WAIT;
    if (HTRANS == 2'b10) return BS_NONSEQ;
    if (HTRANS == 2'b11) return BS_SEQ;
    if (HTRANS == 2'b01) return BS_BUSY;
    return (HBUSREQ && !HGRANT) ? BS_WAIT_MASTER : BS_IDLE;
  endfunction

  initial begin
    abs_rec_t e;
    bit m_on, first, cv;
    trace_mode_e m_mode;
    bit [CTRL_W-1:0] last_ctrl, fc, bc, c;
    bus_state_e st, last_st;
    bit prog;
    int cyc;
    foreach (n_mode[i]) n_mode[i] = 0;
    {HTRANS, HRESP, HWRITE, HREADY, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0, HSIZE, HBURST, HMASTER} = '0;
    x = '0; trace_en = 0; mode = MODE_FC;
    code_base = 32'h0000_0000; code_mask = 32'hF000_0000;
    m_on = 0; m_mode = MODE_FC; last_ctrl = 0; last_st = BS_IDLE;
    repeat (2) @(negedge HCLK);
    HRESETn = 1;
    for (cyc = 0; cyc < 40000; cyc++) begin
      @(negedge HCLK);
      if (cyc % 5000 == 0) begin
        code_base = {4'($urandom), 28'h0}; code_mask = 32'hF000_0000;
      end
      // slowly changing control signals so that FT/BT see repeats
      if (($urandom % 3) == 0) begin
        HTRANS = 2'($urandom); HREADY = ($urandom % 4) != 0;
        HRESP = (($urandom % 8) == 0) ? 2'($urandom) : 2'b00;
        HBUSREQ = $urandom; HGRANT = $urandom;
      end
      if (($urandom % 6) == 0) begin
        HWRITE = $urandom; HSIZE = 3'($urandom % 3); HBURST = 3'($urandom);
        HMASTER = 4'($urandom % 3); HLOCK = $urandom; HMASTLOCK = $urandom; HSEL0 = $urandom;
      end
      x = '0;
      x.done = ($urandom % 3) == 0;
      x.write = $urandom;
      x.addr = ($urandom % 2) ? (code_base | ($urandom & 32'h0FFF_FFFC)) : $urandom;
      x.data = $urandom; x.acs = ACS_W'($urandom); x.size = 3'($urandom % 3);
      if (($urandom % 60) == 0) trace_en = !trace_en;
      if (($urandom % 150) == 0) mode = trace_mode_e'($urandom % 5);
      // model of the record registered at the next edge
      st = bstate();
      fc = {HWRITE, HSIZE, HBURST, HMASTER, HTRANS, HREADY, HRESP, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0};
      bc = {HWRITE, HSIZE, HBURST, HMASTER, 6'b0, 4'(st)};
      first = trace_en && (!m_on || mode != m_mode);
      prog = !x.write && (x.addr & code_mask) == code_base;
      e = '0;
      if (trace_en) begin
        case (mode)
          MODE_FC: begin c = fc; cv = 1; end
          MODE_FT: begin c = fc; cv = first || fc != last_ctrl; end
          MODE_BC: begin c = bc; cv = 1; end
          MODE_BT: begin c = bc; cv = first || bc != last_ctrl; end
          default: begin
            c = x.done ? {x.acs, 6'b0, 4'(st)} : bc;
            cv = first || x.done || (st inside {BS_IDLE, BS_WAIT_MASTER} && st != last_st);
            if (!first && !x.done && cv) n_mt_state++;
          end
        endcase
        if (mode inside {MODE_FT, MODE_BT} && !cv) n_skip++;
        e.valid = cv || x.done;
        e.start = !m_on;
        e.mode = mode;
        e.ctrl_valid = cv;
        e.ctrl = cv ? c : '0;
        e.pa_valid = x.done && prog;
        e.pa = x.addr; e.pa_size = x.size;
        e.da_valid = x.done && !prog;
        e.da = x.addr; e.dv = x.data; e.write = x.write;
        if (cv) last_ctrl = c;
      end else if (m_on) begin
        e.valid = 1; e.flush = 1; e.mode = m_mode;
      end
      m_on = trace_en; m_mode = mode; last_st = st;
      @(posedge HCLK); #1;
      checks++;
      if (rec !== e) begin
        failures++;
        if (failures < 6) $display("FAIL cycle %0d mode %s valid %b/%b ctrl_valid %b/%b ctrl %h/%h", cyc,
                                   mode.name(), rec.valid, e.valid, rec.ctrl_valid, e.ctrl_valid, rec.ctrl, e.ctrl);
      end
      if (e.valid && !e.flush) n_mode[e.mode]++;
      if (e.start && e.valid) n_start++;
      if (e.flush) n_flush++;
      if (e.pa_valid) n_prog++;
      if (e.da_valid) n_data++;
    end
    checks++;
    if (n_start == 0 || n_flush == 0 || n_skip == 0 || n_mt_state == 0 || n_prog == 0 || n_data == 0 ||
        n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0 || n_mode[4] == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("records FC %0d FT %0d BC %0d BT %0d MT %0d, starts %0d flushes %0d skipped %0d MT state %0d prog %0d data %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_start, n_flush, n_skip, n_mt_state, n_prog, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
