// tb_ahb_tracer_top: end-to-end test of the bus tracer at its default sizes.
//
// A bus model in the bench plays the AHB master and slaves: instruction
// fetches in loops inside the code region, data reads and writes with wait
// states and idle cycles, and writes to the tracer's registers (HSEL0). For
// every traced cycle the bench notes what the trace must contain: the data
// transfers (address, value, direction), the (target, branch) pair of every
// sequential fetch run, and in FC mode the full control word of the cycle.
// After each trace the memory is read out through read/data_read, decoded
// with the reference decoder of tb_trace_pkg and compared with these notes.
//   S1 forward trace, mode FC, started by an address/data/control event
//   S2 forward trace with dynamic mode changes BT -> MT -> FT by events
//   S3 dense random traffic in FC: accumulator overflow, dropped packets and
//      history restart; the decoded trace must be a subsequence
//   S4 backward trace (arm, mode BC) in the circular buffer until a protocol
//      violation event: the buffer wraps, and the read-out, which starts at
//      the oldest sync point, must decode into the newest part of the trace
//   S5 long forward trace: the memory fills and the trace stops filling it
// Each mechanism is counted and one that never happened is a failure.
module tb_ahb_tracer_top;
  import tracer_pkg::*;
  import tb_trace_pkg::*;

  logic        HCLK = 0, HRESETn = 0, SYS_RST = 0;
  logic [31:0] HADDR = '0, HRDATA = '0, HWDATA = '0;
  logic [2:0]  HBURST = '0, HSIZE = '0;
  logic [3:0]  HMASTER = '0;
  logic [1:0]  HTRANS = '0, HRESP = '0;
  logic        HBUSREQ = 0, HGRANT = 1, HLOCK = 0, HMASTLOCK = 0, HSEL0 = 0, HWRITE = 0;
  logic        HREADY = 1, prot_violation = 0, read = 0;
  logic [31:0] data_read;
  logic        trace_active, trace_done, trace_wrapped, trace_full;
  logic [10:0] trace_words;
  logic [15:0] lost_packets;

  ahb_tracer_top dut (.*);

  always #5 HCLK = ~HCLK;

  int checks = 0, failures = 0;

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus model
  typedef struct {
    bit        v;
    bit        seq;
    bit [31:0] a;
    bit        w;
    bit [31:0] d;
  } ap_t;

  ap_t       ap, dp;
  bit [31:0] pc = 32'h100, dbase = 32'h2000_0000, dval = 32'h1234;
  int        wait_pct = 20, idle_pct = 15, data_pct = 30;
  bit        dense = 0;
  bit [31:0] cfg_a [$], cfg_d [$];
  bit [31:0] heads [4] = '{32'h100, 32'h400, 32'h1000, 32'h2340};

  // expected trace contents
  bit [95:0]         exp_data [$];   // {write, addr, value}
  bit [63:0]         exp_pairs [$];
  bit [CTRL_W-1:0]   exp_ctrl [$];
  bit                check_ctrl = 0;
  bit                run_open = 0, prev_act = 0;
  bit [31:0]         run_t, run_l;
  int                traced_cycles = 0;

  function automatic ap_t gen();
    ap_t n;
    n = '{default: 0};
    if (cfg_a.size() != 0) begin
      n.v = 1; n.a = 32'hE000_0000 | cfg_a.pop_front(); n.w = 1; n.d = cfg_d.pop_front();
      return n;
    end
    if (!dense && ($urandom % 100) < idle_pct) return n;
    n.v = 1;
    if (dense || ($urandom % 100) < data_pct) begin
      if (dense) begin
        n.a = 32'h2000_0000 | ($urandom & 32'h00FF_FFFC);
        n.d = $urandom;
      end else begin
        case ($urandom % 6)
          0: dbase = 32'h2000_0000 + (($urandom % 64) << 2);
          1: dbase = 32'h2100_0000 + (($urandom % 1024) << 2);
          default: dbase = 32'h2000_0000 | ((dbase + 4) & 32'h0000_00FC);
        endcase
        n.a = dbase;
        case ($urandom % 4)
          0: dval = $urandom;
          1: dval = dval + ($urandom % 60000);
          default: dval = dval + ($urandom % 200) - 100;
        endcase
        n.d = dval;
      end
      n.w = $urandom % 2;
    end else begin
      if (($urandom % 8) == 0)
        pc = (($urandom % 4) == 0) ? (($urandom % 16384) << 2) : heads[$urandom % 4];
      else
        pc = pc + 4;
      n.a = pc; n.w = 0; n.d = $urandom; n.seq = 1;
    end
    return n;
  endfunction

  function automatic bit is_prog(bit [31:0] a, bit w);
    return !w && a[31:28] == 4'h0;
  endfunction

  task automatic cycle();
    bit act;
    @(negedge HCLK);
    HTRANS    = ap.v ? (ap.seq ? HTRANS_SEQ : HTRANS_NONSEQ) : HTRANS_IDLE;
    HADDR     = ap.v ? ap.a : 32'h0;
    HWRITE    = ap.v && ap.w;
    HSIZE     = 3'd2;
    HBURST    = ap.seq ? 3'd1 : 3'd0;
    HSEL0     = ap.v && ap.a[31:28] == 4'hE;
    HMASTER   = ap.seq ? 4'd0 : 4'd1;
    HBUSREQ   = dense ? 1'b1 : ($urandom % 10) == 0;
    HGRANT    = dense ? 1'b1 : !(HBUSREQ && ($urandom % 2));
    HWDATA    = (dp.v && dp.w) ? dp.d : 32'h0;
    HRDATA    = (dp.v && !dp.w) ? dp.d : 32'h0;
    HREADY    = (dp.v && !dense) ? (($urandom % 100) >= wait_pct) : 1'b1;
    HRESP     = HRESP_OKAY;
    #4;
    act = trace_active;
    if (act) begin
      traced_cycles++;
      if (!prev_act) run_open = 0;
      if (check_ctrl)
        exp_ctrl.push_back({HWRITE, HSIZE, HBURST, HMASTER, HTRANS, HREADY, HRESP,
                            HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0});
      if (HREADY && dp.v) begin
        if (is_prog(dp.a, dp.w)) begin
          if (run_open && dp.a == run_l + 4) run_l = dp.a;
          else begin
            if (run_open) exp_pairs.push_back({run_t, run_l});
            run_open = 1; run_t = dp.a; run_l = dp.a;
          end
        end else begin
          exp_data.push_back({32'(dp.w), dp.a, dp.d});
        end
      end
    end else if (prev_act && run_open) begin
      exp_pairs.push_back({run_t, run_l});
      run_open = 0;
    end
    prev_act = act;
    @(posedge HCLK);
    #1;
    if (HREADY) begin
      dp = ap;
      ap = gen();
    end
  endtask

  task automatic cfg(bit [11:0] off, bit [31:0] d);
    cfg_a.push_back(32'(off)); cfg_d.push_back(d);
  endtask

  task automatic drain_cfg();
    while (cfg_a.size() != 0) cycle();
    repeat (3) cycle();
  endtask

  function automatic bit [31:0] ev_ctl(bit en, bit viol, bit bwd, trace_mode_e m, int depth);
    return {en, viol, bwd, 10'b0, 3'(m), 16'(depth)};
  endfunction

  // ------------------------------------------------------------ read-out
  item_t items [$];
  int    mode_items, lost_before;

  task automatic readout(output int nwords, input bit decode = 1, input bit truncated = 0);
    bit [7:0] bytes [$];
    trace_decoder dec;
    nwords = int'(trace_words);
    @(negedge HCLK);
    for (int i = 0; i < nwords; i++) begin
      read = 1;
      @(posedge HCLK);
      #1;
      for (int k = 0; k < 4; k++) bytes.push_back(data_read[8*k +: 8]);
      @(negedge HCLK);
    end
    read = 0;
    dec = new();
    items.delete();
    checks++;
    if (bytes.size() != 4 * nwords) begin failures++; $display("FAIL read-out length"); end
    if (!decode) return;
    dec.parse(bytes, items);
    checks++;
    if (dec.errors != 0 && !truncated) begin failures++; $display("FAIL decoder errors %0d", dec.errors); end
    mode_items = 0;
    foreach (items[i]) if (items[i].is_mode) mode_items++;
  endtask

  // Compare decoded data transfers and program pairs with the notes.
  // exact: every noted item must appear, in order; otherwise the decoded
  // items must be an ordered subsequence of the notes (dropped packets).
  task automatic compare(string name, bit exact, bit truncated);
    int j, nd, np, nc, last;
    bit ok;
    nd = 0; np = 0; nc = 0;
    // data
    j = 0; ok = 1;
    last = items.size() - (truncated ? 1 : 0);
    for (int i = 0; i < last; i++) begin
      if (!items[i].a_valid) continue;
      nd++;
      if (exact) begin
        if (j >= exp_data.size() ||
            exp_data[j] != {32'(items[i].write), items[i].da, items[i].dv}) ok = 0;
        j++;
      end else begin
        while (j < exp_data.size() &&
               exp_data[j] != {32'(items[i].write), items[i].da, items[i].dv}) j++;
        if (j >= exp_data.size()) ok = 0;
        j++;
      end
    end
    if (exact && j != exp_data.size()) ok = 0;
    checks++;
    if (!ok || (nd == 0 && exp_data.size() != 0)) begin
      failures++;
      $display("FAIL %s data: decoded %0d expected %0d", name, nd, exp_data.size());
    end
    // program pairs
    j = 0; ok = 1;
    for (int i = 0; i < last; i++) begin
      if (!items[i].p_valid) continue;
      np++;
      if (exact) begin
        if (j >= exp_pairs.size() || exp_pairs[j] != {items[i].pt, items[i].pb}) ok = 0;
        j++;
      end else begin
        // after a history restart the run in progress is reported from the
        // first fetch after the restart, so only the branch must match
        while (j < exp_pairs.size() &&
               !(exp_pairs[j][31:0] == items[i].pb &&
                 (exp_pairs[j][63:32] == items[i].pt ||
                  (items[i].pt > exp_pairs[j][63:32] && items[i].pt <= items[i].pb)))) j++;
        if (j >= exp_pairs.size()) ok = 0;
        j++;
      end
    end
    if (exact && j != exp_pairs.size()) ok = 0;
    checks++;
    if (!ok || (np == 0 && exp_pairs.size() != 0)) begin
      failures++;
      $display("FAIL %s pairs: decoded %0d expected %0d", name, np, exp_pairs.size());
    end
    // control words (FC only)
    if (check_ctrl) begin
      j = 0; ok = 1;
      for (int i = 0; i < last; i++) begin
        if (!items[i].c_valid) continue;
        nc++;
        if (j >= exp_ctrl.size() || exp_ctrl[j] != items[i].ctrl) ok = 0;
        j++;
      end
      if (exact && j != exp_ctrl.size()) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL %s ctrl: decoded %0d expected %0d", name, nc, exp_ctrl.size());
      end
    end
    $display("%s: %0d cycles traced, %0d words, data %0d/%0d pairs %0d/%0d ctrl %0d/%0d lost %0d",
             name, traced_cycles, trace_words, nd, exp_data.size(), np, exp_pairs.size(),
             nc, exp_ctrl.size(), lost_packets);
  endtask

  task automatic new_trace();
    exp_data.delete(); exp_pairs.delete(); exp_ctrl.delete();
    traced_cycles = 0; run_open = 0;
  endtask

  task automatic reset_tracer();
    cfg(12'h000, 32'h4);                 // clear
    for (int e = 0; e < 4; e++) cfg(12'h114 + 12'(e * 32), 32'h0);
    drain_cfg();
  endtask

  task automatic wait_done(int max_cycles);
    int n = 0;
    while (!trace_done && n < max_cycles) begin cycle(); n++; end
    cycle();
  endtask

  // ------------------------------------------------------------ coverage
  int n_fwd = 0, n_bwd = 0, n_viol = 0, n_switch = 0, n_ovf = 0, n_wrap = 0, n_full = 0;
  int n_pidx = 0, n_pslice = 0, n_cidx = 0, n_craw = 0, n_d8 = 0, n_d16 = 0, n_raw = 0, n_zero = 0;
  int n_sync = 0;
  bit [5:0] modes_seen = '0;

  always @(posedge HCLK) begin
    if (dut.crec.valid) begin
      if (dut.crec.p_enc == PENC_IDX)   n_pidx++;
      if (dut.crec.p_enc == PENC_SLICE) n_pslice++;
      if (dut.crec.c_enc == CENC_IDX)   n_cidx++;
      if (dut.crec.c_enc == CENC_RAW)   n_craw++;
      if (dut.crec.d_enc inside {DENC_POS8, DENC_NEG8} || dut.crec.a_enc inside {DENC_POS8, DENC_NEG8}) n_d8++;
      if (dut.crec.d_enc inside {DENC_POS16, DENC_NEG16}) n_d16++;
      if (dut.crec.d_enc == DENC_RAW32 || dut.crec.a_enc == DENC_RAW32) n_raw++;
      if (dut.crec.a_enc == DENC_ZERO || dut.crec.d_enc == DENC_ZERO) n_zero++;
      if (dut.crec.sync && !dut.crec.start) n_sync++;
      modes_seen[dut.crec.mode] <= 1'b1;
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  // ------------------------------------------------------------ scenarios
  initial begin
    int nw, m_before;
    ap = '{default: 0}; dp = '{default: 0};
    repeat (3) @(negedge HCLK);
    HRESETn = 1;
    repeat (3) cycle();

    // S1: forward trace in FC, started by a write of any value to 0x2000_0040
    new_trace();
    check_ctrl = 1;
    idle_pct = 45; data_pct = 20;
    cfg(12'h100, 32'h2000_0040);          // event 0 address value
    cfg(12'h104, 32'hFFFF_FFFF);          // address mask
    cfg(12'h10C, 32'h0);                  // data mask: any value
    cfg(12'h110, {5'b0, 11'h400, 5'b0, 11'h400}); // HWRITE must be 1
    cfg(12'h114, ev_ctl(1, 0, 0, MODE_FC, 400));
    drain_cfg();
    wait_done(20000);
    n_fwd += (traced_cycles > 0);
    checks++;
    if (traced_cycles != 401) begin
      failures++; $display("FAIL S1 traced %0d cycles, expected trigger + 400", traced_cycles);
    end
    checks++;
    if (lost_packets != 0) begin failures++; $display("FAIL S1 lost packets"); end
    readout(nw);
    compare("S1 FC forward", 1, 0);
    check_ctrl = 0;
    reset_tracer();

    // S2: forward trace with dynamic mode changes BT -> MT -> FT
    new_trace();
    idle_pct = 15; data_pct = 30;
    cfg(12'h100, 32'h2000_0000); cfg(12'h104, 32'hFF00_000C); cfg(12'h10C, 0);
    cfg(12'h110, {5'b0, 11'h400, 5'b0, 11'h400});
    cfg(12'h114, ev_ctl(1, 0, 0, MODE_BT, 600));
    cfg(12'h120, 32'h2000_0004); cfg(12'h124, 32'hFF00_000C); cfg(12'h12C, 0);
    cfg(12'h130, {5'b0, 11'h400, 5'b0, 11'h000});   // a read of 0x2000_0080
    cfg(12'h134, ev_ctl(1, 0, 0, MODE_MT, 600));
    cfg(12'h140, 32'h2000_0008); cfg(12'h144, 32'hFF00_000C); cfg(12'h14C, 0);
    cfg(12'h150, 32'h0);
    cfg(12'h154, ev_ctl(1, 0, 0, MODE_FT, 600));
    drain_cfg();
    wait_done(40000);
    readout(nw);
    begin
      trace_mode_e prev; int first = 1;
      foreach (items[i]) if (items[i].is_mode) begin
        if (!first && items[i].mode != prev) n_switch++;
        prev = items[i].mode; first = 0;
      end
    end
    compare("S2 mode switching", lost_packets == 0, 0);
    reset_tracer();

    // S3: dense random traffic, FC: the accumulator overflows
    new_trace();
    lost_before = int'(lost_packets);
    cfg(12'h104, 32'h0); cfg(12'h10C, 0); cfg(12'h110, {5'b0, 11'h400, 5'b0, 11'h400});
    cfg(12'h114, ev_ctl(1, 0, 0, MODE_FC, 300));
    drain_cfg();
    dense = 1;
    wait_done(20000);
    dense = 0;
    n_ovf += (int'(lost_packets) > 0);
    readout(nw);
    compare("S3 overflow", 0, 0);
    reset_tracer();

    // S4: backward trace in BC until a protocol violation
    new_trace();
    cfg(12'h114, ev_ctl(1, 1, 1, MODE_BC, 20));     // event 0: violation, backward
    cfg(12'h000, 32'h21);                            // arm, mode BC
    drain_cfg();
    repeat (3000) cycle();
    checks++;
    if (!trace_active || trace_done) begin failures++; $display("FAIL S4 not tracing before the target"); end
    prot_violation = 1; cycle(); prot_violation = 0;   // high for one bus cycle
    n_viol++;
    begin
      int n = 0;
      while (trace_active && n < 100) begin cycle(); n++; end
      checks++;
      if (n < 19 || n > 22) begin failures++; $display("FAIL S4 traced %0d cycles after the target", n); end
    end
    wait_done(100);
    n_bwd += trace_done;
    n_wrap += trace_wrapped;
    checks++;
    // the read-out of a wrapped buffer starts at the oldest sync point left,
    // at most two of the eight buffer segments from the oldest word
    if (!trace_done || !trace_wrapped || trace_words < 11'd768 || trace_words > 11'd1024) begin
      failures++; $display("FAIL S4 done=%b wrapped=%b words=%0d", trace_done, trace_wrapped, trace_words);
    end
    readout(nw, 1);
    compare("S4 backward", 0, 0);
    reset_tracer();

    // S5: long forward trace fills the memory
    new_trace();
    cfg(12'h104, 32'h0); cfg(12'h10C, 0); cfg(12'h110, {5'b0, 11'h400, 5'b0, 11'h400});
    cfg(12'h114, ev_ctl(1, 0, 0, MODE_FC, 6000));
    drain_cfg();
    wait_done(20000);
    n_full += trace_full;
    checks++;
    if (!trace_full || trace_words != 11'd1024 || trace_wrapped) begin
      failures++; $display("FAIL S5 full=%b words=%0d", trace_full, trace_words);
    end
    readout(nw, 1, 1);
    compare("S5 memory full", 0, 1);

    expect_seen("forward trigger", n_fwd);
    expect_seen("backward trigger", n_bwd);
    expect_seen("protocol violation trigger", n_viol);
    expect_seen("dynamic mode switch", n_switch);
    expect_seen("accumulator overflow", n_ovf);
    expect_seen("history restart after overflow", n_sync);
    expect_seen("circular buffer wrap", n_wrap);
    expect_seen("forward trace memory full", n_full);
    expect_seen("program pair dictionary hit", n_pidx);
    expect_seen("program pair slicing", n_pslice);
    expect_seen("control dictionary hit", n_cidx);
    expect_seen("control raw", n_craw);
    expect_seen("data difference 8 bit", n_d8);
    expect_seen("data difference 16 bit", n_d16);
    expect_seen("data raw 32 bit", n_raw);
    expect_seen("data zero difference", n_zero);
    for (int m = 0; m < 5; m++) expect_seen($sformatf("mode %0d", m), int'(modes_seen[m]));
    $display("coverage: fwd %0d bwd %0d viol %0d switch %0d ovf %0d sync %0d wrap %0d full %0d",
             n_fwd, n_bwd, n_viol, n_switch, n_ovf, n_sync, n_wrap, n_full);
    $display("coverage: pidx %0d pslice %0d cidx %0d craw %0d d8 %0d d16 %0d raw %0d zero %0d",
             n_pidx, n_pslice, n_cidx, n_craw, n_d8, n_d16, n_raw, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
