// tb_packer: the packer with a 64-word trace memory. Random compressed
// records are fed in; a second reference decoder turns each record's fields
// into the item a reader must later find. After the trace is flushed the
// memory is read out through the read port, parsed, and compared:
//   P1 sparse records: every item back, in order, with mode packets at each
//      mode change
//   P2 a record every cycle: the accumulator overflows, records are dropped,
//      resync_req is raised and the next sync record is taken again; the
//      items read back must be an ordered subsequence
//   P3 backward (circular) trace: the memory wraps; the read-out, which
//      starts at the oldest sync point, decodes into the newest records
//   P4 forward trace: the memory fills and writing stops
module tb_packer;
  import tracer_pkg::*;
  import tb_trace_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst_n = 0, backward = 0, read = 0;
  comp_rec_t rec;
  logic resync_req, mem_we, mem_re, wrapped, full, idle;
  logic [5:0] mem_waddr, mem_raddr;
  logic [31:0] mem_wdata, rdata;
  logic [6:0] trace_words;
  logic [15:0] lost_count;
  int checks = 0, failures = 0, n_resync = 0, n_modes = 0;
  item_t exp_items [$], items [$];
  trace_decoder edec;
  bit sync_next;
  trace_mode_e cur_mode;

  packer #(.MEM_DEPTH(D), .ACC_BYTES(32)) dut (.*);
  trace_mem #(.DW(32), .DEPTH(D)) mem (
    .clk, .we (mem_we), .waddr (mem_waddr), .wdata (mem_wdata),
    .re (mem_re), .raddr (mem_raddr), .rdata
  );

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (resync_req) n_resync++;

  task automatic send(bit start, bit flush);
    comp_rec_t r;
    item_t it;
    @(negedge clk);
    if (resync_req) sync_next = 1;
    r = '0;
    r.valid = 1; r.start = start; r.flush = flush;
    r.sync  = start || sync_next;
    sync_next = 0;
    if (($urandom % 10) == 0) cur_mode = trace_mode_e'($urandom % 5);
    r.mode  = cur_mode;
    r.write = $urandom % 2;
    if (!flush) begin
      r.c_enc = 2'($urandom % 3);
      r.c_idx = 8'($urandom % 4);
      r.c_raw = CTRL_W'($urandom);
      r.p_enc = (($urandom % 3) == 0) ? 2'($urandom % 3) : PENC_NONE;
      r.p_idx = 8'($urandom % 4);
      r.p_tn  = 3'($urandom % 5); r.p_t = $urandom;
      r.p_bn  = 3'($urandom % 5); r.p_b = $urandom;
      r.a_enc = denc_e'($urandom % 7); r.a_pay = $urandom;
      r.d_enc = r.a_enc == DENC_NONE ? DENC_NONE : denc_e'(1 + $urandom % 6);
      r.d_pay = $urandom;
      if (r.a_enc inside {DENC_POS8, DENC_NEG8})   r.a_pay &= 32'hFF;
      if (r.a_enc inside {DENC_POS16, DENC_NEG16}) r.a_pay &= 32'hFFFF;
      if (r.d_enc inside {DENC_POS8, DENC_NEG8})   r.d_pay &= 32'hFF;
      if (r.d_enc inside {DENC_POS16, DENC_NEG16}) r.d_pay &= 32'hFFFF;
    end
    rec = r;
    #1;  // let idle and the other outputs settle before they are looked at
    // the item a reader must find
    if (r.sync) edec.restart();
    it = '{default: 0, mode: MODE_FC};
    it.sync = r.sync; it.write = r.write;
    if (r.c_enc != CENC_NONE) begin it.c_valid = 1; it.ctrl = edec.ctrl(r.c_enc, r.c_idx, r.c_raw); end
    if (r.p_enc != PENC_NONE) begin
      bit [63:0] p = edec.prog(r.p_enc, r.p_idx, int'(r.p_tn), r.p_t, int'(r.p_bn), r.p_b);
      it.p_valid = 1; it.pt = p[63:32]; it.pb = p[31:0];
    end
    if (r.a_enc != DENC_NONE) begin it.a_valid = 1; it.da = edec.data(0, r.a_enc, r.a_pay); end
    if (r.d_enc != DENC_NONE) begin it.d_valid = 1; it.dv = edec.data(1, r.d_enc, r.d_pay); end
    if (it.c_valid || it.p_valid || it.a_valid || it.d_valid || it.sync) exp_items.push_back(it);
  endtask

  task automatic idle_cycle();
    @(negedge clk);
    if (resync_req) sync_next = 1;
    rec = '0;
    #1;
  endtask

  task automatic read_all();
    bit [7:0] bytes [$];
    trace_decoder dec = new();
    int n;
    while (!idle) idle_cycle();
    idle_cycle();
    n = int'(trace_words);
    for (int i = 0; i < n; i++) begin
      read = 1;
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) bytes.push_back(rdata[8*k +: 8]);
      @(negedge clk);
    end
    read = 0;
    items.delete();
    dec.parse(bytes, items);
    checks++;
    if (dec.errors != 0) begin failures++; $display("FAIL parse errors"); end
  endtask

  function automatic bit same(item_t a, item_t b);
    return a.c_valid == b.c_valid && a.p_valid == b.p_valid && a.a_valid == b.a_valid &&
           a.d_valid == b.d_valid && a.write == b.write &&
           (!a.c_valid || a.ctrl == b.ctrl) && (!a.p_valid || {a.pt, a.pb} == {b.pt, b.pb}) &&
           (!a.a_valid || a.da == b.da) && (!a.d_valid || a.dv == b.dv);
  endfunction

  task automatic compare(string name, bit exact);
    int j = 0, n = 0; bit ok = 1;
    foreach (items[i]) begin
      if (items[i].is_mode) begin n_modes++; continue; end
      n++;
      if (exact) begin
        if (j >= exp_items.size() || !same(items[i], exp_items[j])) begin
          if (ok) $display("  first mismatch at item %0d: read c%b%h p%b%h/%h a%b%h d%b%h w%b, expected c%b%h p%b%h/%h a%b%h d%b%h w%b", j,
            items[i].c_valid, items[i].ctrl, items[i].p_valid, items[i].pt, items[i].pb, items[i].a_valid, items[i].da, items[i].d_valid, items[i].dv, items[i].write,
            exp_items[j].c_valid, exp_items[j].ctrl, exp_items[j].p_valid, exp_items[j].pt, exp_items[j].pb, exp_items[j].a_valid, exp_items[j].da, exp_items[j].d_valid, exp_items[j].dv, exp_items[j].write);
          ok = 0;
        end
        j++;
      end else begin
        while (j < exp_items.size() && !same(items[i], exp_items[j])) j++;
        if (j >= exp_items.size()) ok = 0;
        j++;
      end
    end
    if (exact && j != exp_items.size()) ok = 0;
    checks++;
    if (!ok || n == 0) begin failures++; $display("FAIL %s: %0d items read, %0d sent", name, n, exp_items.size()); end
  endtask

  initial begin
    edec = new();
    rec = '0; sync_next = 0; cur_mode = MODE_FC;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // P1: sparse records, exact read-back
    send(1, 0);
    for (int i = 0; i < 30; i++) begin send(0, 0); repeat (6) idle_cycle(); end
    send(0, 1);
    read_all();
    compare("P1", 1);
    checks++;
    if (lost_count != 0 || wrapped || full) begin failures++; $display("FAIL P1 flags"); end

    // P2: a record every cycle
    exp_items.delete();
    send(1, 0);
    for (int i = 0; i < 40; i++) send(0, 0);
    send(0, 1);
    read_all();
    compare("P2", 0);
    checks++;
    if (lost_count == 0 || n_resync == 0) begin failures++; $display("FAIL P2 no overflow"); end

    // P3: backward trace wraps the buffer; the read-out starts at the oldest
    // sync point left and must decode into the newest records, in order
    backward = 1;
    exp_items.delete();
    send(1, 0);
    for (int i = 0; i < 200; i++) begin send(0, 0); repeat (3) idle_cycle(); end
    send(0, 1);
    while (!idle) idle_cycle();
    checks++;
    if (!wrapped || full || trace_words < 7'd40 || trace_words > 7'd64) begin
      failures++; $display("FAIL P3 wrapped=%b words=%0d", wrapped, trace_words);
    end
    read_all();
    compare("P3", 0);
    checks++;
    if (items.size() == 0 || !same(items[items.size() - 1], exp_items[exp_items.size() - 1])) begin
      failures++; $display("FAIL P3 newest record missing");
    end
    // the items read must be a gap-free tail of what was sent
    begin
      int k;
      bit ok;
      k = exp_items.size() - 1;
      ok = 1;
      for (int i = items.size() - 1; i >= 0; i--) begin
        if (items[i].is_mode) continue;
        if (k < 0 || !same(items[i], exp_items[k])) begin
          if (ok) $display("  tail mismatch: read item %0d of %0d, expected item %0d of %0d, lost %0d", i, items.size(), k, exp_items.size(), lost_count);
          ok = 0;
        end
        k--;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL P3 read-out is not the newest part of the trace"); end
    end

    // P4: forward trace fills the buffer and stops
    backward = 0;
    send(1, 0);
    for (int i = 0; i < 200; i++) begin send(0, 0); repeat (3) idle_cycle(); end
    send(0, 1);
    while (!idle) idle_cycle();
    checks++;
    if (wrapped || !full || trace_words != 7'd64) begin failures++; $display("FAIL P4 full=%b words=%0d", full, trace_words); end

    checks++;
    if (n_modes < 3) begin failures++; $display("FAIL mode packets %0d", n_modes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
