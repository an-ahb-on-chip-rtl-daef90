// tb_compression: random abstraction records (control words from a small
// set, program fetches in loops, data transfers with near and far values),
// occasional trace starts and resync requests. Every compressed record is
// decoded with the reference decoder one cycle later and must give back the
// record's control word, data address and data value; program pairs must
// match the bench's run tracker, and sync must mark each history restart.
module tb_compression;
  import tracer_pkg::*;
  import tb_trace_pkg::*;
  logic clk = 0, rst_n = 0, resync_req = 0;
  abs_rec_t rec;
  comp_rec_t out;
  int checks = 0, failures = 0, nsync = 0, npairs = 0;
  trace_decoder dec;
  abs_rec_t prev_rec;
  bit exp_sync, pend;
  bit m_open; bit [31:0] m_t, m_l;
  bit [63:0] exp_pair; bit exp_pv;

  compression dut (.*);

  always #5 clk = ~clk;
  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [CTRL_W-1:0] cset [6];
    bit [31:0] pc = 32'h200, da = 32'h2000_0000, dv = 32'h55;
    dec = new();
    foreach (cset[i]) cset[i] = CTRL_W'($urandom);
    rec = '0; prev_rec = '0; pend = 0; m_open = 0; exp_pv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      abs_rec_t r;
      bit c, seq;
      @(negedge clk);
      // check the output for the record of the previous cycle
      if (prev_rec.valid) begin
        checks++;
        if (out.valid !== 1'b1 || out.sync !== exp_sync || out.start !== prev_rec.start ||
            out.mode !== prev_rec.mode || out.flush !== prev_rec.flush) begin
          failures++; $display("FAIL flags sync=%b/%b", out.sync, exp_sync);
        end
        if (out.sync) begin dec.restart(); nsync++; end
        if (prev_rec.ctrl_valid) begin
          checks++;
          if (dec.ctrl(out.c_enc, out.c_idx, out.c_raw) !== prev_rec.ctrl) begin
            failures++; $display("FAIL ctrl");
          end
        end else if (out.c_enc != CENC_NONE) failures++;
        if (prev_rec.da_valid) begin
          checks++;
          if (dec.data(0, out.a_enc, out.a_pay) !== prev_rec.da ||
              dec.data(1, out.d_enc, out.d_pay) !== prev_rec.dv) begin
            failures++; $display("FAIL data %h %h", prev_rec.da, prev_rec.dv);
          end
        end
        checks++;
        if ((out.p_enc != PENC_NONE) !== exp_pv) begin
          failures++; $display("FAIL pair flag");
        end else if (exp_pv) begin
          npairs++;
          if (dec.prog(out.p_enc, out.p_idx, int'(out.p_tn), out.p_t, int'(out.p_bn), out.p_b) !== exp_pair) begin
            failures++; $display("FAIL pair");
          end
        end
      end else begin
        checks++;
        if (out.valid) begin failures++; $display("FAIL spurious output"); end
      end
      // new record
      r = '0;
      r.valid = ($urandom % 5) != 0;
      r.start = r.valid && ($urandom % 400) == 0;
      r.mode  = trace_mode_e'($urandom % 5);
      r.flush = r.valid && !r.start && ($urandom % 150) == 0;
      if (!r.flush) begin
        r.ctrl_valid = ($urandom % 3) != 0;
        r.ctrl = cset[$urandom % 6];
        case ($urandom % 3)
          0: begin
            r.pa_valid = 1; r.pa_size = 2;
            pc = (($urandom % 7) == 0) ? 32'h200 + (($urandom % 4) << 6) : pc + 4;
            r.pa = pc;
          end
          1: begin
            r.da_valid = 1; r.write = $urandom % 2;
            da = (($urandom % 5) == 0) ? $urandom : da + 4;
            dv = (($urandom % 3) == 0) ? $urandom : dv + ($urandom % 70000);
            r.da = da; r.dv = dv;
          end
          default: ;
        endcase
      end
      resync_req = ($urandom % 200) == 0;
      rec = r;
      c = r.valid && (r.start || pend || resync_req);
      exp_sync = c;
      pend = (pend || resync_req) && !r.valid;
      // program run model
      if (c) m_open = 0;
      seq = m_open && r.pa == m_l + 4;
      exp_pv = r.valid && m_open && ((r.pa_valid && !seq) || r.flush);
      exp_pair = {m_t, m_l};
      if (r.valid && r.pa_valid) begin if (!seq) m_t = r.pa; m_open = 1; m_l = r.pa; end
      else if (r.valid && r.flush) m_open = 0;
      prev_rec = r;
    end
    checks++;
    if (nsync < 5 || npairs < 50) begin failures++; $display("FAIL coverage %0d %0d", nsync, npairs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
