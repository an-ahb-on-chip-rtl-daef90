// tb_addr_comp: drives looping instruction fetch streams through the three
// phase program address compressor. Each code it emits is decoded with the
// reference decoder and must give the (target, branch) pair of the run that
// the bench's own run tracker found; dictionary hits and slicing must both
// occur, and sliced pairs must keep no more bytes than needed.
module tb_addr_comp;
  import tracer_pkg::*;
  import tb_trace_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, flush = 0;
  logic [31:0] addr = '0;
  logic [2:0] size = 3'd2;
  logic [1:0] enc;
  logic [7:0] idx;
  logic [2:0] t_n, b_n;
  logic [31:0] t, b;
  int checks = 0, failures = 0, nidx = 0, nslice = 0;
  bit m_open; bit [31:0] m_t, m_l, s_prev;
  trace_decoder dec;

  addr_comp dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bytes_needed(bit [31:0] x, bit [31:0] y);
    int n = 0;
    for (int s = 0; s < 4; s++) if (x[8*s +: 8] != y[8*s +: 8]) n = s + 1;
    return n;
  endfunction

  task automatic step(bit v, bit [31:0] a, bit f, bit c);
    bit seq, ep; bit [63:0] got;
    @(negedge clk);
    valid = v; addr = a; flush = f && !v; clear = c;
    #1;
    if (c) begin dec.restart(); m_open = 0; s_prev = 0; end
    seq = m_open && a == m_l + 4;
    ep  = m_open && ((v && !seq) || (flush && !v));
    checks++;
    if ((enc != PENC_NONE) !== ep) begin
      failures++; $display("FAIL pair flag a=%h enc=%0d exp=%b", a, enc, ep);
    end else if (ep) begin
      got = dec.prog(enc, idx, int'(t_n), t, int'(b_n), b);
      if (got !== {m_t, m_l}) begin
        failures++; $display("FAIL pair %h exp %h_%h", got, m_t, m_l);
      end
      if (enc == PENC_IDX) nidx++;
      else begin
        nslice++;
        checks++;
        if (int'(t_n) != bytes_needed(m_t, s_prev) || int'(b_n) != bytes_needed(m_l, m_t)) begin
          failures++; $display("FAIL slice counts %0d %0d", t_n, b_n);
        end
        s_prev = m_l;
      end
    end
    if (v) begin if (!seq) m_t = a; m_open = 1; m_l = a; end
    else if (flush) m_open = 0;
  endtask

  initial begin
    bit [31:0] pc;
    bit [31:0] heads [6] = '{32'h100, 32'h180, 32'h400, 32'h1000, 32'h8000, 32'h0004_2000};
    dec = new();
    m_open = 0; s_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pc = 32'h100;
    for (int i = 0; i < 6000; i++) begin
      bit v;
      v = ($urandom % 4) != 0;
      step(v, pc, ($urandom % 300) == 0, ($urandom % 1000) == 0);
      if (v) begin
        if (($urandom % 6) == 0)
          pc = (($urandom % 8) == 0) ? ($urandom & 32'hFFFF_FFFC) : heads[$urandom % 6];
        else pc = pc + 4;
      end
    end
    checks++;
    if (nidx < 50 || nslice < 50) begin failures++; $display("FAIL coverage idx %0d slice %0d", nidx, nslice); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
