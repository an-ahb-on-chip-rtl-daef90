// tb_ctrl_comp: a repeating set of control words must be coded as raw the
// first time and as the index of its dictionary entry afterwards; the raw
// word must be passed unchanged. Reference: dictionary model in the bench.
module tb_ctrl_comp;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [CTRL_W-1:0] ctrl = '0;
  logic [1:0] enc;
  logic [7:0] idx;
  logic [CTRL_W-1:0] raw;
  int checks = 0, failures = 0, nidx = 0, nraw = 0;
  logic [CTRL_W-1:0] m_e [16];
  logic [15:0] m_u; int m_p;

  ctrl_comp dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v, logic [CTRL_W-1:0] w);
    logic h; int ix;
    @(negedge clk);
    valid = v; ctrl = w;
    #1;
    h = 0; ix = 0;
    for (int i = 0; i < 16; i++) if (!h && m_u[i] && m_e[i] == w) begin h = 1; ix = i; end
    checks++;
    if (!v) begin
      if (enc !== CENC_NONE) failures++;
    end else if (h) begin
      nidx++;
      if (enc !== CENC_IDX || idx !== 8'(ix)) begin failures++; $display("FAIL idx %h", w); end
    end else begin
      nraw++;
      if (enc !== CENC_RAW || raw !== w) begin failures++; $display("FAIL raw %h", w); end
    end
    if (v && !h) begin m_u[m_p] = 1; m_e[m_p] = w; m_p = (m_p + 1) % 16; end
  endtask

  initial begin
    logic [CTRL_W-1:0] set [24];
    m_u = 0; m_p = 0;
    for (int i = 0; i < 24; i++) set[i] = CTRL_W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(1, set[0]);
    checks++; if (enc !== CENC_RAW) failures++;
    step(1, set[0]);
    checks++; if (enc !== CENC_IDX || idx !== 8'd0) failures++;
    for (int i = 0; i < 3000; i++) step(($urandom % 4) != 0, set[($urandom % 8) + (($urandom % 10) == 0 ? 16 : 0)]);
    checks++; if (nidx < 100 || nraw < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
