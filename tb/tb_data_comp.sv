// tb_data_comp: checks the difference coder: zero, +/- differences of one
// and two bytes, the 65535 limit (65535 still a difference, 65536 raw) and
// random values, against a model computed in the testbench.
module tb_data_comp;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [31:0] value = '0;
  denc_e enc;
  logic [31:0] payload;
  logic [31:0] m_prev;
  int checks = 0, failures = 0;
  int seen [7];

  data_comp dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v, logic [31:0] val, logic c);
    longint d; denc_e e; logic [31:0] p;
    @(negedge clk);
    valid = v; value = val; clear = c;
    #1;
    d = longint'($signed(val - (c ? 32'h0 : m_prev)));  // 32-bit modular difference
    if (!v)                  begin e = DENC_NONE;  p = 0; end
    else if (d == 0)         begin e = DENC_ZERO;  p = 0; end
    else if (d > 65535 || d < -65535) begin e = DENC_RAW32; p = val; end
    else if (d > 0)          begin e = (d <= 255) ? DENC_POS8 : DENC_POS16; p = 32'(d); end
    else                     begin e = (-d <= 255) ? DENC_NEG8 : DENC_NEG16; p = 32'(-d); end
    checks++;
    if (enc !== e || (e != DENC_NONE && e != DENC_ZERO && payload !== p)) begin
      failures++;
      $display("FAIL val=%h prev=%h enc=%0d/%0d pay=%h/%h", val, m_prev, enc, e, payload, p);
    end
    seen[e]++;
    if (v) m_prev = val; else if (c) m_prev = 0;
  endtask

  initial begin
    m_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(1, 32'h0000_1000, 0);
    step(1, 32'h0000_1000, 0);
    step(1, 32'h0000_1010, 0);
    step(1, 32'h0000_1000, 0);
    step(1, 32'h0000_1000 + 65535, 0);
    checks++; if (enc !== DENC_POS16) failures++;
    step(1, 32'h0000_1000 + 65535 + 65536, 0);
    checks++; if (enc !== DENC_RAW32 || payload !== 32'h0000_1000 + 65535 + 65536) failures++;
    step(1, 32'h0000_0800, 0);
    step(0, 32'h0, 1);
    step(1, 32'h0000_0005, 0);
    checks++; if (enc !== DENC_POS8 || payload !== 32'd5) failures++;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] v;
      case ($urandom % 4)
        0: v = m_prev;
        1: v = m_prev + ($urandom % 512) - 256;
        2: v = m_prev + ($urandom % 140000) - 70000;
        default: v = $urandom;
      endcase
      step(($urandom % 5) != 0, v, ($urandom % 60) == 0);
    end
    for (int e = 1; e < 7; e++) begin
      checks++;
      if (seen[e] == 0) begin failures++; $display("FAIL code %0d never seen", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
