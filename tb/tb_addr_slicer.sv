// tb_addr_slicer: checks the slice counts of the slicing compressor,
// including the 0x0000_8066 -> 0x0000_8020 example (one byte kept), pairs of
// addresses sliced in one cycle, and clear. The expected counts are worked
// out byte by byte in the testbench.
module tb_addr_slicer;
  logic clk = 0, rst_n = 0, clear = 0, a_valid = 0, b_valid = 0;
  logic [31:0] a = '0, b = '0;
  logic [2:0] a_n, b_n;
  logic [31:0] m_prev;
  int checks = 0, failures = 0;

  addr_slicer dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_n(logic [31:0] x, logic [31:0] y);
    int n = 0;
    for (int s = 0; s < 4; s++) if (x[8*s +: 8] != y[8*s +: 8]) n = s + 1;
    return n;
  endfunction

  task automatic step(logic av, logic [31:0] ai, logic bv, logic [31:0] bi, logic c);
    logic [31:0] base;
    @(negedge clk);
    a_valid = av; a = ai; b_valid = bv; b = bi; clear = c;
    #1;
    base = c ? 32'h0 : m_prev;
    checks++;
    if (a_n !== 3'(ref_n(ai, base)) || b_n !== 3'(ref_n(bi, ai))) begin
      failures++;
      $display("FAIL a=%h prev=%h a_n=%0d b=%h b_n=%0d", ai, base, a_n, bi, b_n);
    end
    if (av && bv) m_prev = bi; else if (av) m_prev = ai; else if (c) m_prev = 0;
  endtask

  initial begin
    m_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(1, 32'h0000_8066, 0, 0, 0);
    checks++; if (a_n !== 3'd2) failures++;
    step(1, 32'h0000_8020, 0, 0, 0);
    checks++; if (a_n !== 3'd1) begin failures++; $display("FAIL example a_n=%0d", a_n); end
    step(1, 32'h0000_8020, 0, 0, 0);
    checks++; if (a_n !== 3'd0) failures++;
    step(1, 32'h1234_5678, 1, 32'h1234_5690, 0);
    checks++; if (a_n !== 3'd4 || b_n !== 3'd1) failures++;
    step(0, 0, 0, 0, 1);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r = $urandom;
      logic [31:0] x = m_prev ^ (r >> ($urandom % 32));
      step($urandom % 2, x, $urandom % 2, x ^ ($urandom % 300), ($urandom % 40) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
