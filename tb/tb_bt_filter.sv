// tb_bt_filter: feeds instruction fetch streams made of sequential runs with
// jumps between them and checks that exactly one (target, branch) pair is
// reported per finished run, with the run's first and last address, and
// that flush reports the open run.
module tb_bt_filter;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, flush = 0;
  logic [31:0] addr = '0;
  logic [2:0] size = 3'd2;
  logic pair_valid;
  logic [31:0] target, branch;
  int checks = 0, failures = 0, pairs = 0;
  logic m_open; logic [31:0] m_t, m_l; logic [2:0] m_s;

  bt_filter dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v, logic [31:0] a, logic [2:0] s, logic f, logic c);
    logic seq, ep;
    @(negedge clk);
    valid = v; addr = a; size = s; flush = f; clear = c;
    #1;
    seq = m_open && !c && a == m_l + (32'd1 << m_s);
    ep  = m_open && !c && ((v && !seq) || (f && !v));
    checks++;
    if (pair_valid !== ep || (ep && (target !== m_t || branch !== m_l))) begin
      failures++;
      $display("FAIL a=%h pv=%b/%b t=%h/%h b=%h/%h", a, pair_valid, ep, target, m_t, branch, m_l);
    end
    if (ep) pairs++;
    if (v) begin m_open = 1; m_l = a; m_s = s; if (!seq) m_t = a; end
    else if (f || c) m_open = 0;
  endtask

  initial begin
    logic [31:0] pc;
    m_open = 0; m_t = 0; m_l = 0; m_s = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a loop 0x100..0x10C run three times, then flush
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 4; i++) step(1, 32'h100 + 4 * i, 2, 0, 0);
    checks++; if (pairs != 2) begin failures++; $display("FAIL loop pairs %0d", pairs); end
    step(0, 0, 2, 1, 0);
    checks++; if (pairs != 3) failures++;
    pc = 32'h1000;
    for (int i = 0; i < 5000; i++) begin
      if (($urandom % 6) == 0) pc = ($urandom % 4096) * 2;
      step(($urandom % 3) != 0, pc, 3'(1 + ($urandom % 2)), ($urandom % 100) == 0, ($urandom % 200) == 0);
      if (valid) pc = pc + (32'd1 << size);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
