// tb_dict_comp: checks the dictionary against a reference model kept in the
// testbench (same round-robin replacement): hit flag and index for random
// keys drawn from a small set, so that hits and misses both occur, and the
// clear input.
module tb_dict_comp;
  localparam int W = 8, N = 4;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [W-1:0] key = '0;
  logic hit;
  logic [1:0] idx;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  logic [W-1:0] m_entry [N];
  logic [N-1:0] m_used;
  int m_ptr;

  dict_comp #(.W(W), .ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v, logic c, logic [W-1:0] k);
    logic e_hit; int e_idx;
    @(negedge clk);
    valid = v; clear = c; key = k;
    #1;
    e_hit = 0; e_idx = 0;
    if (!c) for (int i = 0; i < N; i++)
      if (!e_hit && m_used[i] && m_entry[i] == k) begin e_hit = 1; e_idx = i; end
    if (v) begin
      checks++;
      if (hit !== e_hit || (e_hit && idx !== 2'(e_idx))) begin
        failures++;
        $display("FAIL key=%h hit=%b/%b idx=%0d/%0d", k, hit, e_hit, idx, e_idx);
      end
      if (e_hit) hits++; else misses++;
    end
    // update the model
    if (v) begin
      if (c) begin m_used = 1; m_entry[0] = k; m_ptr = 1; end
      else if (!e_hit) begin m_used[m_ptr] = 1; m_entry[m_ptr] = k; m_ptr = (m_ptr + 1) % N; end
    end else if (c) begin m_used = 0; m_ptr = 0; end
  endtask

  initial begin
    m_used = 0; m_ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: fill, hit, replace the oldest
    step(1, 0, 8'h10); step(1, 0, 8'h10); step(1, 0, 8'h20); step(1, 0, 8'h30);
    step(1, 0, 8'h40); step(1, 0, 8'h50); step(1, 0, 8'h10); step(1, 0, 8'h50);
    step(0, 1, 8'h00); step(1, 0, 8'h50);
    step(1, 1, 8'h60); step(1, 0, 8'h60); step(1, 0, 8'h20);
    for (int i = 0; i < 2000; i++)
      step(($urandom % 4) != 0, ($urandom % 50) == 0, 8'($urandom % 7));
    checks++;
    if (hits < 100 || misses < 100) begin failures++; $display("FAIL coverage %0d %0d", hits, misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
