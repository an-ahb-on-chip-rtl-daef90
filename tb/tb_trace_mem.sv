// tb_trace_mem: writes random words to random addresses while reading others
// and checks every read (one cycle latency) against a model array.
module tb_trace_mem;
  localparam int D = 64;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [D];
  logic [D-1:0] written = '0;
  int checks = 0, failures = 0;

  trace_mem #(.DW(32), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp; logic chk;
    chk = 0; exp = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL rd %h exp %h", rdata, exp); end
      end
      we = i < 64 || ($urandom % 2); waddr = i < 64 ? 6'(i) : 6'($urandom);
      wdata = $urandom;
      re = i >= 64 && ($urandom % 2); raddr = 6'($urandom);
      chk = re; exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
