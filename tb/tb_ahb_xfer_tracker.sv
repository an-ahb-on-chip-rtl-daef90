// tb_ahb_xfer_tracker: a random pipelined AHB master (IDLE, BUSY, NONSEQ and
// SEQ cycles, reads and writes) with random wait states. Every accepted
// address phase is queued; when HREADY ends the following data phase the
// tracker must report exactly that transfer with the data of that cycle, and
// must report nothing in any other cycle.
module tb_ahb_xfer_tracker;
  import tracer_pkg::*;
  logic HCLK = 0, HRESETn = 0, HWRITE = 0, HREADY = 1;
  logic [31:0] HADDR = 0, HWDATA = 0, HRDATA = 0;
  logic [1:0] HTRANS = 0, HRESP = 0;
  logic [2:0] HSIZE = 0, HBURST = 0;
  logic [3:0] HMASTER = 0;
  xfer_t x;
  int checks = 0, failures = 0, n_done = 0, n_wait = 0;

  ahb_xfer_tracker dut (.*);

  always #5 HCLK = ~HCLK;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit [31:0] addr; bit write; bit [2:0] size; bit [ACS_W-1:0] acs; } ap_t;

  initial begin
    ap_t q [$];
    ap_t a;
    bit have;
    repeat (2) @(negedge HCLK);
    HRESETn = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge HCLK);
      // a new address phase only after the previous one was accepted
      if (HREADY) begin
        HTRANS = 2'($urandom); HADDR = $urandom; HWRITE = $urandom;
        HSIZE = 3'($urandom % 3); HBURST = 3'($urandom); HMASTER = 4'($urandom);
      end
      HREADY = ($urandom % 3) != 0;
      HRESP = (($urandom % 10) == 0) ? 2'($urandom) : 2'b00;
      HWDATA = $urandom; HRDATA = $urandom;
      #1;
      have = q.size() != 0;
      if (have) a = q[0];
      checks++;
      if (x.done !== (have && HREADY)) begin
        failures++; if (failures < 6) $display("FAIL cycle %0d done %b", cyc, x.done);
      end else if (x.done) begin
        n_done++;
        checks++;
        if (x.addr !== a.addr || x.write !== a.write || x.size !== a.size || x.acs !== a.acs ||
            x.data !== (a.write ? HWDATA : HRDATA) || x.resp !== HRESP) begin
          failures++; if (failures < 6) $display("FAIL cycle %0d transfer fields", cyc);
        end
      end
      if (have && !HREADY) n_wait++;
      @(posedge HCLK);
      if (HREADY) begin
        if (have) void'(q.pop_front());
        if (HTRANS[1]) q.push_back('{HADDR, HWRITE, HSIZE, {HWRITE, HSIZE, HBURST, HMASTER}});
      end
    end
    checks++;
    if (n_done < 1000 || n_wait < 100) begin failures++; $display("FAIL coverage"); end
    $display("transfers %0d wait cycles %0d", n_done, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
