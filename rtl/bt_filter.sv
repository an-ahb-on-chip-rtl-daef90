// bt_filter: branch/target filtering of the program address stream.
//
// Program addresses are mostly sequential. The filter follows the current
// run of sequential fetches, remembering its first address (the target) and
// its last address (the branch). Nothing is reported while the run goes on;
// when a fetch is not the successor of the previous one, or the trace is
// flushed, the finished run is reported as one (target, branch) pair. The
// target/branch recording follows the paper; "sequential" meaning
// previous address + transfer size, and the flush input, are this design's.
//
// Timing: pair_valid/target/branch are combinational from the current fetch
// and the registered run; the new run starts at the clock edge. clear drops
// the open run without reporting it (histories restart). A flush is taken
// only in a cycle without a fetch.
module bt_filter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,     // a program fetch completed
  input  logic [31:0] addr,
  input  logic [2:0]  size,      // HSIZE of the fetch
  input  logic        flush,     // report the open run
  output logic        pair_valid,
  output logic [31:0] target,
  output logic [31:0] branch
);
  logic        run_open;
  logic [31:0] run_target, run_last;
  logic [2:0]  run_size;
  logic        sequential;

  assign sequential = run_open && !clear && addr == run_last + (32'd1 << run_size);
  assign pair_valid = run_open && !clear && ((valid && !sequential) || (flush && !valid));
  assign target     = run_target;
  assign branch     = run_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_open   <= 1'b0;
      run_target <= '0;
      run_last   <= '0;
      run_size   <= '0;
    end else if (valid) begin
      run_open <= 1'b1;
      run_last <= addr;
      run_size <= size;
      if (!sequential) run_target <= addr;
    end else if (flush || clear) begin
      run_open <= 1'b0;
    end
  end
endmodule
