// addr_comp: program address compression in three phases.
//
//  1. Branch/target filtering (bt_filter) turns the stream of instruction
//     fetch addresses into one (target, branch) pair per sequential run.
//  2. A dictionary (dict_comp) of recent pairs replaces a pair it already
//     holds with its index: loops repeat the same pairs.
//  3. A pair the dictionary missed is sliced (addr_slicer): the target keeps
//     only the slices that differ from the previously recorded address, the
//     branch only those that differ from the target.
// The three phases and their order follow the paper; the dictionary size,
// the slice width and the output code are this design's.
//
// Timing: combinational from the fetch to the code; all histories update at
// the clock edge. enc is PENC_NONE in cycles without a finished run.
module addr_comp
  import tracer_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [31:0] addr,
  input  logic [2:0]  size,
  input  logic        flush,
  output logic [1:0]  enc,
  output logic [7:0]  idx,
  output logic [2:0]  t_n,
  output logic [31:0] t,
  output logic [2:0]  b_n,
  output logic [31:0] b
);
  localparam int unsigned IW = (DICT_ENTRIES > 1) ? $clog2(DICT_ENTRIES) : 1;

  logic          pair_valid;
  logic [31:0]   target, branch;
  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          miss;

  bt_filter u_filter (
    .clk, .rst_n, .clear, .valid, .addr, .size, .flush,
    .pair_valid, .target, .branch
  );

  dict_comp #(.W(64), .ENTRIES(DICT_ENTRIES)) u_dict (
    .clk, .rst_n, .clear,
    .valid (pair_valid),
    .key   ({target, branch}),
    .hit,
    .idx   (hit_idx)
  );

  assign miss = pair_valid && !hit;

  addr_slicer #(.AW(32), .SLICE_W(8)) u_slicer (
    .clk, .rst_n, .clear,
    .a_valid (miss), .a (target),
    .b_valid (miss), .b (branch),
    .a_n     (t_n),
    .b_n     (b_n)
  );

  assign t   = target;
  assign b   = branch;
  assign idx = 8'(hit_idx);
  assign enc = !pair_valid ? PENC_NONE : (hit ? PENC_IDX : PENC_SLICE);
endmodule
