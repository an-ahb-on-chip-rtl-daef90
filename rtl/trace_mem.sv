// trace_mem: on-chip trace memory.
//
// A simple dual-port RAM: the packer writes one 32-bit trace word per cycle
// through the write port while the read port lets the trace be read out.
// The paper only names the trace memory; its size and the two ports are
// this design's choices (1024 words fit the block RAM of a small FPGA).
//
// Timing: write at the clock edge when we is high; rdata is registered, valid
// the cycle after re. The contents are not reset.
module trace_mem #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
