// ahb_xfer_tracker: joins the address and data phases of AHB transfers.
//
// AHB is pipelined: the address and control of a transfer are on the bus one
// cycle (or more, with wait states) before its data. The tracker latches the
// address phase of every NONSEQ/SEQ transfer that the bus accepts (HREADY
// high) and reports the whole transfer in the cycle its data phase completes
// (HREADY high again), with the write or read data of that cycle. A two-cycle
// ERROR/RETRY/SPLIT response is reported in its second cycle with its HRESP.
// This helper is this design's; the event trigger and the abstraction module
// both take their transfers from it.
//
// Timing: x is combinational in the data-phase cycle.
module ahb_xfer_tracker
  import tracer_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [3:0]  HMASTER,
  input  logic [31:0] HWDATA,
  input  logic [31:0] HRDATA,
  input  logic        HREADY,
  input  logic [1:0]  HRESP,
  output xfer_t       x
);
  logic             pend;
  logic [31:0]      a_addr;
  logic [ACS_W-1:0] a_acs;
  logic             a_write;
  logic [2:0]       a_size;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      pend    <= 1'b0;
      a_addr  <= '0;
      a_acs   <= '0;
      a_write <= 1'b0;
      a_size  <= '0;
    end else if (HREADY) begin
      pend <= HTRANS[1];
      if (HTRANS[1]) begin
        a_addr  <= HADDR;
        a_acs   <= {HWRITE, HSIZE, HBURST, HMASTER};
        a_write <= HWRITE;
        a_size  <= HSIZE;
      end
    end
  end

  always_comb begin
    x.done  = pend && HREADY;
    x.addr  = a_addr;
    x.data  = a_write ? HWDATA : HRDATA;
    x.acs   = a_acs;
    x.write = a_write;
    x.size  = a_size;
    x.resp  = HRESP;
  end
endmodule
