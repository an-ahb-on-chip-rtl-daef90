// ahb_tracer_top: AHB on-chip bus tracer with real-time compression.
//
// The tracer sits on an AMBA AHB bus next to the masters and slaves it
// observes and records what happens on the bus into an on-chip trace memory,
// compressed on the fly so that a small memory holds a long trace. It is
// built from four stages:
//   event generation  event_regs + event_trigger: trigger conditions start,
//                     stop and switch the trace mode (FC, FT, BC, BT, MT)
//   abstraction       abstraction: classifies the bus signals and keeps the
//                     amount of detail the mode asks for
//   compression       compression: program address (branch/target filter,
//                     dictionary, slicing), data difference coding and a
//                     control-signal dictionary
//   packing           packer: headers, mode-change packets and the circular
//                     trace buffer in trace_mem
// The port names of the bus side and read/data_read/SYS_RST follow the
// tracer's top-level symbol in the paper. HREADY and HRESP are inputs
// here: the tracer observes the bus response and drives no response itself
// (its register port, selected by HSEL0, is zero-wait and always OKAY).
// prot_violation (from an external AHB protocol checker) and the status
// outputs are this design's additions.
//
// Read-out: once trace_done is high, each cycle with read high returns the next
// trace word on data_read one cycle later, oldest word first; trace_words
// tells how many words are valid.
module ahb_tracer_top
  import tracer_pkg::*;
#(
  parameter int unsigned NUM_EVENTS        = 4,
  parameter int unsigned ADDR_DICT_ENTRIES = 16,
  parameter int unsigned CTRL_DICT_ENTRIES = 16,
  parameter int unsigned MEM_DEPTH         = 1024,
  parameter int unsigned ACC_BYTES         = 32,
  localparam int unsigned AW               = $clog2(MEM_DEPTH)
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        SYS_RST,         // active high: restarts the tracer, keeps its registers
  input  logic [31:0] HADDR,
  input  logic [2:0]  HBURST,
  input  logic [3:0]  HMASTER,
  input  logic [31:0] HRDATA,
  input  logic [2:0]  HSIZE,
  input  logic [1:0]  HTRANS,
  input  logic [31:0] HWDATA,
  input  logic        HBUSREQ,
  input  logic        HGRANT,
  input  logic        HLOCK,
  input  logic        HMASTLOCK,
  input  logic        HSEL0,
  input  logic        HWRITE,
  input  logic        HREADY,
  input  logic [1:0]  HRESP,
  input  logic        prot_violation,  // from an AHB protocol checker
  input  logic        read,
  output logic [31:0] data_read,
  output logic        trace_active,
  output logic        trace_done,
  output logic [AW:0] trace_words,
  output logic        trace_wrapped,
  output logic        trace_full,
  output logic [15:0] lost_packets
);
  logic        rst_n;
  xfer_t       x;
  event_t      events [NUM_EVENTS];
  logic        arm, stop, clear;
  trace_mode_e bwd_mode, mode;
  logic [31:0] code_base, code_mask;
  logic        trace_en, backward;
  abs_rec_t    rec;
  comp_rec_t   crec;
  logic        resync_req;
  logic        trig_done, pack_idle;
  logic          mem_we, mem_re;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [31:0]   mem_wdata;

  // SYS_RST restarts the trace path; the event registers keep their contents.
  assign rst_n = HRESETn && !SYS_RST;

  ahb_xfer_tracker u_xfer (
    .HCLK, .HRESETn (rst_n), .HADDR, .HTRANS, .HWRITE, .HSIZE, .HBURST, .HMASTER,
    .HWDATA, .HRDATA, .HREADY, .HRESP, .x
  );

  event_regs #(.NUM_EVENTS(NUM_EVENTS)) u_regs (
    .HCLK, .HRESETn, .HSEL0, .HADDR, .HTRANS, .HWRITE, .HREADY, .HWDATA,
    .events, .arm, .stop, .clear, .bwd_mode, .code_base, .code_mask
  );

  event_trigger #(.NUM_EVENTS(NUM_EVENTS)) u_trigger (
    .clk (HCLK), .rst_n, .events, .x, .prot_violation,
    .arm, .stop, .clear, .bwd_mode,
    .trace_en, .mode, .backward, .done (trig_done)
  );

  abstraction u_abs (
    .HCLK, .HRESETn (rst_n), .HTRANS, .HWRITE, .HSIZE, .HBURST, .HMASTER,
    .HREADY, .HRESP, .HBUSREQ, .HGRANT, .HLOCK, .HMASTLOCK, .HSEL0,
    .x, .trace_en, .mode, .code_base, .code_mask, .rec
  );

  compression #(
    .ADDR_DICT_ENTRIES(ADDR_DICT_ENTRIES), .CTRL_DICT_ENTRIES(CTRL_DICT_ENTRIES)
  ) u_comp (
    .clk (HCLK), .rst_n, .rec, .resync_req, .out (crec)
  );

  packer #(.MEM_DEPTH(MEM_DEPTH), .ACC_BYTES(ACC_BYTES)) u_pack (
    .clk (HCLK), .rst_n, .rec (crec), .backward, .read, .resync_req,
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr,
    .trace_words, .wrapped (trace_wrapped), .full (trace_full), .lost_count (lost_packets),
    .idle (pack_idle)
  );

  trace_mem #(.DW(32), .DEPTH(MEM_DEPTH)) u_mem (
    .clk (HCLK), .we (mem_we), .waddr (mem_waddr), .wdata (mem_wdata),
    .re (mem_re), .raddr (mem_raddr), .rdata (data_read)
  );

  assign trace_active = trace_en;
  // the trace is ready for read-out once the last record has left the pipeline
  assign trace_done   = trig_done && !rec.valid && !crec.valid && pack_idle;
endmodule
