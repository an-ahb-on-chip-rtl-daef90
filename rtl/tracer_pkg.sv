// tracer_pkg: types and constants shared by the AHB bus tracer.
//
// The tracer watches an AMBA AHB bus and writes a compressed trace into an
// on-chip memory. The signals it watches are split into the four classes used
// throughout the design: program address, data address/value, access control
// signals (ACS) and protocol control signals (PCS). The five trace modes
// combine two timing levels (cycle, transaction) with three signal levels
// (full signal, bus state, master state) and follow the paper; the bit
// layouts of the ACS/PCS words, the bus-state encoding and all record and
// packet formats below are this design's own choices.
package tracer_pkg;

  // ---------------------------------------------------------------- AHB codes
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // ---------------------------------------------------------------- modes
  // FC full signal/cycle, FT full signal/transaction, BC bus state/cycle,
  // BT bus state/transaction, MT master state/transaction.
  typedef enum logic [2:0] {
    MODE_FC = 3'd0,
    MODE_FT = 3'd1,
    MODE_BC = 3'd2,
    MODE_BT = 3'd3,
    MODE_MT = 3'd4
  } trace_mode_e;

  // Bus state used by the bus-state and master-state levels: the protocol
  // control signals of one cycle encoded into four bits.
  typedef enum logic [3:0] {
    BS_IDLE        = 4'd0,  // no transfer, no pending request
    BS_WAIT_MASTER = 4'd1,  // a master requests the bus but is not granted
    BS_BUSY        = 4'd2,
    BS_NONSEQ      = 4'd3,
    BS_SEQ         = 4'd4,
    BS_WAIT        = 4'd5,  // slave inserts wait states
    BS_ERROR       = 4'd6,
    BS_RETRY       = 4'd7,
    BS_SPLIT       = 4'd8
  } bus_state_e;

  localparam int ACS_W  = 11;  // {HWRITE, HSIZE[2:0], HBURST[2:0], HMASTER[3:0]}
  localparam int PCS_W  = 10;  // {HTRANS, HREADY, HRESP, HBUSREQ, HGRANT, HLOCK, HMASTLOCK, HSEL0}
  localparam int CTRL_W = ACS_W + PCS_W;

  // Completed AHB transfer (address phase joined with its data phase).
  typedef struct packed {
    logic        done;     // the data phase completed this cycle
    logic [31:0] addr;
    logic [31:0] data;     // HWDATA for writes, HRDATA for reads
    logic [ACS_W-1:0] acs; // access control of the address phase
    logic        write;
    logic [2:0]  size;
    logic [1:0]  resp;
  } xfer_t;

  // Record produced by the abstraction module, one per traced event.
  typedef struct packed {
    logic              valid;
    logic              start;     // first record of a trace: histories restart
    logic              flush;     // trace stops after this record
    trace_mode_e       mode;
    logic              ctrl_valid;
    logic [CTRL_W-1:0] ctrl;      // {ACS, PCS} or {ACS, 6'b0, bus state}
    logic              pa_valid;  // program address (instruction fetch)
    logic [31:0]       pa;
    logic [2:0]        pa_size;
    logic              da_valid;  // data address and value
    logic [31:0]       da;
    logic [31:0]       dv;
    logic              write;
  } abs_rec_t;

  // ---------------------------------------------------------------- encodings
  // Control field.
  localparam logic [1:0] CENC_NONE = 2'd0, CENC_IDX = 2'd1, CENC_RAW = 2'd2;
  // Program address field.
  localparam logic [1:0] PENC_NONE = 2'd0, PENC_IDX = 2'd1, PENC_SLICE = 2'd2;
  // Data difference field.
  typedef enum logic [2:0] {
    DENC_NONE   = 3'd0,
    DENC_ZERO   = 3'd1,  // same as previous value, no payload
    DENC_POS8   = 3'd2,  // +difference, 1 byte
    DENC_NEG8   = 3'd3,  // -difference, 1 byte
    DENC_POS16  = 3'd4,  // +difference, 2 bytes
    DENC_NEG16  = 3'd5,  // -difference, 2 bytes
    DENC_RAW32  = 3'd6   // present value, 4 bytes
  } denc_e;

  // Compressed record handed from the compression module to the packer.
  typedef struct packed {
    logic              valid;
    logic              flush;
    logic              start;     // first record of a trace
    logic              sync;      // compressed with empty histories
    trace_mode_e       mode;
    logic              write;
    logic [1:0]        c_enc;
    logic [7:0]        c_idx;
    logic [CTRL_W-1:0] c_raw;
    logic [1:0]        p_enc;
    logic [7:0]        p_idx;
    logic [2:0]        p_tn;      // bytes of the target address kept by slicing
    logic [31:0]       p_t;
    logic [2:0]        p_bn;      // bytes of the branch address kept by slicing
    logic [31:0]       p_b;
    denc_e             a_enc;
    logic [31:0]       a_pay;
    denc_e             d_enc;
    logic [31:0]       d_pay;
  } comp_rec_t;

  // Bytes a data difference code carries.
  function automatic int unsigned denc_bytes(denc_e e);
    case (e)
      DENC_POS8, DENC_NEG8:   return 1;
      DENC_POS16, DENC_NEG16: return 2;
      DENC_RAW32:             return 4;
      default:                return 0;
    endcase
  endfunction

  // ---------------------------------------------------------------- events
  localparam int DEPTH_W = 16;

  typedef struct packed {
    logic              en;
    logic              on_viol;    // trigger on a protocol violation
    logic              backward;   // 1: backward trace (stop), 0: forward (start)
    trace_mode_e       mode;
    logic [DEPTH_W-1:0] depth;     // cycles traced after the trigger
    logic [31:0]       addr_val;
    logic [31:0]       addr_mask;  // 1 = bit takes part in the compare
    logic [31:0]       data_val;
    logic [31:0]       data_mask;
    logic [ACS_W-1:0]  ctrl_val;
    logic [ACS_W-1:0]  ctrl_mask;
  } event_t;

endpackage
