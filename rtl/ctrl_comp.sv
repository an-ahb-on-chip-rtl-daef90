// ctrl_comp: dictionary compression of the control signal word.
//
// The access control signals (HWRITE, HSIZE, HBURST, HMASTER) and the
// protocol control signals (HTRANS, HREADY, HRESP, bus request/grant/lock,
// HSEL0), or their bus-state code, form one control word per record. A few
// combinations repeat often and most never occur, so a dictionary of recent
// words replaces a word it holds with its index; a new word is recorded raw
// and stored. Choosing a dictionary for the control signals follows the
// paper; the word layout and the dictionary size are this design's.
//
// Timing: combinational code, dictionary updated at the clock edge.
module ctrl_comp
  import tracer_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [CTRL_W-1:0] ctrl,
  output logic [1:0]        enc,
  output logic [7:0]        idx,
  output logic [CTRL_W-1:0] raw
);
  localparam int unsigned IW = (DICT_ENTRIES > 1) ? $clog2(DICT_ENTRIES) : 1;

  logic          hit;
  logic [IW-1:0] hit_idx;

  dict_comp #(.W(CTRL_W), .ENTRIES(DICT_ENTRIES)) u_dict (
    .clk, .rst_n, .clear, .valid, .key (ctrl), .hit, .idx (hit_idx)
  );

  assign enc = !valid ? CENC_NONE : (hit ? CENC_IDX : CENC_RAW);
  assign idx = 8'(hit_idx);
  assign raw = ctrl;
endmodule
