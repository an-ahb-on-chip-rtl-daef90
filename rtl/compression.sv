// compression: the compression module.
//
// Every record from the abstraction module passes through four compressors
// side by side: program address (addr_comp), data address and data value
// (two data_comp) and control word (ctrl_comp). Their codes are registered
// together into one compressed record for the packer, one cycle after the
// record arrives. The three mechanisms follow the paper; running them in
// lock step and the history restart are this design's.
//
// History restart: the compressors code against history (dictionaries,
// previous values). A decoder must see the same history, so all of them are
// restarted together on the first record of a trace (rec.start) and, when the
// packer had to drop a record, on the next record after resync_req. The
// record coded with empty histories leaves with sync set.
module compression
  import tracer_pkg::*;
#(
  parameter int unsigned ADDR_DICT_ENTRIES = 16,
  parameter int unsigned CTRL_DICT_ENTRIES = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  abs_rec_t  rec,
  input  logic      resync_req,
  output comp_rec_t out
);
  logic        sync_pend;
  logic        clear;
  logic [1:0]  p_enc, c_enc;
  logic [7:0]  p_idx, c_idx;
  logic [2:0]  p_tn, p_bn;
  logic [31:0] p_t, p_b, a_pay, d_pay;
  logic [CTRL_W-1:0] c_raw;
  denc_e       a_enc, d_enc;

  assign clear = rec.valid && (rec.start || sync_pend || resync_req);

  addr_comp #(.DICT_ENTRIES(ADDR_DICT_ENTRIES)) u_addr (
    .clk, .rst_n, .clear,
    .valid (rec.valid && rec.pa_valid),
    .addr  (rec.pa),
    .size  (rec.pa_size),
    .flush (rec.valid && rec.flush),
    .enc (p_enc), .idx (p_idx), .t_n (p_tn), .t (p_t), .b_n (p_bn), .b (p_b)
  );

  data_comp u_daddr (
    .clk, .rst_n, .clear,
    .valid (rec.valid && rec.da_valid), .value (rec.da),
    .enc (a_enc), .payload (a_pay)
  );

  data_comp u_dval (
    .clk, .rst_n, .clear,
    .valid (rec.valid && rec.da_valid), .value (rec.dv),
    .enc (d_enc), .payload (d_pay)
  );

  ctrl_comp #(.DICT_ENTRIES(CTRL_DICT_ENTRIES)) u_ctrl (
    .clk, .rst_n, .clear,
    .valid (rec.valid && rec.ctrl_valid), .ctrl (rec.ctrl),
    .enc (c_enc), .idx (c_idx), .raw (c_raw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_pend <= 1'b0;
      out       <= '0;
    end else begin
      sync_pend <= (sync_pend || resync_req) && !rec.valid;
      out.valid <= rec.valid;
      out.flush <= rec.valid && rec.flush;
      out.start <= rec.valid && rec.start;
      out.sync  <= clear;
      out.mode  <= rec.mode;
      out.write <= rec.write;
      out.c_enc <= c_enc;
      out.c_idx <= c_idx;
      out.c_raw <= c_raw;
      out.p_enc <= p_enc;
      out.p_idx <= p_idx;
      out.p_tn  <= p_tn;
      out.p_t   <= p_t;
      out.p_bn  <= p_bn;
      out.p_b   <= p_b;
      out.a_enc <= a_enc;
      out.a_pay <= a_pay;
      out.d_enc <= d_enc;
      out.d_pay <= d_pay;
    end
  end
endmodule
