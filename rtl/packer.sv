// packer: packing module (header attachment, mode change controller,
// circular buffer management).
//
// Header attachment: each compressed record becomes one variable-length
// packet, a two-byte header followed by the payload bytes its header
// announces:
//   H0 [7:6] control code  (0 none, 1 dictionary index, 2 raw)
//      [5:4] program code  (0 none, 1 dictionary index, 2 sliced pair)
//      [3] HWRITE of the transfer  [2] sync: histories restart here
//      [1] 0 = record packet, 1 = mode packet  [0] always 1
//   H1 [7:5] data address code  [4:2] data value code (denc_e)  [1:0] 0
//   payload, in this order, every field least significant byte first:
//      control  1 byte index or 3 bytes raw
//      program  1 byte index, or 1 byte {0, target slices, 0, branch slices}
//               then the sliced bytes of the target and of the branch
//      data address, data value: 0, 1, 2 or 4 bytes
// A byte 0x00 where a header is expected is padding.
// Mode change controller: when the trace mode differs from that of the last
// packet, or histories restart, a two-byte mode packet (H0 = 0x03,
// H1[7:5] = mode) is put first, so that a decoder knows the level of the
// records that follow.
// Circular buffer management: packets are appended to a byte accumulator
// that writes one 32-bit word per cycle to the trace memory. A forward trace
// stops when the memory is full. A backward trace wraps around the memory,
// keeping the newest words. If a packet does not fit in the accumulator it is
// dropped, resync_req asks the compressors to restart their histories, and
// packets are dropped until the restarted one arrives.
// Sync points of a backward trace: after a wrap the oldest word usually
// starts inside a packet, and the history it was coded against is gone. So
// the memory is split into NSEG segments. Whenever writing enters a segment,
// resync_req forces a history restart; in a backward trace every packet with
// sync is aligned to a word boundary (0x00 padding before it), and the word
// address of the first one in each segment is kept. When the trace ends the
// last word is padded and the read pointer is set to the oldest word, or,
// for a wrapped buffer, to the oldest sync point still in memory; the words
// before it are given up. trace_words counts the words from there on, so
// successive reads return a trace that decodes from its first word.
// The three functions come from the paper; all formats, the accumulator,
// the overflow policy and the sync points are this design's. MEM_DEPTH must
// be a power of two of at least 2*NSEG words.
//
// Timing: the packet of a record enters the accumulator in the cycle the
// record arrives; its first word reaches memory one cycle later at the
// earliest. data from the memory follows read by one cycle.
module packer
  import tracer_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned ACC_BYTES = 32,
  localparam int unsigned AW       = $clog2(MEM_DEPTH),
  localparam int unsigned CW       = $clog2(ACC_BYTES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  comp_rec_t     rec,
  input  logic          backward,     // circular buffer (backward trace)
  input  logic          read,
  output logic          resync_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [31:0]   mem_wdata,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  output logic [AW:0]   trace_words,
  output logic          wrapped,
  output logic          full,
  output logic [15:0]   lost_count,
  output logic          idle          // nothing buffered, read pointer set
);
  localparam int unsigned MAXP  = 24;
  localparam int unsigned NSEG  = 8;
  localparam int unsigned SEGW  = $clog2(NSEG);

  // sync point of each segment (backward traces)
  logic [NSEG-1:0] sp_valid;
  logic [AW-1:0]   sp_addr [NSEG];
  logic [AW:0]     wrap_words;

  logic [7:0]    acc [ACC_BYTES];
  logic [CW-1:0] cnt;
  logic          pad_pend, dropping;
  trace_mode_e   last_mode;
  logic [AW-1:0] wr_ptr, rd_ptr;

  logic [7:0]    pkt [MAXP];
  int unsigned   plen;
  logic          need_mode, has_fields;

  // ------------------------------------------------------------ packet
  always_comb begin
    for (int unsigned i = 0; i < MAXP; i++) pkt[i] = '0;
    plen       = 0;
    need_mode  = rec.valid && (rec.sync || rec.mode != last_mode);
    has_fields = rec.c_enc != CENC_NONE || rec.p_enc != PENC_NONE ||
                 rec.a_enc != DENC_NONE || rec.d_enc != DENC_NONE;
    if (rec.valid) begin
      if (need_mode) begin
        pkt[0] = 8'h03;
        pkt[1] = {rec.mode, 5'b0};
        plen   = 2;
      end
      if (has_fields || rec.sync) begin
        pkt[plen]     = {rec.c_enc, rec.p_enc, rec.write, rec.sync, 1'b0, 1'b1};
        pkt[plen + 1] = {rec.a_enc, rec.d_enc, 2'b00};
        plen += 2;
        if (rec.c_enc == CENC_IDX) begin
          pkt[plen] = rec.c_idx;
          plen += 1;
        end else if (rec.c_enc == CENC_RAW) begin
          for (int unsigned k = 0; k < 3; k++)
            pkt[plen + k] = 8'(24'(rec.c_raw) >> (8 * k));
          plen += 3;
        end
        if (rec.p_enc == PENC_IDX) begin
          pkt[plen] = rec.p_idx;
          plen += 1;
        end else if (rec.p_enc == PENC_SLICE) begin
          pkt[plen] = {1'b0, rec.p_tn, 1'b0, rec.p_bn};
          plen += 1;
          for (int unsigned k = 0; k < 4; k++)
            if (k < 32'(rec.p_tn)) pkt[plen + k] = rec.p_t[8*k +: 8];
          plen += 32'(rec.p_tn);
          for (int unsigned k = 0; k < 4; k++)
            if (k < 32'(rec.p_bn)) pkt[plen + k] = rec.p_b[8*k +: 8];
          plen += 32'(rec.p_bn);
        end
        for (int unsigned k = 0; k < 4; k++)
          if (k < denc_bytes(rec.a_enc)) pkt[plen + k] = rec.a_pay[8*k +: 8];
        plen += denc_bytes(rec.a_enc);
        for (int unsigned k = 0; k < 4; k++)
          if (k < denc_bytes(rec.d_enc)) pkt[plen + k] = rec.d_pay[8*k +: 8];
        plen += denc_bytes(rec.d_enc);
      end
    end
  end

  // ------------------------------------------------------------ accumulator
  logic          drain, store;
  int unsigned   cnt1;
  logic          fits, accept, drop;
  int unsigned   pad;                 // alignment bytes before a sync packet
  logic [AW-1:0] wr_next, sync_addr, wr_inc;
  logic          seg_enter, force_sync;
  logic [SEGW-1:0] enter_seg, sync_seg;
  logic [7:0]    acc_n [ACC_BYTES];
  int unsigned   cnt_n;

  assign drain = cnt >= CW'(4) || (pad_pend && cnt != '0);
  assign store = drain && (backward || !full) && !(rec.valid && rec.start);

  assign mem_we    = store;
  assign mem_waddr = wr_ptr;
  assign mem_wdata = {acc[3], acc[2], acc[1], acc[0]};
  assign mem_re    = read;
  assign mem_raddr = rd_ptr;

  always_comb begin
    if (rec.valid && rec.start) cnt1 = 0;
    else if (drain)             cnt1 = (32'(cnt) >= 4) ? 32'(cnt) - 4 : 0;
    else                        cnt1 = 32'(cnt);
    pad    = (backward && rec.valid && rec.sync) ? (4 - cnt1 % 4) % 4 : 0;
    fits   = cnt1 + pad + plen <= ACC_BYTES;
    accept = rec.valid && plen != 0 && fits && (!dropping || rec.sync);
    drop   = rec.valid && plen != 0 && !accept;
    cnt_n  = accept ? cnt1 + pad + plen : cnt1;
    for (int unsigned i = 0; i < ACC_BYTES; i++) begin
      if (i < cnt1)
        acc_n[i] = (drain && !(rec.valid && rec.start) && i + 4 < ACC_BYTES) ? acc[i + 4] : acc[i];
      else if (accept && i - cnt1 >= pad && i - cnt1 - pad < plen && i - cnt1 - pad < MAXP)
        acc_n[i] = pkt[i - cnt1 - pad];
      else
        acc_n[i] = '0;
    end
  end

  // segment entries and the word the next sync packet starts in
  assign wr_inc     = wr_ptr + 1'b1;
  assign seg_enter  = store && wr_inc[AW-SEGW-1:0] == '0;
  assign enter_seg  = wr_inc[AW-1 -: SEGW];
  assign force_sync = backward && seg_enter;
  assign wr_next    = (rec.valid && rec.start) ? '0 : (store ? wr_inc : wr_ptr);
  assign sync_addr  = wr_next + AW'((cnt1 + pad) / 4);
  assign sync_seg   = sync_addr[AW-1 -: SEGW];

  // oldest sync point of a wrapped buffer: the segments after the one being
  // overwritten, oldest first, then that segment itself
  logic          sp_found;
  logic [AW-1:0] sp_start;
  always_comb begin
    logic [SEGW-1:0] cur, s;
    cur      = wr_ptr[AW-1 -: SEGW];
    sp_found = 1'b0;
    sp_start = wr_ptr;
    for (int unsigned k = 1; k <= NSEG; k++) begin
      s = cur + SEGW'(k);
      if (!sp_found && sp_valid[s]) begin
        sp_found = 1'b1;
        sp_start = sp_addr[s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_valid   <= '0;
      for (int unsigned i = 0; i < NSEG; i++) sp_addr[i] <= '0;
      wrap_words <= '0;
      for (int unsigned i = 0; i < ACC_BYTES; i++) acc[i] <= '0;
      cnt        <= '0;
      pad_pend   <= 1'b0;
      dropping   <= 1'b0;
      last_mode  <= MODE_FC;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      wrapped    <= 1'b0;
      full       <= 1'b0;
      lost_count <= '0;
      resync_req <= 1'b0;
    end else begin
      acc        <= acc_n;
      cnt        <= CW'(cnt_n);
      resync_req <= (drop && (!dropping || rec.sync)) || force_sync;

      if (rec.valid && rec.start) sp_valid <= '0;
      else if (seg_enter)         sp_valid[enter_seg] <= 1'b0;
      if (backward && accept && rec.sync &&
          (!sp_valid[sync_seg] || (seg_enter && enter_seg == sync_seg) || rec.start)) begin
        sp_valid[sync_seg] <= 1'b1;
        sp_addr[sync_seg]  <= sync_addr;
      end
      if (accept) begin
        dropping  <= 1'b0;
        last_mode <= rec.mode;
      end else if (drop) begin
        dropping <= 1'b1;
      end
      if (drop && lost_count != '1) lost_count <= lost_count + 1'b1;

      if (rec.valid && rec.flush)             pad_pend <= 1'b1;
      else if (pad_pend && cnt == '0)         pad_pend <= 1'b0;

      if (rec.valid && rec.start) begin
        wr_ptr  <= '0;
        wrapped <= 1'b0;
        full    <= 1'b0;
      end else if (store) begin
        wr_ptr <= wr_inc;
        if (wr_ptr == AW'(MEM_DEPTH - 1)) begin
          if (backward) begin
            wrapped    <= 1'b1;
            wrap_words <= (AW + 1)'(MEM_DEPTH);
          end else begin
            full <= 1'b1;
          end
        end
      end

      if (pad_pend && cnt == '0) begin
        rd_ptr <= wrapped ? sp_start : '0;
        if (wrapped) wrap_words <= sp_found ? {1'b0, wr_ptr - sp_start} : '0;
      end else if (read) begin
        rd_ptr <= rd_ptr + 1'b1;
      end
    end
  end

  assign idle        = !pad_pend && cnt == '0 && !rec.valid;
  assign trace_words = wrapped ? wrap_words : full ? (AW + 1)'(MEM_DEPTH) : {1'b0, wr_ptr};
endmodule
