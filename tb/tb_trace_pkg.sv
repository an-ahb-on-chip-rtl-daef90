// tb_trace_pkg: reference decoder for the tracer's packet stream, used by the
// testbenches. It rebuilds the decoder-side histories (control and program
// dictionaries with round-robin replacement, slicing register, previous data
// address and value) from the packet format described in packer.sv, and
// returns one decoded item per packet.
package tb_trace_pkg;
  import tracer_pkg::*;

  typedef struct {
    bit              is_mode;
    trace_mode_e     mode;
    bit              sync;
    bit              write;
    bit              c_valid;
    bit [CTRL_W-1:0] ctrl;
    bit              p_valid;
    bit [31:0]       pt, pb;
    bit              a_valid, d_valid;
    bit [31:0]       da, dv;
  } item_t;

  class trace_decoder;
    bit [CTRL_W-1:0] cdict [16];
    int              cptr;
    bit [63:0]       pdict [16];
    int              pptr;
    bit [31:0]       sprev, aprev, dprev;
    int              errors;

    function new();
      errors = 0;
      restart();
    endfunction

    function void restart();
      foreach (cdict[i]) cdict[i] = '0;
      foreach (pdict[i]) pdict[i] = '0;
      cptr = 0; pptr = 0; sprev = 0; aprev = 0; dprev = 0;
    endfunction

    function bit [CTRL_W-1:0] ctrl(bit [1:0] enc, bit [7:0] idx, bit [CTRL_W-1:0] raw);
      if (enc == CENC_IDX) return cdict[idx[3:0]];
      cdict[cptr] = raw; cptr = (cptr + 1) % 16;
      return raw;
    endfunction

    function bit [63:0] prog(bit [1:0] enc, bit [7:0] idx, int tn, bit [31:0] t, int bn, bit [31:0] b);
      bit [31:0] tt, bb;
      if (enc == PENC_IDX) return pdict[idx[3:0]];
      tt = sprev;
      for (int k = 0; k < tn; k++) tt[8*k +: 8] = t[8*k +: 8];
      bb = tt;
      for (int k = 0; k < bn; k++) bb[8*k +: 8] = b[8*k +: 8];
      sprev = bb;
      pdict[pptr] = {tt, bb}; pptr = (pptr + 1) % 16;
      return {tt, bb};
    endfunction

    function bit [31:0] data(bit is_val, bit [2:0] enc, bit [31:0] pay);
      bit [31:0] p, v;
      p = is_val ? dprev : aprev;
      case (enc)
        DENC_ZERO:               v = p;
        DENC_POS8, DENC_POS16:   v = p + pay;
        DENC_NEG8, DENC_NEG16:   v = p - pay;
        default:                 v = pay;
      endcase
      if (is_val) dprev = v; else aprev = v;
      return v;
    endfunction

    // Decode all packets of a byte stream (trace memory read-out, LSB first).
    function void parse(bit [7:0] q[$], ref item_t items[$]);
      int i = 0;
      while (i < q.size()) begin
        bit [7:0] h0, h1;
        item_t it;
        h0 = q[i];
        if (h0 == 8'h00) begin i++; continue; end
        if (i + 1 >= q.size()) begin errors++; return; end
        h1 = q[i+1];
        i += 2;
        it = '{default: 0, mode: MODE_FC};
        if (h0[0] !== 1'b1) begin errors++; return; end
        if (h0[1]) begin
          it.is_mode = 1; it.mode = trace_mode_e'(h1[7:5]);
          items.push_back(it);
          continue;
        end
        it.sync = h0[2]; it.write = h0[3];
        if (it.sync) restart();
        if (h0[7:6] != CENC_NONE) begin
          bit [CTRL_W-1:0] raw = '0; bit [7:0] idx = '0;
          if (h0[7:6] == CENC_IDX) begin idx = q[i]; i++; end
          else begin raw = CTRL_W'({q[i+2], q[i+1], q[i]}); i += 3; end
          it.c_valid = 1; it.ctrl = ctrl(h0[7:6], idx, raw);
        end
        if (h0[5:4] != PENC_NONE) begin
          bit [63:0] pr; bit [7:0] idx = '0; int tn = 0, bn = 0; bit [31:0] t = 0, b = 0;
          if (h0[5:4] == PENC_IDX) begin idx = q[i]; i++; end
          else begin
            tn = q[i][6:4]; bn = q[i][2:0]; i++;
            for (int k = 0; k < tn; k++) t[8*k +: 8] = q[i+k];
            i += tn;
            for (int k = 0; k < bn; k++) b[8*k +: 8] = q[i+k];
            i += bn;
          end
          pr = prog(h0[5:4], idx, tn, t, bn, b);
          it.p_valid = 1; it.pt = pr[63:32]; it.pb = pr[31:0];
        end
        if (h1[7:5] != DENC_NONE) begin
          bit [31:0] pay = 0; int n = denc_bytes(denc_e'(h1[7:5]));
          for (int k = 0; k < n; k++) pay[8*k +: 8] = q[i+k];
          i += n;
          it.a_valid = 1; it.da = data(0, h1[7:5], pay);
        end
        if (h1[4:2] != DENC_NONE) begin
          bit [31:0] pay = 0; int n = denc_bytes(denc_e'(h1[4:2]));
          for (int k = 0; k < n; k++) pay[8*k +: 8] = q[i+k];
          i += n;
          it.d_valid = 1; it.dv = data(1, h1[4:2], pay);
        end
        items.push_back(it);
      end
    endfunction
  endclass
endpackage
