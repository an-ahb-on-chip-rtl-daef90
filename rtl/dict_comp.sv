// dict_comp: dictionary based compression.
//
// A small fully associative dictionary of recently seen values. Every entry
// has its own equality comparator; a lookup that finds the key reports a hit
// and the entry index, so the caller can record the short index in place of
// the value. A lookup that misses stores the key in the dictionary, replacing
// entries in round-robin order, and the caller records the value itself. The
// paper gives this hit/index, miss/store behaviour; the entry count, the
// round-robin replacement and the clear input are this design's choices.
//
// Interface: key/valid are looked up combinationally (hit, idx valid in the
// same cycle); the dictionary is updated at the next clock edge. clear makes
// this lookup see an empty dictionary and empties it, so that a decoder can
// restart from the same state.
module dict_comp #(
  parameter int unsigned W       = 32,
  parameter int unsigned ENTRIES = 16,
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          valid,
  input  logic [W-1:0]  key,
  output logic          hit,
  output logic [IW-1:0] idx
);
  logic [W-1:0]       entry   [ENTRIES];
  logic [ENTRIES-1:0] used;
  logic [IW-1:0]      wr_ptr;

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!hit && !clear && used[i] && entry[i] == key) begin
        hit = 1'b1;
        idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used   <= '0;
      wr_ptr <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) entry[i] <= '0;
    end else if (valid) begin
      if (clear) begin
        used        <= ENTRIES'(1);
        entry[0]    <= key;
        wr_ptr      <= (ENTRIES > 1) ? IW'(1) : '0;
      end else if (!hit) begin
        used[wr_ptr]  <= 1'b1;
        entry[wr_ptr] <= key;
        wr_ptr        <= (wr_ptr == IW'(ENTRIES - 1)) ? '0 : wr_ptr + 1'b1;
      end
    end else if (clear) begin
      used   <= '0;
      wr_ptr <= '0;
    end
  end
endmodule
