// addr_slicer: slicing compression of the addresses the dictionary missed.
//
// The address is cut into equal slices (bytes by default). A register holds
// the previously recorded address and a slice comparator finds the highest
// slice in which the present address differs from it; only the slices from
// there down to slice 0 are recorded. Example: previous 0x0000_8066, present
// 0x0000_8020 differ only in the lowest byte, so one byte, 0x20, is kept.
// The register, the slice comparator and the example follow the paper;
// keeping every slice below the highest differing one (so that the address
// can always be rebuilt), the slice width and the two-address port are this
// design's choices.
//
// Two addresses (a then b) can be sliced per cycle: a against the register,
// b against a. Results are combinational; the register is loaded with b
// (or a when only a is valid) at the clock edge. clear makes the previous
// address read as zero.
module addr_slicer #(
  parameter int unsigned AW      = 32,
  parameter int unsigned SLICE_W = 8,
  localparam int unsigned NS     = AW / SLICE_W,
  localparam int unsigned NW     = $clog2(NS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          a_valid,
  input  logic [AW-1:0] a,
  input  logic          b_valid,
  input  logic [AW-1:0] b,
  output logic [NW-1:0] a_n,    // slices of a to record (0 = same address)
  output logic [NW-1:0] b_n     // slices of b to record
);
  logic [AW-1:0] prev;
  logic [AW-1:0] base_a;

  function automatic logic [NW-1:0] slices_needed(logic [AW-1:0] x, logic [AW-1:0] y);
    logic [NW-1:0] n;
    n = '0;
    for (int unsigned s = 0; s < NS; s++)
      if (x[s*SLICE_W +: SLICE_W] != y[s*SLICE_W +: SLICE_W]) n = NW'(s + 1);
    return n;
  endfunction

  assign base_a = clear ? '0 : prev;
  assign a_n    = slices_needed(a, base_a);
  assign b_n    = slices_needed(b, a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                prev <= '0;
    else if (a_valid & b_valid) prev <= b;
    else if (a_valid)           prev <= a;
    else if (clear)             prev <= '0;
  end
endmodule
