// data_comp: difference compression of data addresses and data values.
//
// Data addresses and values are irregular, so they are coded as the
// difference from the previous value of the same stream: the present value
// minus the previous one, with its leading zero bytes removed. A difference
// whose magnitude exceeds 65535 is not used; the present 32-bit value is
// recorded instead. The subtraction, the leading-zero removal and the 65535
// limit follow the paper; the sign-and-magnitude code, byte granularity
// and the zero-difference code are this design's (see denc_e in tracer_pkg).
// The subtraction wraps modulo 2^32, so a decoder adds or subtracts the
// magnitude in 32-bit arithmetic.
//
// Timing: enc/payload are combinational from value and the registered
// previous value, which is updated at the clock edge when valid is high.
// clear makes the previous value read as zero (histories restart).
module data_comp
  import tracer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [31:0] value,
  output denc_e       enc,
  output logic [31:0] payload   // difference magnitude or raw value, LSB first
);
  logic [31:0] prev, base, diff, mag;

  assign base = clear ? '0 : prev;
  assign diff = value - base;
  assign mag  = diff[31] ? (~diff + 32'd1) : diff;

  always_comb begin
    payload = mag;
    if (!valid)                enc = DENC_NONE;
    else if (diff == '0)       enc = DENC_ZERO;
    else if (mag <= 32'd255)   enc = diff[31] ? DENC_NEG8  : DENC_POS8;
    else if (mag <= 32'd65535) enc = diff[31] ? DENC_NEG16 : DENC_POS16;
    else begin
      enc     = DENC_RAW32;
      payload = value;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prev <= '0;
    else if (valid)  prev <= value;
    else if (clear)  prev <= '0;
  end
endmodule
