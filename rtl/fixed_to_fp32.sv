// Signed fixed point to single precision (combinational).
//
// Converts a two's-complement number of ACC_W bits with ACC_FRAC fraction
// bits to IEEE 754 single precision.  A leading-one search finds the exponent;
// the 23 bits below the leading one become the fraction, truncated toward
// zero.  Results below the normal range give signed zero, results above it
// signed infinity.  Used by the processing element's accumulator and by the
// combine unit.
module fixed_to_fp32
  import krylov_pkg::*;
#(
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned ACC_FRAC = 32
) (
  input  logic signed [ACC_W-1:0] fx,
  output fp32_t                   f
);

  logic [ACC_W-1:0] mag;
  logic [ACC_W-1:0] norm;
  logic [22:0]      frac;
  int               pos;
  int               e;

  always_comb begin
    mag  = fx[ACC_W-1] ? ACC_W'(-fx) : ACC_W'(fx);
    pos  = -1;
    for (int i = 0; i < int'(ACC_W); i++) begin
      if (mag[i]) pos = i;
    end
    e    = pos - int'(ACC_FRAC) + 127;
    norm = '0;
    if (pos >= 23)     norm = mag >> (pos - 23);
    else if (pos >= 0) norm = mag << (23 - pos);
    frac = norm[22:0];
    if (pos < 0 || e <= 0) f = {fx[ACC_W-1] & (pos >= 0), 31'd0};
    else if (e >= 255)     f = {fx[ACC_W-1], 8'hFF, 23'd0};
    else                   f = {fx[ACC_W-1], e[7:0], frac};
  end

endmodule
