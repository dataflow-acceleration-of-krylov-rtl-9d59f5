// Single precision to signed fixed point (combinational).
//
// Converts an IEEE 754 single-precision value to a two's-complement number of
// ACC_W bits with ACC_FRAC fraction bits, truncating toward zero.  Subnormals
// count as zero; infinities, NaN and values beyond the format saturate to its
// largest magnitude with the input's sign.  Used by the processing element's
// accumulator and by the combine unit.
module fp32_to_fixed
  import krylov_pkg::*;
#(
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned ACC_FRAC = 32
) (
  input  fp32_t                   f,
  output logic signed [ACC_W-1:0] fx
);

  logic [ACC_W-1:0] mag;
  int               sh;

  always_comb begin
    mag = '0;
    sh  = int'(f[30:23]) - 150 + int'(ACC_FRAC);
    if (f[30:23] == 8'd0) begin
      mag = '0;
    end else if (f[30:23] == 8'd255 || sh > int'(ACC_W) - 25) begin
      mag = {1'b0, {(ACC_W-1){1'b1}}};
    end else if (sh >= 0) begin
      mag = ACC_W'({1'b1, f[22:0]}) << sh;
    end else if (sh > -24) begin
      mag = ACC_W'({1'b1, f[22:0]}) >> (-sh);
    end
    fx = f[31] ? -$signed(mag) : $signed(mag);
  end

endmodule
