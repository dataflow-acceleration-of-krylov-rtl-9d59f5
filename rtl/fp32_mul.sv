// Single-precision floating-point multiplier (combinational).
//
// Forms the 48-bit product of the two 24-bit significands, normalises it by
// at most one place and rounds to nearest, ties to even.  Subnormal inputs
// and results are flushed to signed zero; an exponent above the range gives
// signed infinity, and an infinity or NaN input gives infinity (NaN is not
// propagated).  The processing element uses it for a_ij * x_j; its inputs
// stay single precision ahead of a fixed-point accumulator.
//
// Ports: a, b operands; p product.  No clock: the result is valid in the
// same cycle as the operands.
module fp32_mul
  import krylov_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sign;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] kept;       // normalised significand before rounding
  logic        rnd, sticky;
  logic [24:0] rounded;    // one extra bit for the rounding carry
  logic signed [10:0] exp_n;

  always_comb begin
    sign  = a[31] ^ b[31];
    ea    = a[30:23];
    eb    = b[30:23];
    prod  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (prod[47]) begin
      kept   = prod[47:24];
      rnd    = prod[23];
      sticky = |prod[22:0];
      exp_n  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd126;
    end else begin
      kept   = prod[46:23];
      rnd    = prod[22];
      sticky = |prod[21:0];
      exp_n  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    end
    rounded = {1'b0, kept} + {24'd0, rnd & (sticky | kept[0])};
    if (rounded[24]) begin
      rounded = rounded >> 1;
      exp_n   = exp_n + 11'sd1;
    end

    if (ea == 8'd255 || eb == 8'd255) begin
      p = {sign, 8'hFF, 23'd0};
    end else if (ea == 8'd0 || eb == 8'd0 || exp_n <= 11'sd0) begin
      p = {sign, 31'd0};
    end else if (exp_n >= 11'sd255) begin
      p = {sign, 8'hFF, 23'd0};
    end else begin
      p = {sign, exp_n[7:0], rounded[22:0]};
    end
  end

endmodule
