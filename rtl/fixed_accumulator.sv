// Row accumulator of a processing element: single-precision inputs, fixed-point sum.
//
// Each accepted product is converted from single precision to a signed
// two's-complement fixed-point number with ACC_FRAC fraction bits and added to
// a running sum.  On the product flagged as the last one of a matrix row the
// completed sum is converted back to single precision, presented on out_fp
// with out_valid high for one cycle, and the sum restarts from zero.  A fixed
// adder closes the accumulation loop in one cycle, which is what lets a
// sequential processing element take one product per cycle without a
// floating-point reduction circuit.
//
// Accumulating in fixed point while inputs remain single precision follows
// the design; the format (ACC_W = 64 bits, ACC_FRAC = 32 fraction bits) is
// this implementation's choice.  Conversions truncate toward zero, subnormal
// inputs count as zero, inputs too large for the format saturate to its
// largest magnitude, and the sum itself wraps: ACC_W must leave headroom for
// a row of at most r products.
//
// Timing: in_valid/in_fp/in_last are sampled at the rising edge; the row sum
// appears one cycle after the edge that took the last product.  clear (or
// reset) empties the running sum.
module fixed_accumulator
  import krylov_pkg::*;
#(
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned ACC_FRAC = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  fp32_t in_fp,
  input  logic  in_last,
  output logic  out_valid,
  output fp32_t out_fp
);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t acc_q;
  acc_t in_fx;
  acc_t sum;
  fp32_t sum_fp;

  fp32_to_fixed #(.ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_to_fx (
    .f (in_fp),
    .fx(in_fx)
  );

  fixed_to_fp32 #(.ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_to_fp (
    .fx(sum),
    .f (sum_fp)
  );

  assign sum = acc_q + in_fx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_fp    <= '0;
    end else if (clear) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        if (in_last) begin
          acc_q  <= '0;
          out_fp <= sum_fp;
        end else begin
          acc_q  <= sum;
        end
      end
    end
  end

endmodule
