// Combine unit: on-chip linear combination y = sum_{i=1..K} alpha_i x^i of the
// vectors produced by the K processing elements.
//
// Every PE emits its vector x^i in index order, but PE i produces element j
// later than PE i-1 does, by the offset between neighbouring PEs.  The unit
// therefore keeps one shifting window of partial sums per PE: stage i adds
// alpha_i * x^i_j to the partial sum of element j that stage i-1 left in its
// window, and stores the result in its own window, where stage i+1 picks it
// up.  The windows are FIFOs of DEPTH entries; K of them make the K*b-word
// storage the design estimates for this unit.  The window of the last stage
// is the output queue: its head is converted to single precision and leaves
// on y_valid / y_data with a valid/ready handshake.
//
// Products alpha_i * x^i_j are formed in single precision and summed in the
// same fixed-point format as the PE accumulators (conversions truncate).
// Inputs: x_valid[i] / x_data[i] is the output of PE i (PE 0 produces x^1),
// one element per pulse; x_ready[i] is a credit that stays high while the
// stage's window has at least two free entries, so a PE may only finish a row
// while it is high.  alpha[i] must be held during a run.  enable low (or
// reset) empties all windows.
//
// The linear combination, its place beside the pipeline and the K*b window
// size follow the design.  The stage-per-PE chain of windows, fixed-point
// partial sums and the handshake are this implementation's choices.
module combine_unit
  import krylov_pkg::*;
#(
  parameter int unsigned K        = 80,
  parameter int unsigned DEPTH    = 128,
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned ACC_FRAC = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  fp32_t     alpha   [K],
  input  logic      x_valid [K],
  input  fp32_t     x_data  [K],
  output logic      x_ready [K],
  output logic      y_valid,
  output fp32_t     y_data,
  input  logic      y_ready
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t          win   [K][DEPTH];
  logic [AW-1:0] wr_ptr[K];
  logic [AW-1:0] rd_ptr[K];
  logic [CW-1:0] count [K];
  acc_t          head  [K];
  logic          push  [K];
  logic          pop   [K];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  for (genvar i = 0; i < int'(K); i++) begin : g_stage
    fp32_t prod;
    acc_t  prod_fx;
    acc_t  partial;

    fp32_mul u_mul (.a(alpha[i]), .b(x_data[i]), .p(prod));

    fp32_to_fixed #(.ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_to_fx (
      .f (prod),
      .fx(prod_fx)
    );

    if (i == 0) begin : g_first
      assign partial = prod_fx;
    end else begin : g_next
      assign partial = head[i-1] + prod_fx;
    end

    assign head[i]    = win[i][rd_ptr[i]];
    assign push[i]    = enable && x_valid[i];
    assign x_ready[i] = (32'(count[i]) + 2 <= DEPTH);
    if (i == int'(K) - 1) begin : g_pop_out
      assign pop[i] = enable && y_valid && y_ready;
    end else begin : g_pop_next
      assign pop[i] = push[i+1];
    end

    always_ff @(posedge clk) begin
      if (push[i]) win[i][wr_ptr[i]] <= partial;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wr_ptr[i] <= '0;
        rd_ptr[i] <= '0;
        count[i]  <= '0;
      end else if (!enable) begin
        wr_ptr[i] <= '0;
        rd_ptr[i] <= '0;
        count[i]  <= '0;
      end else begin
        if (push[i]) wr_ptr[i] <= next_ptr(wr_ptr[i]);
        if (pop[i])  rd_ptr[i] <= next_ptr(rd_ptr[i]);
        count[i] <= count[i] + CW'(push[i]) - CW'(pop[i]);
      end
    end

    // A window must not overflow, and stage i needs the partial sum of
    // stage i-1 before its own contribution arrives.
    assert property (@(posedge clk) disable iff (!rst_n || !enable)
                     push[i] |-> (32'(count[i]) < DEPTH || pop[i]))
      else $error("combine_unit: window %0d overflow", i);
    if (i > 0) begin : g_order
      assert property (@(posedge clk) disable iff (!rst_n || !enable)
                       push[i] |-> (count[i-1] != '0))
        else $error("combine_unit: stage %0d ahead of stage %0d", i, i - 1);
    end
  end

  assign y_valid = enable && (count[K-1] != '0);

  fixed_to_fp32 #(.ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_out (
    .fx(head[K-1]),
    .f (y_data)
  );

endmodule
