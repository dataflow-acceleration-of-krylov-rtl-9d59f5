// Processing element (PE) of the Krylov subspace pipeline: one sparse
// matrix-vector product y = A x, one matrix entry per cycle (p = 1).
//
// The PE never addresses DRAM.  It sees the matrix as a row-major stream of
// entries (value, column, end-of-row flag) and the input vector x as a stream
// of elements x_0, x_1, ... in index order.  Because A is banded, the entries
// of row i only touch x_j with |i - j| <= (BAND-1)/2, so the PE keeps a
// shifting window of W = BAND consecutive elements of x in a small memory
// (slot j mod W) instead of the whole vector.  The window takes a new element
// x_j (x_ready high) only once x_{j-W} can no longer be needed, that is while
// j < row + W - (BAND-1)/2.
//
// Each cycle the PE takes the entry at the head of its matrix input if
//   * the operand x_col has already arrived (col < number of x received),
//   * the next matrix buffer has room (m_out_ready), and
//   * for the last entry of a row, the next vector buffer has room (y_ready).
// It then multiplies value and operand in single precision, adds the product
// to a fixed-point row sum, and passes the entry on unchanged on m_out one
// cycle later.  The end-of-row flag closes the row: y_j appears on y_valid /
// y_data one cycle later and the row counter advances.  When an entry is
// present but cannot be taken, stall is high: a missing operand is the data
// hazard between two overlapped products, a full buffer is back-pressure
// from a slower successor.
//
// enable is the global start signal: while it is low the PE holds its window,
// row counter and row sum empty; raising it starts a new product.  row is the
// index of the row being processed.
//
// From the design: the PE's inputs and outputs (vector element with validity
// bit, matrix stream in and out unchanged, enable, row number, stall), p = 1,
// window width w >= b, fixed-point accumulation of single-precision products.
// Choices of this implementation: the stream handshakes (x_ready, m_ready,
// and credit-style m_out_ready / y_ready from the buffers), the window fill
// rule above and the fixed-point format.  Entries outside the band give wrong
// results, as in the design; a simulation assertion reports them.
module kss_pe
  import krylov_pkg::*;
#(
  parameter int unsigned BAND     = 128,  // window width w (w >= b)
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned ACC_FRAC = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // input vector x^i
  input  logic             x_valid,
  input  fp32_t            x_data,
  output logic             x_ready,
  // matrix entries in
  input  logic             m_valid,
  input  mat_elem_t        m_data,
  output logic             m_ready,
  // matrix entries out, unchanged
  output logic             m_out_valid,
  output mat_elem_t        m_out_data,
  input  logic             m_out_ready,
  // output vector x^{i+1}
  output logic             y_valid,
  output fp32_t            y_data,
  input  logic             y_ready,
  // status
  output logic [IDX_W-1:0] row,
  output logic             stall
);

  localparam int unsigned W    = BAND;
  localparam int unsigned HALF = (BAND - 1) / 2;
  localparam int unsigned WA   = (W > 1) ? $clog2(W) : 1;

  fp32_t           win [W];
  logic [IDX_W:0]  x_cnt;    // elements of x received so far
  logic [IDX_W:0]  row_cnt;  // rows completed so far
  logic            have_x;
  logic            go;
  fp32_t           operand;
  fp32_t           product;

  function automatic logic [WA-1:0] slot(logic [IDX_W:0] j);
    return WA'(j % (IDX_W+1)'(W));
  endfunction

  assign have_x  = ({1'b0, m_data.col} < x_cnt);
  assign go      = enable && m_valid && have_x && m_out_ready
                   && (!m_data.last || y_ready);
  assign m_ready = go;
  assign stall   = enable && m_valid && !go;
  assign x_ready = enable && (x_cnt + (IDX_W+1)'(HALF) < row_cnt + (IDX_W+1)'(W));
  assign row     = row_cnt[IDX_W-1:0];
  assign operand = win[slot({1'b0, m_data.col})];

  fp32_mul u_mul (.a(m_data.val), .b(operand), .p(product));

  fixed_accumulator #(.ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (!enable),
    .in_valid (go),
    .in_fp    (product),
    .in_last  (m_data.last),
    .out_valid(y_valid),
    .out_fp   (y_data)
  );

  always_ff @(posedge clk) begin
    if (x_valid && x_ready) win[slot(x_cnt)] <= x_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt       <= '0;
      row_cnt     <= '0;
      m_out_valid <= 1'b0;
      m_out_data  <= '0;
    end else if (!enable) begin
      x_cnt       <= '0;
      row_cnt     <= '0;
      m_out_valid <= 1'b0;
    end else begin
      if (x_valid && x_ready) x_cnt <= x_cnt + 1'b1;
      if (go && m_data.last)  row_cnt <= row_cnt + 1'b1;
      m_out_valid <= go;
      if (go) m_out_data <= m_data;
    end
  end

  // The operand must still be inside the window: the design assumes every
  // entry lies in the band.
  assert property (@(posedge clk) disable iff (!rst_n)
                   go |-> ({1'b0, m_data.col} + (IDX_W+1)'(W) >= x_cnt))
    else $error("kss_pe: matrix entry outside the band");

endmodule
