// Krylov subspace pipeline: computes x^1 = A x^0, x^2 = A x^1, ..., x^K = A x^{K-1}
// for a large banded sparse matrix A in a single pass over A and x^0.
//
// K processing elements (PEs) form a chain.  PE 0 reads the matrix (through
// the CSR reader) and x^0 from the memory-side streams; every PE forwards the
// matrix entries it has used into a matrix buffer and its result vector into
// a vector buffer, and PE i+1 reads both from there.  Because A is banded,
// PE i+1 can start row j as soon as PE i has finished row j + (BAND-1)/2, so
// the K products overlap in time, offset by roughly half a band of rows each,
// and the matrix leaves external memory only once.  A PE that finds its
// operand not yet produced holds (a data hazard); a full buffer holds its
// producer (back-pressure), so no matrix entry or vector element is lost.
// stall is the OR of all PE stall flags.
//
// The last PE's vector x^K goes to an output buffer and leaves on xk_*.  With
// USE_COMBINE set, a combine unit also forms y = sum_i alpha_i x^i from all
// PE outputs and delivers it on comb_*; with it clear (the default, as for
// power iteration, which needs only x^K) those ports are idle.  With
// EXPORT_VECTORS set, every PE's result stream is also brought out on
// vec_valid[i] / vec_data[i] so that all of x^1..x^K can be written to
// memory; vec_ready[i] is a credit that holds PE i, and then the memory
// bandwidth limits the pipeline.  Default off.
//
// Run protocol: hold enable low to clear the pipeline, set n_rows, then raise
// enable and stream rp (n_rows+1 CSR row pointers), nz (values and columns)
// and x0 (n_rows elements).  done rises once all n_rows elements of x^K (and
// of y, with USE_COMBINE) have been delivered; it stays high until enable
// falls.  All streams use valid/ready handshakes.
//
// From the design: the chain of K PEs with K-1 matrix and K-1 vector buffers,
// single-pass streaming, dynamic stalling instead of fixed offsets, the
// optional combine unit, the option of sending every vector to memory, and
// the defaults K = 80, b = 128, r = 64 and buffer
// sizes b*r entries (matrix) and b words (vector).  Choices of this
// implementation: the handshakes, the run protocol and the output buffer.
// Elements with a column index outside the band give wrong results.
module krylov_top
  import krylov_pkg::*;
#(
  parameter int unsigned K           = 80,
  parameter int unsigned BAND        = 128,
  parameter int unsigned R           = 64,
  parameter int unsigned MBUF_DEPTH  = BAND * R,
  parameter int unsigned VBUF_DEPTH  = BAND,
  parameter int unsigned ACC_W       = 64,
  parameter int unsigned ACC_FRAC    = 32,
  parameter bit          USE_COMBINE = 1'b0,
  parameter bit          EXPORT_VECTORS = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [IDX_W-1:0] n_rows,
  // CSR row pointers and nonzeros from memory
  input  logic             rp_valid,
  input  logic [IDX_W-1:0] rp_data,
  output logic             rp_ready,
  input  logic             nz_valid,
  input  fp32_t            nz_val,
  input  logic [IDX_W-1:0] nz_col,
  output logic             nz_ready,
  // start vector x^0 from memory
  input  logic             x0_valid,
  input  fp32_t            x0_data,
  output logic             x0_ready,
  // result vector x^K to memory
  output logic             xk_valid,
  output fp32_t            xk_data,
  input  logic             xk_ready,
  // linear combination of x^1..x^K to memory (USE_COMBINE only)
  input  fp32_t            alpha [K],
  output logic             comb_valid,
  output fp32_t            comb_data,
  input  logic             comb_ready,
  // every PE's result x^1..x^K to memory (EXPORT_VECTORS only); vec_ready
  // is a credit: while it is low, PE i completes no row
  output logic             vec_valid [K],
  output fp32_t            vec_data  [K],
  input  logic             vec_ready [K],
  // status
  output logic [IDX_W-1:0] pe_row [K],
  output logic             stall,
  output logic             done
);

  // Stream wires: index i is the input side of PE i (matrix and vector) or
  // the output side of PE i (m_out, y).
  logic      m_valid [K];
  mat_elem_t m_data  [K];
  logic      m_ready [K];
  logic      mo_valid[K];
  mat_elem_t mo_data [K];
  logic      mo_ready[K];
  logic      x_valid [K];
  fp32_t     x_data  [K];
  logic      x_ready [K];
  logic      y_valid [K];
  fp32_t     y_data  [K];
  logic      y_ready [K];
  logic      pe_stall[K];
  logic      vb_ready[K];
  logic      cb_ready[K];

  logic [IDX_W-1:0] xk_cnt, comb_cnt;

  csr_reader u_csr (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .rp_valid (rp_valid),
    .rp_data  (rp_data),
    .rp_ready (rp_ready),
    .nz_valid (nz_valid),
    .nz_val   (nz_val),
    .nz_col   (nz_col),
    .nz_ready (nz_ready),
    .out_valid(m_valid[0]),
    .out_data (m_data[0]),
    .out_ready(m_ready[0])
  );

  assign x_valid[0] = x0_valid;
  assign x_data[0]  = x0_data;
  assign x0_ready   = x_ready[0];

  for (genvar i = 0; i < int'(K); i++) begin : g_pe
    kss_pe #(.BAND(BAND), .ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .enable     (enable),
      .x_valid    (x_valid[i]),
      .x_data     (x_data[i]),
      .x_ready    (x_ready[i]),
      .m_valid    (m_valid[i]),
      .m_data     (m_data[i]),
      .m_ready    (m_ready[i]),
      .m_out_valid(mo_valid[i]),
      .m_out_data (mo_data[i]),
      .m_out_ready(mo_ready[i]),
      .y_valid    (y_valid[i]),
      .y_data     (y_data[i]),
      .y_ready    (y_ready[i]),
      .row        (pe_row[i]),
      .stall      (pe_stall[i])
    );

    assign y_ready[i] = vb_ready[i] && (!USE_COMBINE || cb_ready[i])
                        && (!EXPORT_VECTORS || vec_ready[i]);
    assign vec_valid[i] = EXPORT_VECTORS && y_valid[i];
    assign vec_data[i]  = EXPORT_VECTORS ? y_data[i] : '0;

    if (i < int'(K) - 1) begin : g_buf
      matrix_buffer #(.DEPTH(MBUF_DEPTH)) u_mbuf (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (!enable),
        .in_valid (mo_valid[i]),
        .in_data  (mo_data[i]),
        .in_ready (mo_ready[i]),
        .out_valid(m_valid[i+1]),
        .out_data (m_data[i+1]),
        .out_ready(m_ready[i+1]),
        .level    ()
      );

      vector_buffer #(.DEPTH(VBUF_DEPTH)) u_vbuf (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (!enable),
        .in_valid (y_valid[i]),
        .in_data  (y_data[i]),
        .in_ready (vb_ready[i]),
        .out_valid(x_valid[i+1]),
        .out_data (x_data[i+1]),
        .out_ready(x_ready[i+1]),
        .level    ()
      );
    end else begin : g_last
      // The last PE's matrix output has no consumer.
      assign mo_ready[i] = 1'b1;

      vector_buffer #(.DEPTH(VBUF_DEPTH)) u_obuf (
        .clk      (clk),
        .rst_n    (rst_n),
        .clear    (!enable),
        .in_valid (y_valid[i]),
        .in_data  (y_data[i]),
        .in_ready (vb_ready[i]),
        .out_valid(xk_valid),
        .out_data (xk_data),
        .out_ready(xk_ready),
        .level    ()
      );
    end
  end

  if (USE_COMBINE) begin : g_combine
    combine_unit #(.K(K), .DEPTH(BAND), .ACC_W(ACC_W), .ACC_FRAC(ACC_FRAC)) u_comb (
      .clk    (clk),
      .rst_n  (rst_n),
      .enable (enable),
      .alpha  (alpha),
      .x_valid(y_valid),
      .x_data (y_data),
      .x_ready(cb_ready),
      .y_valid(comb_valid),
      .y_data (comb_data),
      .y_ready(comb_ready)
    );
  end else begin : g_no_combine
    for (genvar i = 0; i < int'(K); i++) begin : g_rdy
      assign cb_ready[i] = 1'b1;
    end
    assign comb_valid = 1'b0;
    assign comb_data  = '0;
  end

  always_comb begin
    stall = 1'b0;
    for (int i = 0; i < int'(K); i++) stall |= pe_stall[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xk_cnt   <= '0;
      comb_cnt <= '0;
    end else if (!enable) begin
      xk_cnt   <= '0;
      comb_cnt <= '0;
    end else begin
      if (xk_valid && xk_ready)     xk_cnt   <= xk_cnt + 1'b1;
      if (comb_valid && comb_ready) comb_cnt <= comb_cnt + 1'b1;
    end
  end

  assign done = enable && (xk_cnt == n_rows) && (!USE_COMBINE || comb_cnt == n_rows);

endmodule
