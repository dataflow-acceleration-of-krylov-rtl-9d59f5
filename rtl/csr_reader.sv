// CSR reader: turns a matrix held in compressed sparse row (CSR) form into the
// entry stream the processing elements consume.
//
// A CSR matrix of n rows is three arrays: values and 32-bit column indices of
// the nonzeros in row-major order, and n+1 row pointers whose differences are
// the row lengths.  The reader takes the row pointers on one stream (rp_*) and
// the (value, column) pairs on another (nz_*), both as read from DRAM in
// order.  The first pointer of a run only sets the base; each later pointer
// opens a row of length rp[i+1] - rp[i], whose nonzeros are passed to the
// output with the end-of-row flag set on the last.  A row with no stored
// entry is emitted as one explicit zero entry (value 0, column i) so that the
// processing elements still close the row and produce y_i = 0.
//
// Interface: valid/ready streams on all three sides; the output is a
// combinational pass-through of the nonzero stream while a row is open, so it
// adds no latency, and the pointer of the next row is taken in the cycle that
// ends the current one: one entry per cycle with no bubble between rows.
// enable low (or reset) returns the reader to the start of a matrix.  The stream format and empty-row handling are this
// implementation's; the CSR layout is the one the design's memory model uses.
module csr_reader
  import krylov_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // row pointers rp[0..n]
  input  logic             rp_valid,
  input  logic [IDX_W-1:0] rp_data,
  output logic             rp_ready,
  // nonzero values and column indices
  input  logic             nz_valid,
  input  fp32_t            nz_val,
  input  logic [IDX_W-1:0] nz_col,
  output logic             nz_ready,
  // entry stream to the first processing element
  output logic             out_valid,
  output mat_elem_t        out_data,
  input  logic             out_ready
);

  typedef enum logic [1:0] {
    S_BASE,   // waiting for rp[0]
    S_PTR,    // waiting for the pointer that closes the next row
    S_ROW,    // passing the nonzeros of an open row
    S_EMPTY   // emitting the placeholder of an empty row
  } state_t;

  state_t           state;
  logic [IDX_W-1:0] prev_rp;
  logic [IDX_W-1:0] remaining;
  logic [IDX_W-1:0] row_idx;
  logic [IDX_W-1:0] row_len;
  logic             closing;

  // The pointer that opens the next row is taken in the cycle that closes
  // the current one, so rows follow each other without a bubble.
  assign closing  = (state == S_ROW && remaining == IDX_W'(1) && nz_valid && out_ready)
                 || (state == S_EMPTY && out_ready);
  assign row_len  = rp_data - prev_rp;
  assign rp_ready = enable && (state == S_BASE || state == S_PTR || closing);
  assign nz_ready = enable && (state == S_ROW) && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    if (enable && state == S_ROW) begin
      out_valid     = nz_valid;
      out_data.val  = nz_val;
      out_data.col  = nz_col;
      out_data.last = (remaining == IDX_W'(1));
    end else if (enable && state == S_EMPTY) begin
      out_valid     = 1'b1;
      out_data.val  = '0;
      out_data.col  = row_idx;
      out_data.last = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_BASE;
      prev_rp   <= '0;
      remaining <= '0;
      row_idx   <= '0;
    end else if (!enable) begin
      state     <= S_BASE;
      remaining <= '0;
      row_idx   <= '0;
    end else begin
      if (state == S_ROW && nz_valid && out_ready) remaining <= remaining - 1'b1;
      if (closing) begin
        row_idx <= row_idx + 1'b1;
        state   <= S_PTR;
      end
      if (state == S_BASE && rp_valid) begin
        prev_rp <= rp_data;
        state   <= S_PTR;
      end else if ((state == S_PTR || closing) && rp_valid) begin
        // open the next row
        prev_rp   <= rp_data;
        remaining <= row_len;
        state     <= (row_len == '0) ? S_EMPTY : S_ROW;
      end
    end
  end

endmodule
