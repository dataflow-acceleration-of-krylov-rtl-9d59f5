// Vector buffer: on-chip FIFO holding
// an intermediate vector x^i between two processing elements.  The upstream PE
// writes each element of its result as it completes a row; the downstream PE
// moves elements into its own shifting window as room appears there.  The
// default depth of b = 128 words is the vector-buffer size of the design's
// memory model.
//
// Each entry is a single-precision element x_j.  Write side: in_valid pushes
// in_data.  in_ready is a credit for a registered producer: it is high while
// at least two entries are free, so a producer that decides on in_ready and
// writes one cycle later can never overflow the buffer.  Read side: first-word
// fall-through; out_valid/out_data show the oldest entry and out_ready pops it
// in the same cycle.  level counts the entries held.  Reset or clear empties
// the buffer.  The FIFO organisation and the handshake are choices of this
// implementation.
module vector_buffer
  import krylov_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  fp32_t                in_data,
  output logic                     in_ready,
  output logic                     out_valid,
  output fp32_t                out_data,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fp32_t mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic push, pop;

  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];
  assign in_ready  = (32'(count) + 2 <= DEPTH);
  assign level     = count;
  assign push      = in_valid;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // A write into a full buffer would lose data.
  assert property (@(posedge clk) disable iff (!rst_n || clear)
                   push |-> (32'(count) < DEPTH || pop))
    else $error("vector_buffer overflow");

endmodule
