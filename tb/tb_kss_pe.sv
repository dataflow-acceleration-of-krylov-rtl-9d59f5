// Testbench of one processing element (BAND reduced to 16, so the window holds
// 16 elements and rows reach 7 columns either side of the diagonal).
//
// Phase 1 streams a random banded matrix (1..8 entries per row, in random
// column order) and a random vector at random rates, with random credit on
// both outputs.  Each y_i is checked against the row product computed in
// double precision from the same single-precision inputs, within the error
// bound of one single-precision rounding per product and the truncations of
// the fixed-point sum.  The matrix output must repeat the input entries in
// order.  Data hazards (operand not yet received), full window and output
// back-pressure must each occur.
//
// Phase 2 restarts the PE by dropping enable and runs a new matrix with every
// stream always ready: the PE must take one matrix entry per cycle (p = 1),
// finishing within nnz + BAND + 4 cycles of enable.
module tb_kss_pe;
  import krylov_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned BAND = 16;
  localparam int HALF = (BAND - 1) / 2;
  localparam int N = 400;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             enable = 1'b0;
  logic             x_valid = 1'b0;
  fp32_t            x_data = '0;
  logic             x_ready;
  logic             m_valid = 1'b0;
  mat_elem_t        m_data = '0;
  logic             m_ready;
  logic             m_out_valid;
  mat_elem_t        m_out_data;
  logic             m_out_ready = 1'b0;
  logic             y_valid;
  fp32_t            y_data;
  logic             y_ready = 1'b0;
  logic [IDX_W-1:0] row;
  logic             stall;

  int checks = 0;
  int failures = 0;
  int n_hazard = 0, n_win_full = 0, n_backpressure = 0, n_stall = 0;

  fp32_t     xv[N];
  mat_elem_t ent[$];
  real       yref[N];
  real       ybound[N];
  int        y_got, mo_got;

  kss_pe #(.BAND(BAND)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t rnd_fp();
    return to_fp32((real'($urandom_range(0, 2000000)) - 1000000.0) / 1000000.0);
  endfunction

  task automatic build();
    int len, lo, hi, c;
    int used[$];
    ent.delete();
    for (int i = 0; i < N; i++) xv[i] = rnd_fp();
    for (int i = 0; i < N; i++) begin
      lo = (i - HALF < 0) ? 0 : i - HALF;
      hi = (i + HALF > N - 1) ? N - 1 : i + HALF;
      len = $urandom_range(1, 8);
      used.delete();
      yref[i] = 0.0;
      ybound[i] = 1e-9;
      for (int e = 0; e < len; e++) begin
        c = $urandom_range(lo, hi);
        ent.push_back('{val: rnd_fp(), col: IDX_W'(c), last: (e == len - 1)});
        yref[i] += from_fp32(ent[$].val) * from_fp32(xv[c]);
        ybound[i] += (from_fp32(ent[$].val) * from_fp32(xv[c]) < 0.0 ?
                      -from_fp32(ent[$].val) * from_fp32(xv[c]) :
                       from_fp32(ent[$].val) * from_fp32(xv[c])) * 1.2e-7 + 2.5e-10;
      end
      ybound[i] += (yref[i] < 0.0 ? -yref[i] : yref[i]) * 2.4e-7;
    end
  endtask

  // Output monitor: compares every y and every forwarded entry.
  always @(posedge clk) begin
    if (enable && y_valid) begin
      checks++;
      if (y_got >= N || !close(from_fp32(y_data), yref[y_got], 0.0, ybound[y_got])) begin
        failures++;
        $display("y[%0d] = %g, want %g", y_got, from_fp32(y_data), yref[y_got]);
      end
      y_got++;
    end
    if (enable && m_out_valid) begin
      checks++;
      if (mo_got >= ent.size() || m_out_data !== ent[mo_got]) begin
        failures++;
        $display("forwarded entry %0d wrong", mo_got);
      end
      mo_got++;
    end
  end

  task automatic run(int pct, output int cycles);
    int xi = 0, mi = 0;
    y_got = 0;
    mo_got = 0;
    cycles = 0;
    enable = 1'b1;
    while (y_got < N || mo_got < ent.size()) begin
      x_valid     = (xi < N) && ($urandom_range(0, 99) < pct + 15);
      x_data      = xv[(xi < N) ? xi : 0];
      m_valid     = (mi < ent.size()) && ($urandom_range(0, 99) < pct + 15);
      m_data      = ent[(mi < ent.size()) ? mi : 0];
      m_out_ready = ($urandom_range(0, 99) < pct);
      y_ready     = ($urandom_range(0, 99) < pct);
      #1;
      if (m_valid && !(m_data.col < IDX_W'(xi))) n_hazard++;
      if (x_valid && !x_ready) n_win_full++;
      if (m_valid && (!m_out_ready || (m_data.last && !y_ready))) n_backpressure++;
      if (stall) n_stall++;
      if (x_valid && x_ready) xi++;
      if (m_valid && m_ready) mi++;
      @(posedge clk);
      #1;
      cycles++;
    end
    m_valid = 1'b0;
    x_valid = 1'b0;
    checks++;
    if (y_got != N || mo_got != ent.size()) begin
      failures++;
      $display("got %0d y and %0d entries", y_got, mo_got);
    end
    checks++;
    if (row != IDX_W'(N)) begin
      failures++;
      $display("row counter %0d", row);
    end
    enable = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    build();
    run(70, cycles);
    checks++;
    if (n_hazard == 0 || n_win_full == 0 || n_backpressure == 0 || n_stall == 0) begin
      failures++;
      $display("mechanisms: hazard %0d window full %0d back-pressure %0d stall %0d",
               n_hazard, n_win_full, n_backpressure, n_stall);
    end
    build();
    run(100, cycles);
    checks++;
    // The run loop ends one cycle after the last y leaves the PE.
    if (cycles > ent.size() + BAND + 4) begin
      failures++;
      $display("rate: %0d cycles for %0d entries", cycles, ent.size());
    end
    $display("p=1 run: %0d entries in %0d cycles", ent.size(), cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
