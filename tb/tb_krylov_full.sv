// Full-size run of the Krylov subspace pipeline with every parameter at its
// default: K = 80 PEs, window b = 128, matrix buffers of b*r = 8192 entries,
// vector buffers of 128 words, combine unit off (power iteration needs only
// x^K).  The matrix has the shape of the third benchmark problem: band 127
// (rows reach 63 columns either side of the diagonal), up to r = 5 entries
// per row, here 1000 rows, row sums near one as in PageRank.  Two runs: one with random stream rates
// and slow result writes, one with every stream always ready, checked against
// the overlap bound T_PE + (K-1) b ceil(b/p).  x^80 is compared with a
// double-precision reference.  Data hazards, full windows, output
// back-pressure, global stall and the restart must occur; the buffers are
// large enough here that they rarely fill, which the reduced-size test
// covers.
module tb_krylov_full;
  import krylov_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned K    = 80;
  localparam int unsigned BAND = 128;
  localparam int unsigned R    = 5;
  localparam bit          COMB = 1'b0;
  localparam int          N    = 1000;
  localparam int          RUNS = 2;
  localparam int          EMPTY_PCT = 2;
  localparam longint      WATCHDOG = 1000000;
  localparam real         REL_TOL = 2e-4;
  localparam real         VAL_LO = 0.9;    // row values are (VAL_LO + VAL_SPAN*u)/len
  localparam real         VAL_SPAN = 0.2;
  localparam bit          ALL_MECH = 1'b0; // require every mechanism

  localparam int HALF = (BAND - 1) / 2;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             enable = 1'b0;
  logic [IDX_W-1:0] n_rows = IDX_W'(N);
  logic             rp_valid = 1'b0;
  logic [IDX_W-1:0] rp_data = '0;
  logic             rp_ready;
  logic             nz_valid = 1'b0;
  fp32_t            nz_val = '0;
  logic [IDX_W-1:0] nz_col = '0;
  logic             nz_ready;
  logic             x0_valid = 1'b0;
  fp32_t            x0_data = '0;
  logic             x0_ready;
  logic             xk_valid;
  fp32_t            xk_data;
  logic             xk_ready = 1'b0;
  fp32_t            alpha [K];
  logic             comb_valid;
  fp32_t            comb_data;
  logic             comb_ready = 1'b0;
  logic             vec_valid [K];
  fp32_t            vec_data  [K];
  logic             vec_ready [K];
  logic [IDX_W-1:0] pe_row [K];
  logic             stall;
  logic             done;

  int checks = 0;
  int failures = 0;

  // CSR matrix, start vector and references
  int    rp[N+1];
  fp32_t vals[$];
  int    cols[$];
  fp32_t x0[N];
  real   xref[N];
  real   yref[N];
  real   ymag[N];
  int    nnz;

  // mechanism counters
  longint n_hazard, n_mbuf_full, n_vbuf_full, n_win_full, n_empty_row;
  longint n_comb_full, n_out_wait, n_stall, n_restart;

  krylov_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (longint c = 0; c < WATCHDOG; c++) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors, read from inside the pipeline.
  for (genvar i = 0; i < int'(K); i++) begin : g_mon
    always @(posedge clk) if (enable) begin
      if (dut.m_valid[i] && !dut.g_pe[i].u_pe.have_x) n_hazard++;
      if (dut.x_valid[i] && !dut.x_ready[i]) n_win_full++;
      if (!dut.vb_ready[i] && i < int'(K) - 1) n_vbuf_full++;
      if (!dut.mo_ready[i]) n_mbuf_full++;
      if (!dut.cb_ready[i]) n_comb_full++;
    end
  end
  always @(posedge clk) if (enable) begin
    if (dut.u_csr.state == dut.u_csr.S_EMPTY && dut.m_ready[0]) n_empty_row++;
    if (xk_valid && !xk_ready) n_out_wait++;
    if (stall) n_stall++;
  end

  task automatic build();
    int len, lo, hi, pick, tmp;
    int band_cols[$];
    real xi[N], xn[N];
    vals.delete();
    cols.delete();
    rp[0] = 0;
    for (int i = 0; i < N; i++) begin
      lo = (i - HALF < 0) ? 0 : i - HALF;
      hi = (i + HALF > N - 1) ? N - 1 : i + HALF;
      len = ($urandom_range(0, 99) < EMPTY_PCT) ? 0 : $urandom_range(1, R);
      band_cols.delete();
      for (int c = lo; c <= hi; c++) band_cols.push_back(c);
      if (len > band_cols.size()) len = band_cols.size();
      for (int e = 0; e < len; e++) begin
        pick = $urandom_range(e, band_cols.size() - 1);
        tmp = band_cols[e]; band_cols[e] = band_cols[pick]; band_cols[pick] = tmp;
        cols.push_back(band_cols[e]);
        // Row sums near one keep the powers bounded, as for PageRank.
        vals.push_back(to_fp32((VAL_LO + VAL_SPAN * real'($urandom_range(0, 1000)) / 1000.0) / real'(len)));
      end
      rp[i+1] = rp[i] + len;
    end
    nnz = vals.size();
    for (int i = 0; i < N; i++) begin
      x0[i] = to_fp32(real'($urandom_range(1, 1000000)) / 1000000.0);
      xi[i] = from_fp32(x0[i]);
      yref[i] = 0.0;
      ymag[i] = 0.0;
    end
    for (int s = 0; s < int'(K); s++) begin
      for (int i = 0; i < N; i++) begin
        xn[i] = 0.0;
        for (int e = rp[i]; e < rp[i+1]; e++) xn[i] += from_fp32(vals[e]) * xi[cols[e]];
      end
      for (int i = 0; i < N; i++) begin
        xi[i] = xn[i];
        yref[i] += from_fp32(alpha[s]) * xn[i];
        ymag[i] += (from_fp32(alpha[s]) < 0.0 ? -from_fp32(alpha[s]) : from_fp32(alpha[s])) * xn[i];
      end
    end
    for (int i = 0; i < N; i++) xref[i] = xi[i];
  endtask

  task automatic run(int pct, output longint cycles);
    int rp_i = 0, nz_i = 0, x_i = 0, xk_got = 0, y_got = 0;
    cycles = 0;
    enable = 1'b1;
    while (!(done && xk_got == N && (!COMB || y_got == N))) begin
      rp_valid   = (rp_i <= N) && ($urandom_range(0, 99) < pct);
      rp_data    = IDX_W'(rp[(rp_i <= N) ? rp_i : N]);
      nz_valid   = (nz_i < nnz) && ($urandom_range(0, 99) < pct);
      nz_val     = vals[(nz_i < nnz) ? nz_i : 0];
      nz_col     = IDX_W'(cols[(nz_i < nnz) ? nz_i : 0]);
      x0_valid   = (x_i < N) && ($urandom_range(0, 99) < pct);
      x0_data    = x0[(x_i < N) ? x_i : 0];
      // Slow memory writes in the first run back the pipeline up.
      xk_ready   = ($urandom_range(0, 99) < ((pct < 75) ? 3 : pct - 10));
      comb_ready = ($urandom_range(0, 99) < ((pct < 75) ? 3 : pct - 10));
      #1;
      if (rp_valid && rp_ready) rp_i++;
      if (nz_valid && nz_ready) nz_i++;
      if (x0_valid && x0_ready) x_i++;
      if (xk_valid && xk_ready) begin
        checks++;
        if (xk_got >= N || !close(from_fp32(xk_data), xref[xk_got], REL_TOL, 1e-12)) begin
          failures++;
          if (failures < 10) $display("x^K[%0d] = %g, want %g", xk_got,
                                      from_fp32(xk_data), xref[xk_got]);
        end
        xk_got++;
      end
      if (COMB && comb_valid && comb_ready) begin
        checks++;
        if (y_got >= N || !close(from_fp32(comb_data), yref[y_got], 0.0,
                                  REL_TOL * ymag[y_got] + 1e-12)) begin
          failures++;
          if (failures < 10) $display("y[%0d] = %g, want %g", y_got,
                                      from_fp32(comb_data), yref[y_got]);
        end
        y_got++;
      end
      @(posedge clk);
      #1;
      cycles++;
    end
    rp_valid = 1'b0;
    nz_valid = 1'b0;
    x0_valid = 1'b0;
    checks++;
    if (rp_i != N + 1 || nz_i != nnz || x_i != N) begin
      failures++;
      $display("inputs consumed: %0d pointers, %0d nonzeros, %0d x", rp_i, nz_i, x_i);
    end
    for (int i = 0; i < int'(K); i++) begin
      checks++;
      if (pe_row[i] != IDX_W'(N)) begin
        failures++;
        $display("PE %0d stopped at row %0d", i, pe_row[i]);
      end
    end
    enable = 1'b0;
    n_restart++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    longint cycles, bound;
    for (int i = 0; i < int'(K); i++)
      alpha[i] = to_fp32(real'($signed($urandom_range(0, 2000)) - 1000) / 1000.0);
    for (int i = 0; i < int'(K); i++) vec_ready[i] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int run_i = 0; run_i < RUNS; run_i++) begin
      build();
      run((run_i == RUNS - 1) ? 110 : 70 + 10 * run_i, cycles);
      $display("run %0d: n=%0d nnz=%0d K=%0d cycles=%0d", run_i, N, nnz, K, cycles);
    end
    // The last run had every stream always ready: check the overlap.
    bound = longint'(nnz) + longint'(K - 1) * BAND * BAND;
    checks++;
    if (cycles > bound || cycles * 2 > longint'(K) * nnz) begin
      failures++;
      $display("overlap: %0d cycles, model bound %0d, sequential %0d", cycles, bound, K * nnz);
    end
    $display("mechanisms: hazard=%0d mbuf_full=%0d vbuf_full=%0d win_full=%0d empty_row=%0d",
             n_hazard, n_mbuf_full, n_vbuf_full, n_win_full, n_empty_row);
    $display("            comb_full=%0d out_wait=%0d stall=%0d restart=%0d",
             n_comb_full, n_out_wait, n_stall, n_restart);
    checks += 9;
    if (n_hazard == 0)    begin failures++; $display("no data hazard");        end
    if (n_mbuf_full == 0 && ALL_MECH) begin failures++; $display("no full matrix buffer"); end
    if (n_vbuf_full == 0 && ALL_MECH) begin failures++; $display("no full vector buffer"); end
    if (n_win_full == 0)  begin failures++; $display("no full window");        end
    if (n_empty_row == 0 && EMPTY_PCT > 0) begin failures++; $display("no empty row"); end
    if (n_comb_full == 0 && COMB) begin failures++; $display("no full combine window"); end
    if (n_out_wait == 0)  begin failures++; $display("no output back-pressure"); end
    if (n_stall == 0)     begin failures++; $display("no global stall");       end
    if (n_restart < 2)    begin failures++; $display("no restart");            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
