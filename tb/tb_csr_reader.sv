// Testbench of the CSR reader.  A random CSR matrix (row lengths 0..6, with
// about one row in six empty) is offered on the row-pointer and nonzero
// streams at random rates while the consumer accepts at a random rate.  Every
// output entry is compared with the entry list built directly from the CSR
// arrays, in which an empty row i contributes the placeholder (0, i, last).
// The matrix is then read a second time after enable has been dropped.
module tb_csr_reader;
  import krylov_pkg::*;

  localparam int N = 300;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             enable = 1'b0;
  logic             rp_valid = 1'b0;
  logic [IDX_W-1:0] rp_data = '0;
  logic             rp_ready;
  logic             nz_valid = 1'b0;
  fp32_t            nz_val = '0;
  logic [IDX_W-1:0] nz_col = '0;
  logic             nz_ready;
  logic             out_valid;
  mat_elem_t        out_data;
  logic             out_ready = 1'b0;

  int checks = 0;
  int failures = 0;
  int empty_rows = 0;

  int        rp[N+1];
  fp32_t     vals[$];
  int        cols[$];
  mat_elem_t expect_q[$];

  csr_reader dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build();
    int len;
    vals.delete(); cols.delete(); expect_q.delete();
    rp[0] = 0;
    for (int i = 0; i < N; i++) begin
      len = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 6);
      rp[i+1] = rp[i] + len;
      if (len == 0) begin
        expect_q.push_back('{val: '0, col: IDX_W'(i), last: 1'b1});
        empty_rows++;
      end
      for (int e = 0; e < len; e++) begin
        vals.push_back($urandom());
        cols.push_back(i + e);
        expect_q.push_back('{val: vals[$], col: IDX_W'(i + e), last: (e == len - 1)});
      end
    end
  endtask

  task automatic run();
    int rp_i = 0, nz_i = 0, got = 0;
    int total = expect_q.size();
    enable <= 1'b1;
    while (got < total) begin
      rp_valid  = (rp_i <= N) && ($urandom_range(0, 3) != 0);
      rp_data   = IDX_W'(rp[(rp_i <= N) ? rp_i : N]);
      nz_valid  = (nz_i < vals.size()) && ($urandom_range(0, 3) != 0);
      nz_val    = (nz_i < vals.size()) ? vals[nz_i] : '0;
      nz_col    = (nz_i < cols.size()) ? IDX_W'(cols[nz_i]) : '0;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== expect_q[got]) begin
          failures++;
          $display("entry %0d: got %p want %p", got, out_data, expect_q[got]);
        end
        got++;
      end
      if (rp_valid && rp_ready) rp_i++;
      if (nz_valid && nz_ready) nz_i++;
      @(posedge clk);
      #1;
    end
    rp_valid = 1'b0;
    nz_valid = 1'b0;
    checks++;
    if (rp_i != N + 1 || nz_i != vals.size()) begin
      failures++;
      $display("consumed %0d pointers and %0d nonzeros", rp_i, nz_i);
    end
    enable <= 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    build();
    run();
    build();
    run();
    checks++;
    if (empty_rows == 0) begin
      failures++;
      $display("no empty row exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
