// Testbench of the combine unit (K = 4 stages, windows of 16 entries).
// Four vector streams x^1..x^4 of 300 elements are offered as processing
// elements would produce them: stage i may emit element j only after stage
// i-1 has, each emission is decided on the stage's credit one cycle earlier,
// and all rates are random.  Coefficients and elements are multiples of 1/16,
// so y_j = sum_i alpha_i x^i_j is exact and is compared bit for bit.  Full
// windows (credit withdrawn) and output back-pressure must occur.
module tb_combine_unit;
  import krylov_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned K = 4;
  localparam int N = 300;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  enable = 1'b0;
  fp32_t alpha   [K];
  logic  x_valid [K];
  fp32_t x_data  [K];
  logic  x_ready [K];
  logic  y_valid;
  fp32_t y_data;
  logic  y_ready = 1'b0;

  int checks = 0;
  int failures = 0;
  int n_credit_low = 0, n_out_wait = 0;

  real xs[K][N];
  int  sent[K];
  bit  want[K];
  int  y_got;

  combine_unit #(.K(K), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd16();
    return real'($signed($urandom_range(0, 512)) - 256) / 16.0;
  endfunction

  initial begin
    real want_y;
    for (int i = 0; i < int'(K); i++) begin
      alpha[i]   = to_fp32(rnd16());
      x_valid[i] = 1'b0;
      x_data[i]  = '0;
      sent[i]    = 0;
      want[i]    = 1'b0;
      for (int j = 0; j < N; j++) xs[i][j] = rnd16();
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    enable = 1'b1;
    y_got = 0;
    while (y_got < N) begin
      // Emissions decided last cycle take place now.
      for (int i = 0; i < int'(K); i++) begin
        x_valid[i] = want[i];
        x_data[i]  = to_fp32(xs[i][want[i] ? sent[i] : 0]);
        if (want[i]) sent[i]++;
      end
      for (int i = 0; i < int'(K); i++) begin
        if (!x_ready[i]) n_credit_low++;
        want[i] = x_ready[i] && sent[i] < N && (i == 0 || sent[i-1] > sent[i])
                  && ($urandom_range(0, 99) < 60);
      end
      y_ready = ($urandom_range(0, 99) < 35);
      #1;
      if (y_valid && !y_ready) n_out_wait++;
      if (y_valid && y_ready) begin
        want_y = 0.0;
        for (int i = 0; i < int'(K); i++) want_y += from_fp32(alpha[i]) * xs[i][y_got];
        checks++;
        if (y_data !== to_fp32(want_y)) begin
          failures++;
          $display("y[%0d] = %g, want %g", y_got, from_fp32(y_data), want_y);
        end
        y_got++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_credit_low == 0 || n_out_wait == 0) begin
      failures++;
      $display("mechanisms: credit low %0d, output waits %0d", n_credit_low, n_out_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
