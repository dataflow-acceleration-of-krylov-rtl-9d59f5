// Testbench of the fixed-point row accumulator.  Rows of random products
// (multiples of 1/256, both signs) are summed; each row sum is formed
// independently as a real and must come out, bit-exact, as the single
// precision result one cycle after the row's last product.  Gaps between
// products, rows of length one and a clear in the middle of a row are
// exercised.
module tb_fixed_accumulator;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        clear = 1'b0;
  logic        in_valid = 1'b0;
  logic [31:0] in_fp = '0;
  logic        in_last = 1'b0;
  logic        out_valid;
  logic [31:0] out_fp;

  int checks = 0;
  int failures = 0;

  fixed_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(real v, bit last);
    in_valid <= 1'b1;
    in_fp    <= to_fp32(v);
    in_last  <= last;
    @(posedge clk);
    in_valid <= 1'b0;
    in_last  <= 1'b0;
  endtask

  // The output must pulse exactly one cycle after the last product.
  task automatic expect_sum(real want);
    #1;
    checks++;
    if (!out_valid || out_fp !== to_fp32(want)) begin
      failures++;
      $display("row sum: got valid=%0b %h (%f), want %h (%f)",
               out_valid, out_fp, from_fp32(out_fp), to_fp32(want), want);
    end
  endtask

  initial begin
    real sum, v;
    int  len;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int row = 0; row < 400; row++) begin
      len = 1 + $urandom_range(0, 40);
      sum = 0.0;
      for (int e = 0; e < len; e++) begin
        v = real'($signed($urandom_range(0, 32767)) - 16384) / 256.0;
        if ($urandom_range(0, 9) == 0) v = 0.0;
        sum += v;
        feed(v, e == len - 1);
        if (e != len - 1) begin
          #1;
          checks++;
          if (out_valid) begin
            failures++;
            $display("unexpected output in the middle of a row");
          end
          repeat ($urandom_range(0, 2)) @(posedge clk);
        end
      end
      expect_sum(sum);
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    // A clear discards a partial row.
    feed(3.5, 1'b0);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    feed(1.25, 1'b1);
    expect_sum(1.25);
    // Small products below one unit of 2^-32 are dropped; large ones add.
    feed(1.0/1073741824.0, 1'b0);
    feed(-1024.0, 1'b1);
    expect_sum(-1024.0 + 1.0/1073741824.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
