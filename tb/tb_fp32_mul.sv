// Testbench of the single-precision multiplier.  Random operands over a wide
// exponent range, plus zeros, subnormals, infinities and products that
// overflow or fall below the normal range, are multiplied; the expected
// result is the exact double-precision product rounded to single precision
// (nearest, ties to even) by bit manipulation here, with subnormal results
// flushed to zero, as the multiplier specifies.
module tb_fp32_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0;
  int failures = 0;

  fp32_mul dut (.*);

  function automatic logic [31:0] round_fp32(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 1'b1;
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [31:0] want;
    a = x;
    b = y;
    #1;
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF) want = {x[31] ^ y[31], 8'hFF, 23'd0};
    else want = round_fp32(from_fp32(x) * from_fp32(y));
    if (want[30:0] == 31'd0) want = {x[31] ^ y[31], 31'd0};
    checks++;
    if (p !== want) begin
      failures++;
      if (failures < 10) $display("%h * %h = %h, want %h", x, y, p, want);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    for (int i = 0; i < 200000; i++) begin
      x = $urandom();
      y = $urandom();
      // Keep most exponents near the middle so most products are normal.
      if (i % 4 != 0) begin
        x[30:23] = 8'($urandom_range(64, 190));
        y[30:23] = 8'($urandom_range(64, 190));
      end
      check(x, y);
    end
    check(32'h0000_0000, 32'h3F80_0000);
    check(32'h0000_0001, 32'h4000_0000);
    check(32'h7F80_0000, 32'h3F80_0000);
    check(32'h7F00_0000, 32'h7F00_0000);
    check(32'h0080_0000, 32'h3E80_0000);
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    check(32'hBF80_0000, 32'h3F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
