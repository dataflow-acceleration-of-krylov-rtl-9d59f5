// Testbench of the matrix buffer (DEPTH reduced to 12 to reach the full
// condition often).  A producer that, like a processing element, decides on
// in_ready and writes one cycle later pushes random entries at a random rate;
// a consumer pops at a random rate.  A queue model checks order and contents
// of every popped entry, the level output, out_valid, and that the credit
// never lets the buffer overflow.  A clear in the middle must empty it.
module tb_matrix_buffer;
  import krylov_pkg::*;

  localparam int unsigned DEPTH = 12;
  typedef mat_elem_t entry_t;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   clear = 1'b0;
  logic   in_valid = 1'b0;
  entry_t in_data;
  logic   in_ready;
  logic   out_valid;
  entry_t out_data;
  logic   out_ready = 1'b0;
  logic [$clog2(DEPTH+1)-1:0] level;

  int checks = 0;
  int failures = 0;
  int full_seen = 0;
  entry_t model[$];
  bit     want = 1'b0;

  matrix_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles, int push_pct, int pop_pct);
    for (int c = 0; c < cycles; c++) begin
      // Check the state seen at this edge.
      checks++;
      if (level != $bits(level)'(model.size()) || out_valid != (model.size() != 0)) begin
        failures++;
        $display("level %0d valid %0b, model holds %0d", level, out_valid, model.size());
      end
      if (out_valid && model.size() != 0) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++;
          $display("head %h, want %h", out_data, model[0]);
        end
      end
      if (model.size() >= DEPTH - 1) full_seen++;
      // Registered producer: the write of this cycle was decided on
      // in_ready one cycle earlier.
      in_valid  = want;
      in_data   = {$urandom(), $urandom(), 1'($urandom_range(0,1))};
      want      = in_ready && ($urandom_range(0, 99) < push_pct);
      out_ready = ($urandom_range(0, 99) < pop_pct);
      // Update the model with the transfers of the coming edge.
      if (in_valid) model.push_back(in_data);
      if (out_valid && out_ready) void'(model.pop_front());
      checks++;
      if (model.size() > DEPTH) begin
        failures++;
        $display("overflow");
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    run(3000, 80, 40);   // mostly full
    run(3000, 40, 80);   // mostly empty
    run(3000, 60, 60);
    clear    <= 1'b1;
    in_valid <= 1'b0;
    want = 1'b0;
    @(posedge clk);
    clear <= 1'b0;
    model.delete();
    #1;
    checks++;
    if (out_valid || level != 0) begin
      failures++;
      $display("clear left entries");
    end
    run(2000, 70, 70);
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("buffer never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
