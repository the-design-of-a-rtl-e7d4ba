// tb_bit_pipeline: a 16-bit pipeline driven with random pushes, pops and
// occasional clears, with phases that favour filling or draining it, and a
// queue in the testbench as reference. Checks every clock: in_ready and
// out_valid against the reference occupancy, out_bit against the oldest
// reference bit, and the count. Also checks that a push and a pop in the same
// clock are both accepted when the pipeline is full, as a constant register
// needs.
module tb_bit_pipeline;
  localparam int N  = 16;
  localparam int CW = $clog2(N + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          clear = 0, in_valid = 0, in_ready, in_bit = 0, out_valid, out_ready = 0, out_bit;
  logic [CW-1:0] count;

  bit_pipeline #(.N(N)) dut (.*);

  int checks = 0, failures = 0, full_swap = 0;
  bit q [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int phase;
      bit do_push, do_pop;
      phase = (i / 150) % 3;
      @(negedge clk);
      clear     = ($urandom_range(0, 199) == 0);
      in_valid  = (phase == 1) ? ($urandom_range(0, 5) != 0) : (phase == 2) ? ($urandom_range(0, 5) == 0) : 1'($urandom);
      out_ready = (phase == 2) ? ($urandom_range(0, 5) != 0) : (phase == 1) ? ($urandom_range(0, 5) == 0) : 1'($urandom);
      in_bit    = 1'($urandom);
      #1;
      do_pop  = out_ready && q.size() > 0;
      do_push = in_valid && (q.size() < N || do_pop);
      checks++;
      if (out_valid != (q.size() > 0) || in_ready != (q.size() < N || do_pop) ||
          int'(count) != q.size() || (q.size() > 0 && out_bit != q[0])) begin
        failures++;
        $display("FAIL n=%0d out_valid=%b in_ready=%b count=%0d out_bit=%b", q.size(), out_valid, in_ready, count, out_bit);
      end
      if (q.size() == N && do_push && do_pop) full_swap++;
      @(posedge clk);
      if (clear) q.delete();
      else begin
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(in_bit);
      end
    end
    checks++;
    if (full_swap == 0) begin failures++; $display("FAIL no push and pop while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
