// tb_ps_buffer_unit: random values with random gaps; the register side takes
// bits at random. Checks: each value comes out as M bits, most significant
// first, with last on the final bit only, and no new value is accepted before
// the last bit of the previous one has gone.
module tb_ps_buffer_unit;
  import dfp_pkg::*;
  localparam int NP = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, out_valid, out_ready, out_bit, out_last;
  logic [M-1:0] in_value;

  ps_buffer_unit dut (.*);

  int checks = 0, failures = 0, sent = 0, got = 0, nbits = 0;
  logic [M-1:0] expq [$];
  logic [M-1:0] acc;
  logic gap;

  assign in_valid = !gap && sent < NP;

  always @(posedge clk) begin
    gap       <= ($urandom_range(0, 3) == 0);
    out_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && in_valid && in_ready) begin
      checks++;
      if (nbits != 0) begin failures++; $display("FAIL value taken during conversion"); end
      expq.push_back(in_value);
      sent     <= sent + 1;
      in_value <= M'($urandom);
    end
    if (rst_n && out_valid && out_ready) begin
      acc = {acc[M-2:0], out_bit};
      checks++;
      if (out_last != (nbits == M - 1)) begin failures++; $display("FAIL last at bit %0d", nbits); end
      if (out_last) begin
        checks++;
        if (acc != expq[0]) begin failures++; $display("FAIL value %h expected %h", acc, expq[0]); end
        void'(expq.pop_front());
        got   <= got + 1;
        nbits <= 0;
      end else nbits <= nbits + 1;
    end
  end

  initial begin
    in_value = 16'hA5C3; acc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (got == NP);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
