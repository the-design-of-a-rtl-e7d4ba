// tb_sp_buffer_unit: sends random instruction packets as M three-bit bytes
// (MSB first) and checks that each comes out as one parallel A[3M] byte with
// the three words rebuilt, that no output appears before the last byte, and
// that the input is refused while the buffer is full.
module tb_sp_buffer_unit;
  import dfp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [2:0]        in_data = 0;
  logic [IPKT_W-1:0] out_data;

  sp_buffer_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      logic [M-1:0] w [3];
      for (int k = 0; k < 3; k++) w[k] = M'($urandom);
      for (int i = M - 1; i >= 0; i--) begin
        @(negedge clk);
        check(!out_valid, "output before packet complete");
        in_valid = 1; in_data = {w[0][i], w[1][i], w[2][i]}; in_last = (i == 0);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      check(out_valid && out_last, "no output after packet");
      check(!in_ready, "input accepted while buffer full");
      check(out_data == {w[0], w[1], w[2]}, $sformatf("packet %h", out_data));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      check(!out_valid, "buffer not emptied");
    end
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
