// tb_command_network: sends commands to every address, including the
// unused ones above the last register, with register models that
// acknowledge after a random delay and drop the acknowledge after the
// request falls. Checks: exactly the addressed register sees the request and
// the command; the controller's acknowledge follows that register's; unused
// addresses are acknowledged at once.
module tb_command_network;
  import dfp_pkg::*;
  localparam int NR = N_REGS;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_ack;
  reg_cmd_e      in_cmd = CMD_IDLE;
  logic [Q-1:0]  in_addr = 0;
  logic [NR-1:0] out_valid, out_ack = 0;
  reg_cmd_e      out_cmd [NR];

  command_network dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int a = 0; a < 2**Q; a++) begin
        reg_cmd_e c;
        c = reg_cmd_e'($urandom_range(0, 3));
        @(negedge clk);
        in_addr = Q'(a); in_cmd = c; in_valid = 1;
        #1;
        checks++;
        if (a < NR) begin
          if (out_valid != (NR'(1) << a) || out_cmd[a] != c || in_ack) begin
            failures++; $display("FAIL request to %0d: valid %h", a, out_valid);
          end
          repeat ($urandom_range(0, 3)) @(negedge clk);
          out_ack[a] = 1;
          #1;
          checks++;
          if (!in_ack) begin failures++; $display("FAIL ack from %0d not returned", a); end
          @(negedge clk);
          in_valid = 0;
          #1;
          checks++;
          if (out_valid != '0 || !in_ack) begin failures++; $display("FAIL release %0d", a); end
          @(negedge clk);
          out_ack[a] = 0;
          #1;
          checks++;
          if (in_ack) begin failures++; $display("FAIL ack %0d not dropped", a); end
        end else begin
          if (out_valid != '0 || !in_ack) begin
            failures++; $display("FAIL unused address %0d", a);
          end
          @(negedge clk);
          in_valid = 0;
          #1;
          checks++;
          if (in_ack) begin failures++; $display("FAIL unused ack %0d not dropped", a); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
