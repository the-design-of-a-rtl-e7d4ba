// tb_register_select_unit: applies every address and command with random
// acknowledges from the two outputs. Checks: only the output named by the
// top address bit is requested, the command passes unchanged, the top bit is
// removed from the address, and the acknowledge of that output (and only
// that one) is returned.
module tb_register_select_unit;
  import dfp_pkg::*;
  logic          in_valid, in_ack;
  reg_cmd_e      in_cmd, out_cmd;
  logic [Q-1:0]  in_addr;
  logic [1:0]    out_valid, out_ack;
  logic [Q-2:0]  out_addr;

  register_select_unit #(.H(Q)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int a = 0; a < 2**Q; a++)
      for (int c = 0; c < 4; c++)
        for (int v = 0; v < 2; v++)
          for (int k = 0; k < 4; k++) begin
            logic d;
            in_addr = Q'(a); in_cmd = reg_cmd_e'(c); in_valid = 1'(v); out_ack = 2'(k);
            #1;
            d = in_addr[Q-1];
            checks++;
            if (out_valid != (v ? (2'b01 << d) : 2'b00) || out_cmd != in_cmd ||
                out_addr != in_addr[Q-2:0] || in_ack != out_ack[d]) begin
              failures++;
              $display("FAIL addr %0d cmd %0d valid %0d ack %b", a, c, v, k);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
