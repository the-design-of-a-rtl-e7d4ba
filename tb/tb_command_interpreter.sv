// tb_command_interpreter: sends each of the five host commands several times
// with random operands, playing the command network (acknowledge after a
// random delay, drop it after the request falls), the distribution network
// (random readiness) and the execution counter. Checks: enter commands send
// a result packet with the host's address and value and an enter command of
// the right kind; empty and idle send only the command; run passes its count
// to the execution counter; the command link follows the four-phase order;
// and host_ready comes only after the whole transaction.
module tb_command_interpreter;
  import dfp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         host_valid = 0, host_ready;
  host_cmd_e    host_cmd = HOST_RUN;
  logic [Q-1:0] host_addr = 0, rp_addr, c_addr;
  logic [M-1:0] host_value = 0, rp_value, run_count;
  logic         rp_valid, rp_ready, c_valid, c_ack = 0, run_valid, run_done = 0;
  reg_cmd_e     c_cmd;

  command_interpreter dut (.*);

  int checks = 0, failures = 0;
  int n_rp = 0, n_c = 0, n_run = 0;
  logic [Q-1:0] last_rp_addr;
  logic [M-1:0] last_rp_value, last_run;
  reg_cmd_e     last_cmd;
  logic [Q-1:0] last_c_addr;

  always @(posedge clk) begin
    rp_ready <= ($urandom_range(0, 2) == 0);
    if (rst_n && rp_valid && rp_ready) begin n_rp++; last_rp_addr = rp_addr; last_rp_value = rp_value; end
  end

  // command network model
  initial forever begin
    @(negedge clk);
    if (c_valid) begin
      n_c++; last_cmd = c_cmd; last_c_addr = c_addr;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      c_ack = 1;
      while (c_valid) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++;
      if (host_ready) begin failures++; $display("FAIL host_ready before ack fell"); end
      c_ack = 0;
    end
  end

  // execution counter model
  initial forever begin
    @(negedge clk);
    if (run_valid) begin
      n_run++; last_run = run_count;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      run_done = 1;
      while (run_valid) @(negedge clk);
      run_done = 0;
    end
  end

  task automatic host(input host_cmd_e c, input logic [Q-1:0] a, input logic [M-1:0] v);
    int rp0, c0, r0;
    rp0 = n_rp; c0 = n_c; r0 = n_run;
    @(negedge clk);
    host_cmd = c; host_addr = a; host_value = v; host_valid = 1;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_valid = 0;
    checks++;
    case (c)
      HOST_ENTER_CON, HOST_ENTER_VAR:
        if (n_rp != rp0 + 1 || n_c != c0 + 1 || n_run != r0 || last_rp_addr != a ||
            last_rp_value != v || last_c_addr != a ||
            last_cmd != ((c == HOST_ENTER_CON) ? CMD_ENTER_CON : CMD_ENTER_VAR)) begin
          failures++; $display("FAIL enter command %0d", c);
        end
      HOST_EMPTY, HOST_IDLE:
        if (n_rp != rp0 || n_c != c0 + 1 || n_run != r0 || last_c_addr != a ||
            last_cmd != ((c == HOST_EMPTY) ? CMD_EMPTY : CMD_IDLE)) begin
          failures++; $display("FAIL command %0d", c);
        end
      default:
        if (n_rp != rp0 || n_c != c0 || n_run != r0 + 1 || last_run != v) begin
          failures++; $display("FAIL run command");
        end
    endcase
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++)
      host(host_cmd_e'($urandom_range(0, 4)), Q'($urandom), M'($urandom));
    for (int c = 0; c < 5; c++) host(host_cmd_e'(c), Q'(c), M'(c + 7));
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
