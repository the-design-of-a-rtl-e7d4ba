// tb_register_unit: checks one Register Unit against values worked out here.
// Covers enter-constant (acknowledge only after the value arrived), serial
// read-out MSB first, a constant kept over two cycles, a full variable that
// must be refilled before its cycle completes, an empty variable that must be
// filled before it can be sent, the idle mode, and that values are refused
// while the register is full.
module tb_register_unit;
  import dfp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     cmd_valid = 0, cmd_ack;
  reg_cmd_e cmd = CMD_EMPTY;
  logic     din_valid = 0, din_bit = 0, din_last = 0, din_ready;
  logic     cyc_req = 0, cyc_e, cyc_done, pkt_shift = 0, pkt_sent = 0, cyc_end = 0;
  logic     dout_bit, is_idle;

  register_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // send one value serially (waits for din_ready)
  task automatic send_value(input logic [M-1:0] v);
    for (int i = M - 1; i >= 0; i--) begin
      @(negedge clk);
      din_valid = 1; din_bit = v[i]; din_last = (i == 0);
      while (!din_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    din_valid = 0; din_last = 0;
  endtask

  task automatic command(input reg_cmd_e c, input logic [M-1:0] v, input bit with_value);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    if (with_value) begin
      repeat (2) @(negedge clk);
      check(!cmd_ack, "enter acknowledged before value arrived");
      send_value(v);
    end
    while (!cmd_ack) @(negedge clk);
    cmd_valid = 0;
    while (cmd_ack) @(negedge clk);
  endtask

  // read the word out as a packet would, return it
  task automatic read_word(output logic [M-1:0] w);
    for (int i = M - 1; i >= 0; i--) begin
      @(negedge clk);
      w[i] = dout_bit;
      pkt_shift = 1; pkt_sent = (i == 0);
      @(negedge clk);
      pkt_shift = 0; pkt_sent = 0;
    end
  endtask

  task automatic end_cycle();
    @(negedge clk); cyc_end = 1; cyc_req = 0;
    @(negedge clk); cyc_end = 0;
  endtask

  initial begin
    logic [M-1:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset: idle
    @(negedge clk);
    check(is_idle, "not idle after reset");
    cyc_req = 1;
    @(negedge clk);
    check(cyc_e && cyc_done, "idle register holds up its cycle");
    end_cycle();

    // constant
    command(CMD_ENTER_CON, 16'hA5C3, 1);
    check(!din_ready, "constant register accepts values");
    for (int k = 0; k < 2; k++) begin
      cyc_req = 1;
      @(negedge clk);
      check(cyc_e && !cyc_done, "constant not ready to send");
      read_word(w);
      check(w == 16'hA5C3, $sformatf("constant read %h", w));
      @(negedge clk);
      check(cyc_done && !cyc_e, "constant cycle not complete after send");
      end_cycle();
    end

    // full variable: send, then must be refilled
    command(CMD_ENTER_VAR, 16'h1234, 1);
    cyc_req = 1;
    @(negedge clk);
    check(cyc_e, "full variable not ready");
    check(!din_ready, "full variable accepts a value");
    read_word(w);
    check(w == 16'h1234, $sformatf("variable read %h", w));
    repeat (3) @(negedge clk);
    check(!cyc_done, "full variable completed before refill");
    check(din_ready, "emptied variable refuses value");
    send_value(16'h0F0F);
    @(negedge clk);
    check(cyc_done, "full variable not complete after refill");
    end_cycle();
    cyc_req = 1;
    @(negedge clk);
    read_word(w);
    check(w == 16'h0F0F, $sformatf("refilled variable read %h", w));
    send_value(16'h7777);
    end_cycle();

    // empty variable: must be filled first, ends empty
    command(CMD_EMPTY, '0, 0);
    cyc_req = 1;
    repeat (3) @(negedge clk);
    check(!cyc_e && !cyc_done, "empty variable ready without value");
    send_value(16'hBEEF);
    @(negedge clk);
    check(cyc_e, "filled variable not ready");
    read_word(w);
    check(w == 16'hBEEF, $sformatf("empty-start variable read %h", w));
    @(negedge clk);
    check(cyc_done && din_ready, "empty-start variable cycle");
    end_cycle();

    // idle command
    command(CMD_IDLE, '0, 0);
    check(is_idle && dout_bit == 0, "idle command");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
