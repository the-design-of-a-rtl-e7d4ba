// command_interpreter: Command Interpreter Unit of the Controller.
//
// Carries out one host command at a time. The host presents a command with
// host_valid and holds it; host_ready is raised for one clock when the
// command has been completed, which is when the transfer takes place.
//   enter-constant / enter-variable (a, v): the value v is sent into the
//       distribution network as a result packet for address a, and at the
//       same time an enter command goes to register a over the command
//       network; the register acknowledges once the value has arrived.
//   empty (a) / idle (a): only the command-network transaction.
//   run (v): v is passed to the execution counter, which reports when all
//       cells have completed v execution cycles.
// Command-network and execution-counter transactions are four-phase: request
// up, acknowledge up, request down, acknowledge down -- the link discipline of
// the document. The order of the steps follows the document's description of
// the unit; the encoding of the host port is this design's own.
module command_interpreter
  import dfp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // host
  input  logic         host_valid,
  output logic         host_ready,
  input  host_cmd_e    host_cmd,
  input  logic [Q-1:0] host_addr,
  input  logic [M-1:0] host_value,
  // result packet to the distribution network, B[Q,M]
  output logic         rp_valid,
  input  logic         rp_ready,
  output logic [Q-1:0] rp_addr,
  output logic [M-1:0] rp_value,
  // command packet to the command network, C[Q]
  output logic         c_valid,
  output reg_cmd_e     c_cmd,
  output logic [Q-1:0] c_addr,
  input  logic         c_ack,
  // run request to the execution counter
  output logic         run_valid,
  output logic [M-1:0] run_count,
  input  logic         run_done
);

  typedef enum logic [2:0] {I_IDLE, I_CMD, I_CMD_LOW, I_RUN, I_RUN_LOW, I_DONE} ci_state_e;

  ci_state_e    state;
  logic         rp_pend;
  logic [Q-1:0] addr_q;
  logic [M-1:0] value_q;
  reg_cmd_e     cmd_q;

  assign rp_valid   = rp_pend;
  assign rp_addr    = addr_q;
  assign rp_value   = value_q;
  assign c_valid    = (state == I_CMD);
  assign c_cmd      = cmd_q;
  assign c_addr     = addr_q;
  assign run_valid  = (state == I_RUN);
  assign run_count  = value_q;
  assign host_ready = (state == I_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= I_IDLE;
      rp_pend <= 1'b0;
      addr_q  <= '0;
      value_q <= '0;
      cmd_q   <= CMD_EMPTY;
    end else begin
      if (rp_valid && rp_ready) rp_pend <= 1'b0;
      unique case (state)
        I_IDLE: if (host_valid) begin
          addr_q  <= host_addr;
          value_q <= host_value;
          unique case (host_cmd)
            HOST_ENTER_CON: begin cmd_q <= CMD_ENTER_CON; rp_pend <= 1'b1; state <= I_CMD; end
            HOST_ENTER_VAR: begin cmd_q <= CMD_ENTER_VAR; rp_pend <= 1'b1; state <= I_CMD; end
            HOST_EMPTY:     begin cmd_q <= CMD_EMPTY;     state <= I_CMD; end
            HOST_IDLE:      begin cmd_q <= CMD_IDLE;      state <= I_CMD; end
            default:        state <= I_RUN;
          endcase
        end
        I_CMD:     if (c_ack && !rp_pend) state <= I_CMD_LOW;
        I_CMD_LOW: if (!c_ack) state <= I_DONE;
        I_RUN:     if (run_done) state <= I_RUN_LOW;
        I_RUN_LOW: if (!run_done) state <= I_DONE;
        default:   state <= I_IDLE;   // I_DONE: host_ready for one clock
      endcase
    end
  end

endmodule
