// controller: the Controller section -- a Command Interpreter Unit taking the
// host's commands and an Execution Counter Unit turning run commands into
// execution requests. Its three outward links are the result-packet link into
// the distribution network (B[Q,M]), the command link into the command network
// (C[Q]) and the D link into the control network.
module controller
  import dfp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         host_valid,
  output logic         host_ready,
  input  host_cmd_e    host_cmd,
  input  logic [Q-1:0] host_addr,
  input  logic [M-1:0] host_value,
  output logic         rp_valid,
  input  logic         rp_ready,
  output logic [Q-1:0] rp_addr,
  output logic [M-1:0] rp_value,
  output logic         c_valid,
  output reg_cmd_e     c_cmd,
  output logic [Q-1:0] c_addr,
  input  logic         c_ack,
  output logic         req_valid,
  output logic         req_final,
  input  logic         req_ready,
  input  logic         done_in,
  output logic         done_ack
);

  logic         run_valid, run_done;
  logic [M-1:0] run_count;

  command_interpreter u_ci (
    .clk, .rst_n,
    .host_valid, .host_ready, .host_cmd, .host_addr, .host_value,
    .rp_valid, .rp_ready, .rp_addr, .rp_value,
    .c_valid, .c_cmd, .c_addr, .c_ack,
    .run_valid, .run_count, .run_done
  );

  execution_counter u_ec (
    .clk, .rst_n,
    .run_valid, .run_count, .run_done,
    .req_valid, .req_final, .req_ready, .done_in, .done_ack
  );

endmodule
