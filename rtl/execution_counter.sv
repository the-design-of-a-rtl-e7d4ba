// execution_counter: Execution Counter Unit of the Controller.
//
// A run request carrying v produces, on the D link to the control network, v
// execution requests R followed by one final request RF (each a valid/ready
// transfer; the control network acknowledges at once). The count is
// decremented after every R; when decrementing would borrow, RF is sent
// instead -- the document's decrement module with its borrow output. The unit
// then waits for the completion signal D from the network, answers with AD
// (four-phase), and reports run_done to the command interpreter, holding it
// until run_valid falls.
module execution_counter
  import dfp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run_valid,
  input  logic [M-1:0] run_count,
  output logic         run_done,
  // D link to the control network
  output logic         req_valid,
  output logic         req_final,
  input  logic         req_ready,
  input  logic         done_in,
  output logic         done_ack
);

  typedef enum logic [2:0] {E_IDLE, E_ISSUE, E_WAIT, E_ACK, E_DONE} ec_state_e;

  ec_state_e    state;
  logic [M-1:0] cnt;

  assign req_valid = (state == E_ISSUE);
  assign req_final = (cnt == '0);          // borrow: the final request
  assign done_ack  = (state == E_ACK);
  assign run_done  = (state == E_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (run_valid) begin
          cnt   <= run_count;
          state <= E_ISSUE;
        end
        E_ISSUE: if (req_ready) begin
          if (req_final) state <= E_WAIT;
          else           cnt   <= cnt - 1'b1;
        end
        E_WAIT:  if (done_in)    state <= E_ACK;
        E_ACK:   if (!done_in)   state <= E_DONE;
        default: if (!run_valid) state <= E_IDLE;   // E_DONE
      endcase
    end
  end

endmodule
