// run_enable_unit: Run Enable Unit of the control network.
//
// Forwards execution requests (R, and the final request RF) from its input D
// link to both output D links, acknowledging each at once so that many
// requests can be travelling through the network together, as the document
// describes. Requests not yet taken by a subtree are kept as a count per
// output plus a flag for a pending RF; RF is forwarded after every R before
// it. A new request is taken while both counts have room and no RF is
// pending. The counts are event pipelines (counters of width W, own choice).
// Completion works the other way: the unit's done output rises when both
// subtrees signal done and falls when both have dropped it (a C-module), and
// the acknowledge AD from above is passed to both subtrees.
module run_enable_unit #(
  parameter int W = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_final,
  output logic       in_ready,
  output logic       done_out,
  input  logic       done_ack_in,
  output logic [1:0] out_valid,
  output logic [1:0] out_final,
  input  logic [1:0] out_ready,
  input  logic [1:0] done_in,
  output logic [1:0] done_ack_out
);

  logic [W-1:0] cnt [2];
  logic [1:0]   fin, q_ready, q_valid, q_pop;
  logic         take;

  assign in_ready     = (fin == 2'b00) && (&q_ready);
  assign take         = in_valid && in_ready;
  assign done_ack_out = {2{done_ack_in}};

  for (genvar c = 0; c < 2; c++) begin : g_out
    // R requests owed to this subtree
    event_pipeline #(.W(W)) u_q (
      .clk, .rst_n,
      .in_valid(take && !in_final), .in_ready(q_ready[c]),
      .out_valid(q_valid[c]), .out_ready(q_pop[c]),
      .count(cnt[c])
    );
    assign out_valid[c] = q_valid[c] || fin[c];
    assign out_final[c] = !q_valid[c] && fin[c];
    assign q_pop[c]     = out_ready[c] && !out_final[c];
  end

  // completion: done rises when both subtrees are done, falls when both drop
  c_module u_join (.clk, .rst_n, .a(done_in[0]), .b(done_in[1]), .y(done_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (out_valid[c] && out_ready[c] && out_final[c]) fin[c] <= 1'b0;
        if (take && in_final) fin[c] <= 1'b1;
      end
    end
  end

endmodule
