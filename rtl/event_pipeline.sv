// event_pipeline: a queue of indistinguishable events.
//
// Events enter with in_valid/in_ready and leave with out_valid/out_ready.
// Because the events carry no data, the queue is kept as a count: an event
// is waiting whenever the count is non-zero, and a new event is refused when
// the count is at its maximum 2**W-1. One event may enter and one leave in
// the same clock. The count is also brought out for observation.
//
// The document's event pipeline is a chain of C-modules holding up to a
// fixed number of events; the counter is this design's clocked equivalent,
// and W (its width) is an own choice. Used for the execution requests queued
// in a memory cell and in each branch of a run enable unit.
module event_pipeline #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] count
);

  logic push, pop;

  assign in_ready  = (count != '1);
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + W'(push) - W'(pop);
  end

endmodule
