// c_module: a C-module (Muller C-element) in clocked form.
//
// The output rises once both inputs are 1 and falls once both inputs are 0;
// while the inputs disagree it keeps its value. This is the document's basic
// joining element: a signal passes only after both of two events have
// happened. Here the output is a register that follows the rule at each clock
// edge, so it changes one clock after the inputs agree (own choice in place of
// the asynchronous gate). Reset clears the output. Used by the run enable
// unit to join the completion signals of two subtrees.
module c_module (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          y <= 1'b0;
    else if (a && b)     y <= 1'b1;
    else if (!a && !b)   y <= 1'b0;
  end

endmodule
