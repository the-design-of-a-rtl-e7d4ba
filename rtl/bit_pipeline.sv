// bit_pipeline: a first-in first-out store of up to N bits.
//
// Bits enter at in_bit with in_valid/in_ready and leave, oldest first, at
// out_bit with out_valid/out_ready. A bit may enter and another leave in the
// same clock, also when the store is full, so a bit can be taken from the
// output and put back at the input in one step (how a register keeps a
// constant while sending it). clear empties the store.
//
// Storage is a shift register aligned to its top end: the oldest bit sits in
// bit N-1 and a pop shifts everything up by one; count says how many bits are
// held. The document's bit pipeline is a chain of data switches that lets
// bits ripple forward, taking 2N sections for N bits; this clocked form keeps
// its behaviour (order, capacity, simultaneous entry and exit) without the
// ripple.
module bit_pipeline #(
  parameter int N = 16,
  localparam int CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_bit,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_bit,
  output logic [CW-1:0] count
);

  logic [N-1:0]  sr, shifted, put;
  logic          push, pop;
  logic [CW-1:0] n_after_pop;

  assign out_valid   = (count != '0);
  assign out_bit     = sr[N-1];
  assign pop         = out_valid && out_ready;
  assign in_ready    = (count != CW'(N)) || pop;
  assign push        = in_valid && in_ready;
  assign shifted     = pop ? {sr[N-2:0], 1'b0} : sr;
  assign n_after_pop = count - CW'(pop);

  // the new bit goes right behind the bits still held after the pop
  always_comb begin
    put = shifted;
    if (push) put[N-1-int'(n_after_pop)] = in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else begin
      sr    <= put;
      count <= n_after_pop + CW'(push);
    end
  end

endmodule
