// arb_unit: Arbitration Unit. Passes packets arriving on NIN input links,
// one whole packet at a time, to a single output link.
//
// A packet is a sequence of K-bit bytes with valid/ready per byte and a last
// flag on the final byte (an A[k] link; a parallel B link is a one-byte packet
// with last = 1). When no packet is in progress the unit grants the first
// requesting input at or after the round-robin pointer; once the first byte of
// a packet has passed, the grant is held until its last byte has passed, and
// the pointer then moves past the served input. Selection is combinational, so
// a byte passes in the cycle it is offered when the output is ready.
//
// The document's unit has two inputs and a round-robin discipline; it notes
// that larger fan-in is a straightforward generalization, which NIN provides.
// Grant on the clock edge replaces the asynchronous arbiter.
module arb_unit #(
  parameter int NIN = 2,
  parameter int K   = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NIN-1:0] in_valid,
  output logic [NIN-1:0] in_ready,
  input  logic [K-1:0]   in_data [NIN],
  input  logic [NIN-1:0] in_last,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [K-1:0]   out_data,
  output logic           out_last
);

  localparam int SW = (NIN > 1) ? $clog2(NIN) : 1;

  logic          locked;
  logic [SW-1:0] cur, ptr, pick, sel;
  logic          any;

  // round-robin choice among requesting inputs
  always_comb begin
    pick = ptr;
    any  = 1'b0;
    for (int k = NIN - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(ptr) + k) % NIN;
      if (in_valid[idx]) begin
        pick = SW'(idx);
        any  = 1'b1;
      end
    end
  end

  assign sel       = locked ? cur : pick;
  assign out_valid = locked ? in_valid[cur] : any;
  assign out_data  = in_data[sel];
  assign out_last  = in_last[sel];

  always_comb begin
    in_ready = '0;
    in_ready[sel] = out_ready && out_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      ptr    <= '0;
    end else if (out_valid && out_ready) begin
      if (out_last) begin
        locked <= 1'b0;
        ptr    <= (int'(sel) == NIN - 1) ? '0 : sel + 1'b1;
      end else begin
        locked <= 1'b1;
        cur    <= sel;
      end
    end
  end

  a_hold_grant: assert property (@(posedge clk) disable iff (!rst_n)
    (locked && !(out_valid && out_ready && out_last)) |=> (locked && cur == $past(cur)));

endmodule
