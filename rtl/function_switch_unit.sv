// function_switch_unit: Function Switch Unit of the arbitration network.
//
// Directs each instruction packet on its input link to one of NOUT output
// links according to the functional-unit field of the instruction (the top
// FSEL bits of the first byte). The decision is taken from the first byte and
// held for the rest of the packet, so multi-byte packets stay together; with
// the parallel A[3M] packets used after conversion every packet is one byte.
// Routing is combinational: a byte passes when the selected output is ready.
//
// The document illustrates a two-way unit testing one bit of the first byte
// and uses four-way switching in its arbitration network figure; this unit
// decodes the whole two-bit field in one step (own choice).
module function_switch_unit #(
  parameter int NOUT = 4,
  parameter int K    = 48,
  parameter int FSEL = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [K-1:0]    in_data,
  input  logic            in_last,
  output logic [NOUT-1:0] out_valid,
  input  logic [NOUT-1:0] out_ready,
  output logic [K-1:0]    out_data,
  output logic            out_last
);

  logic            mid;       // inside a multi-byte packet
  logic [FSEL-1:0] held, sel;

  assign sel      = mid ? held : in_data[K-1 -: FSEL];
  assign out_data = in_data;
  assign out_last = in_last;
  assign in_ready = out_ready[sel];

  always_comb begin
    out_valid      = '0;
    out_valid[sel] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid  <= 1'b0;
      held <= '0;
    end else if (in_valid && in_ready) begin
      mid  <= !in_last;
      held <= sel;
    end
  end

endmodule
