// ps_buffer_unit: Buffer and Parallel-to-Serial Conversion Unit at the end of
// a distribution-network path.
//
// Takes the value of a result packet (parallel, the address having been used
// up by the switches) into a buffer register, then sends it to its Register
// Unit over a B[0,1] link: one bit per transfer, most significant bit first,
// with last marking the final bit (the document's "space" signal that ends a
// packet). A new value is taken only after the last bit has gone, so the
// switch in front never waits for the conversion of a packet already taken.
module ps_buffer_unit
  import dfp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] in_value,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_bit,
  output logic         out_last
);

  localparam int CW = $clog2(M);

  logic          full;
  logic [M-1:0]  sh;
  logic [CW-1:0] cnt;

  assign in_ready  = !full;
  assign out_valid = full;
  assign out_bit   = sh[M-1];
  assign out_last  = (cnt == CW'(M-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      sh   <= '0;
      cnt  <= '0;
    end else if (in_valid && in_ready) begin
      full <= 1'b1;
      sh   <= in_value;
      cnt  <= '0;
    end else if (out_valid && out_ready) begin
      sh  <= {sh[M-2:0], 1'b0};
      cnt <= cnt + 1'b1;
      if (out_last) full <= 1'b0;
    end
  end

endmodule
