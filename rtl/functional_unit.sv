// functional_unit: one Functional Unit -- an operation unit in pipeline form
// with two address pipelines beside it, as in the document's pipelined
// functional unit.
//
// An instruction packet (parallel A[3M] link: instruction, operand x, operand
// y) is accepted when the first stage can move. The operation selected by
// KIND and the specialized-function field is evaluated as the packet enters;
// the result then travels LAT stages together with the two destination
// addresses (the "identity pipelines" of the document). In the last stage
// each present destination forms its own result packet (B[Q,M] link, out
// index 0 for destination 1 and 1 for destination 2), and the two packets are
// sent independently. The pipeline advances whenever the last stage is empty
// or both of its packets leave in that cycle, so one instruction per clock is
// sustained when the distribution network keeps up; latency is LAT clocks.
//
// KIND (own assignment of the four units; the document names multiply, add,
// identity, input and output operators but not the unit numbering):
//   FU_ADD  spec 0 x+y, 1 x-y, 2 x, 3 y (identity)
//   FU_MUL  spec 1 signed fraction (x*y)>>>(M-1), otherwise low M bits of x*y
//   FU_IN   result is the next sample of input channel x (waits for it)
//   FU_OUT  y is delivered on output channel x (waits until taken) and is
//           also the result for any destinations
// Computing at entry and delaying through the stages is this design's own
// simplification of a pipelined operation unit.
module functional_unit
  import dfp_pkg::*;
#(
  parameter logic [1:0] KIND = FU_ADD,
  parameter int         LAT  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction packets, A[3M]
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IPKT_W-1:0] in_data,
  // external input channels (used when KIND == FU_IN)
  input  logic [NCH-1:0]    ich_valid,
  output logic [NCH-1:0]    ich_ready,
  input  logic [M-1:0]      ich_data [NCH],
  // external output channels (used when KIND == FU_OUT)
  output logic [NCH-1:0]    och_valid,
  input  logic [NCH-1:0]    och_ready,
  output logic [M-1:0]      och_data,
  // result packets, B[Q,M]
  output logic [1:0]        r_valid,
  input  logic [1:0]        r_ready,
  output logic [Q-1:0]      r_addr [2],
  output logic [M-1:0]      r_value [2]
);

  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1;

  typedef struct packed {
    logic         v;
    logic         d1v;
    logic [Q-1:0] d1;
    logic         d2v;
    logic [Q-1:0] d2;
    logic [M-1:0] z;
  } stage_t;

  ipkt_t        pkt;
  logic [CHW-1:0] ch;
  stage_t       st [LAT];
  stage_t       entry, to_last;
  logic         p1, p2;        // packets of the last stage still to send
  logic         advance, io_ok, accept;
  logic [M-1:0] z;
  logic signed [2*M-1:0] prod;

  assign pkt = ipkt_t'(in_data);
  assign ch  = CHW'(pkt.x);

  // operation unit
  always_comb begin
    prod = $signed(pkt.x) * $signed(pkt.y);
    unique case (KIND)
      FU_ADD: unique case (pkt.instr.spec)
        SP_ADD:  z = pkt.x + pkt.y;
        SP_SUB:  z = pkt.x - pkt.y;
        SP_IDX:  z = pkt.x;
        default: z = pkt.y;
      endcase
      FU_MUL:  z = (pkt.instr.spec == SP_FMUL) ? prod[2*M-2 -: M] : prod[M-1:0];
      FU_IN:   z = ich_data[ch];
      default: z = pkt.y;
    endcase
  end

  assign advance = !(p1 || p2) ||
                   ((!p1 || r_ready[0]) && (!p2 || r_ready[1]));
  assign io_ok   = (KIND == FU_IN)  ? ich_valid[ch] :
                   (KIND == FU_OUT) ? och_ready[ch] : 1'b1;
  assign in_ready = advance && io_ok;
  assign accept   = in_valid && in_ready;

  always_comb begin
    ich_ready = '0;
    och_valid = '0;
    if (KIND == FU_IN)  ich_ready[ch] = in_valid && advance;
    if (KIND == FU_OUT) och_valid[ch] = in_valid && advance;
  end
  assign och_data = pkt.y;

  assign entry = '{v: accept, d1v: pkt.instr.d1v, d1: pkt.instr.d1,
                  d2v: pkt.instr.d2v, d2: pkt.instr.d2, z: z};

  // what enters the last stage when the pipeline advances
  if (LAT == 1) begin : g_lat1
    assign to_last = entry;
  end else begin : g_latn
    assign to_last = st[LAT-2];
  end

  assign r_valid    = {p2, p1};
  assign r_addr[0]  = st[LAT-1].d1;
  assign r_addr[1]  = st[LAT-1].d2;
  assign r_value[0] = st[LAT-1].z;
  assign r_value[1] = st[LAT-1].z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) st[s] <= '0;
      p1 <= 1'b0;
      p2 <= 1'b0;
    end else begin
      if (p1 && r_ready[0]) p1 <= 1'b0;
      if (p2 && r_ready[1]) p2 <= 1'b0;
      if (advance) begin
        st[0] <= entry;
        for (int s = 1; s < LAT; s++) st[s] <= st[s-1];
        p1 <= to_last.v && to_last.d1v;
        p2 <= to_last.v && to_last.d2v;
      end
    end
  end

endmodule
