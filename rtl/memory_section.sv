// memory_section: the Memory of the processor, N_CELLS Memory Cells holding
// 3*N_CELLS Register Units. Register r belongs to cell r/3; r%3 = 0 is the
// cell's instruction register, 1 and 2 its operand registers (the numbering of
// the document's example, where cell c owns consecutive addresses). Each
// register has its own command link and result link; each cell has its own
// instruction-packet link (A[3]) and D link. No logic is shared between
// cells: the section is pure replication, as in the document.
module memory_section
  import dfp_pkg::*;
#(
  parameter int NC   = N_CELLS,
  parameter int REQW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3*NC-1:0] cmd_valid,
  input  reg_cmd_e      cmd [3*NC],
  output logic [3*NC-1:0] cmd_ack,
  input  logic [3*NC-1:0] din_valid,
  input  logic [3*NC-1:0] din_bit,
  input  logic [3*NC-1:0] din_last,
  output logic [3*NC-1:0] din_ready,
  output logic [NC-1:0] pkt_valid,
  input  logic [NC-1:0] pkt_ready,
  output logic [2:0]    pkt_data [NC],
  output logic [NC-1:0] pkt_last,
  input  logic [NC-1:0] run_valid,
  input  logic [NC-1:0] run_final,
  output logic [NC-1:0] run_ready,
  output logic [NC-1:0] done,
  input  logic [NC-1:0] done_ack
);

  for (genvar c = 0; c < NC; c++) begin : g_cell
    reg_cmd_e cell_cmd [3];
    for (genvar i = 0; i < 3; i++) begin : g_c
      assign cell_cmd[i] = cmd[3*c+i];
    end
    memory_cell #(.REQW(REQW)) u_cell (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[3*c +: 3]), .cmd(cell_cmd), .cmd_ack(cmd_ack[3*c +: 3]),
      .din_valid(din_valid[3*c +: 3]), .din_bit(din_bit[3*c +: 3]),
      .din_last(din_last[3*c +: 3]), .din_ready(din_ready[3*c +: 3]),
      .pkt_valid(pkt_valid[c]), .pkt_ready(pkt_ready[c]), .pkt_data(pkt_data[c]),
      .pkt_last(pkt_last[c]),
      .run_valid(run_valid[c]), .run_final(run_final[c]), .run_ready(run_ready[c]),
      .done(done[c]), .done_ack(done_ack[c])
    );
  end

endmodule
