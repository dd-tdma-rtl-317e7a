// arb_result_analyzer: decides whether this node won the arbitration.
//
// After an arbitration every node reads the arbitration bus back. The node
// whose sent code equals the code left on the bus is the winner; all others
// lost. Because an inactive node sends the lowest code (all ones), which is
// also what an idle bus reads, a node wins only if it was active as well.
// The compare rule is the paper's; the active qualification, the result
// register and the level output are this design's.
//
// Timing: during the arbitration cycle (arb_en_i high) the transceiver
// registers the lines on the falling clock edge (bus_q_i); at the rising edge
// that ends the cycle this module registers win_o, which is then valid for
// the whole following cycle (the first cycle of the new packet slot).
// bus_level_o is the winning priority level (number of zeros on the lines)
// registered at the same edge.
module arb_result_analyzer #(
  parameter int unsigned CODE_W = 3,
  localparam int unsigned LVL_W = $clog2(CODE_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arb_en_i,
  input  logic [CODE_W-1:0] bus_q_i,
  input  logic [CODE_W-1:0] sent_code_i,
  input  logic              sent_active_i,
  output logic              win_o,
  output logic [LVL_W-1:0]  bus_level_o
);

  logic [LVL_W-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int j = 0; j < CODE_W; j++) zeros += LVL_W'(!bus_q_i[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_o       <= 1'b0;
      bus_level_o <= '0;
    end else begin
      win_o <= arb_en_i && sent_active_i && (bus_q_i == sent_code_i);
      if (arb_en_i) bus_level_o <= zeros;
    end
  end

endmodule
