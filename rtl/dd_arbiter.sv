// dd_arbiter: the distributed arbiter of one bus node.
//
// Made of the Priority Code Manager (PCUA level and LCC code), the arbitration
// bus transceiver and the Arbitration Result Analyzer, as in the paper's bus
// interface diagram. Identical copies sit in every node; they see the same
// arbitration lines and the same Arbitration_en, so they all agree on the
// winner without any central controller.
//
// Timing (bus clock): in the cycle where arb_en is high the node drives its
// code (drv_o) during the high half of the clock, the receiver samples the
// resolved lines at the falling edge, and at the next rising edge the result
// analyzer registers win_o and the level advances. win_o is therefore high
// for exactly the one cycle that follows a won arbitration.
module dd_arbiter #(
  parameter int unsigned NODES   = 4,
  parameter int unsigned NODE_ID = 0,
  parameter bit          LZF     = 1'b1,
  localparam int unsigned CODE_W = NODES - 1,
  localparam int unsigned LVL_W  = $clog2(NODES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arb_en_i,
  input  logic              active_i,
  output logic [CODE_W-1:0] drv_o,
  input  logic [CODE_W-1:0] bus_i,
  output logic              win_o,
  output logic [LVL_W-1:0]  level_o,
  output logic [LVL_W-1:0]  bus_level_o
);

  logic [CODE_W-1:0] code, bus_q;

  priority_code_manager #(.NODES(NODES), .NODE_ID(NODE_ID), .LZF(LZF)) u_pcm (
    .clk, .rst_n,
    .arb_en        (arb_en_i),
    .active_i      (active_i),
    .level_o       (level_o),
    .code_o        (code)
  );

  arb_transceiver #(.CODE_W(CODE_W)) u_trx (
    .clk, .rst_n,
    .en_i    (arb_en_i),
    .din_i   (code),
    .drv_o   (drv_o),
    .bus_i   (bus_i),
    .bus_q_o (bus_q)
  );

  arb_result_analyzer #(.CODE_W(CODE_W)) u_ara (
    .clk, .rst_n,
    .arb_en_i      (arb_en_i),
    .bus_q_i       (bus_q),
    .sent_code_i   (code),
    .sent_active_i (active_i),
    .win_o         (win_o),
    .bus_level_o   (bus_level_o)
  );

endmodule
