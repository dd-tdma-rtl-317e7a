// arb_transceiver: logic view of one node's dynamic CMOS wire-AND transceiver.
//
// In silicon each arbitration line is precharged high while clk is low; while
// clk is high a node's NMOS pulls the line low where its code bit is 0 (only
// when the transceiver is enabled), and the receiver flip-flop registers the
// line state when clk falls again. This module keeps that behaviour at the
// logic level: drv_o is the value the node leaves on each line (1 = released,
// 0 = pulled down) and the receiver samples the resolved bus on the falling
// clock edge, i.e. at the end of the evaluation half of the arbitration cycle.
// The wire-AND resolution itself is in wand_bus; the transistor-level
// behaviour is modelled in dyn_wand_line. The three steps (precharge,
// evaluate, falling-edge read) follow the paper; reset value of the receiver
// (all ones, the precharged state) is this design's choice.
module arb_transceiver #(
  parameter int unsigned CODE_W = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,     // Arbitration_en: drivers enabled this cycle
  input  logic [CODE_W-1:0] din_i,    // arbitration code to send
  output logic [CODE_W-1:0] drv_o,    // per line: 0 = pull down, 1 = release
  input  logic [CODE_W-1:0] bus_i,    // resolved wire-AND lines
  output logic [CODE_W-1:0] bus_q_o   // registered bus state
);

  assign drv_o = en_i ? din_i : '1;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)    bus_q_o <= '1;
    else if (en_i) bus_q_o <= bus_i;
  end

endmodule
