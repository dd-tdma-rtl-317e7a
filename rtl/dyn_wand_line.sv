// dyn_wand_line: BEHAVIOURAL MODEL (not synthesizable) of one dynamic CMOS
// wire-AND arbitration line with its NODES drivers, receivers and bus holder.
//
// Three phases per clock period, as in the paper's transceiver:
//  1. precharge (clk = 0): every node's PMOS charges the line capacitance;
//     with NODES chargers the line reaches 1 after T_PRE_1/NODES time units;
//  2. evaluate (clk = 1): a node whose enabled data bit is 0 turns its NMOS on
//     and discharges the line; with m such nodes the line falls after
//     T_EVAL_1/m time units; with none the bus holder keeps it at 1;
//  3. read: each receiver flip-flop samples the line when clk falls, before the
//     next precharge can overwrite it.
// pull_dn_i[n] = 1 means node n drives a 0 in this evaluation (its transceiver
// is enabled and its code bit is 0). The delay constants are not given in the
// paper and are placeholders of this model; only their scaling with the node
// count follows its description. Outputs: line_o (analog state, as logic)
// and rd_q_o (the value every receiver registered at the last falling edge).
module dyn_wand_line #(
  parameter int unsigned NODES    = 4,
  parameter int unsigned T_PRE_1  = 8,  // precharge time with one charger
  parameter int unsigned T_EVAL_1 = 8   // discharge time with one pull-down
) (
  input  logic             clk,
  input  logic [NODES-1:0] pull_dn_i,
  output logic             line_o,
  output logic             rd_q_o
);

  logic line = 1'b1;          // held by the bus holder between events
  int unsigned n_pd;

  always_comb n_pd = $countones(pull_dn_i);

  // receivers: sample at the end of evaluation
  always @(negedge clk) rd_q_o <= line;

  localparam int unsigned T_PRE = (T_PRE_1 / NODES > 0) ? T_PRE_1 / NODES : 1;

  // One process owns the line: evaluation while clk is high, then precharge.
  always begin
    @(posedge clk);
    while (clk) begin
      if (n_pd != 0) begin
        #((T_EVAL_1 / n_pd > 0) ? T_EVAL_1 / n_pd : 1);
        if (clk && n_pd != 0) line = 1'b0;
      end
      if (clk) @(clk or pull_dn_i);
    end
    #(T_PRE);
    if (!clk) line = 1'b1;
  end

  assign line_o = line;

  initial rd_q_o = 1'b1;

endmodule
