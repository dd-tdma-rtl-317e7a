// priority_code_manager: per-node Priority Code Updating Algorithm (PCUA).
//
// Every node of a k-node bus holds a current priority level in 0..k-1; after
// reset node i holds level i, so all levels differ and exactly one node has
// the highest. Each arbitration (arb_en high for one bus cycle) the node puts
// its Arbitration Code on the bus: the LCC code of its level when it is active,
// otherwise the lowest-priority code (all ones). In the same cycle every
// node, active or not, raises its level by one, and the highest level wraps
// round to the lowest. All nodes therefore keep distinct levels forever and
// each reaches the highest one every k arbitrations, so no node waits more
// than k time slots. The algorithm, its initial spread of codes and the
// masking of inactive nodes follow the paper; the reset level NODE_ID and the
// order "send, then raise" (which gives the paper's slot-by-slot sequence with
// the initial codes used in the first slot) are this design's reading.
//
// Interface: code_o is combinational from the level and active_i and is
// driven onto the arbitration bus while arb_en is high; the level advances at
// the rising edge that ends that cycle, so code_o still shows the sent code
// when the result analyzer registers its decision at that edge.
module priority_code_manager #(
  parameter int unsigned NODES   = 4,
  parameter int unsigned NODE_ID = 0,
  parameter bit          LZF     = 1'b1,
  localparam int unsigned CODE_W = NODES - 1,
  localparam int unsigned LVL_W  = $clog2(NODES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              arb_en,
  input  logic              active_i,
  output logic [LVL_W-1:0]  level_o,
  output logic [CODE_W-1:0] code_o
);

  localparam logic [LVL_W-1:0] TOP_LVL = LVL_W'(NODES - 1);

  logic [LVL_W-1:0]  level_q;
  logic [CODE_W-1:0] cpc;

  lcc_encoder #(.CODE_W(CODE_W), .LZF(LZF)) u_enc (
    .level (level_q),
    .code  (cpc)
  );

  assign code_o  = active_i ? cpc : '1;  // inactive: masked to the lowest level
  assign level_o = level_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      level_q <= LVL_W'(NODE_ID);
    else if (arb_en) level_q <= (level_q == TOP_LVL) ? '0 : level_q + 1'b1;
  end

  initial begin
    assert (NODES >= 2) else $error("priority_code_manager: NODES must be >= 2");
    assert (NODE_ID < NODES) else $error("priority_code_manager: NODE_ID out of range");
  end

endmodule
