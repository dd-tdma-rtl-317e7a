// wand_bus: the shared arbitration lines of a k-node bus (k-1 TSV lines).
//
// Each line is precharged high and any node that drives a 0 pulls it low,
// so every line carries the AND of all nodes' bits. With LCC codes this
// AND equals the code with the most zeros, i.e. the highest priority among
// those sent (priority covering). Purely combinational; the line count
// CODE_W = NODES-1 is the paper's.
module wand_bus #(
  parameter int unsigned NODES  = 4,
  parameter int unsigned CODE_W = NODES - 1
) (
  input  logic [NODES-1:0][CODE_W-1:0] drv_i,
  output logic [CODE_W-1:0]            line_o
);

  always_comb begin
    line_o = '1;
    for (int n = 0; n < NODES; n++) line_o &= drv_i[n];
  end

endmodule
