// data_bus: the shared vertical data bus of one DD-TDMA bus.
//
// Only the arbitration winner drives it (a tri-state driver in the paper's
// diagram; here an AND-OR multiplexer of the enabled drivers). Every node
// sees the same flit. The hold line is a wired OR: a receiving node whose
// rx FIFO is full holds the bus, and a flit is transferred (fire_o) only in a
// cycle with a valid flit and no hold. The hold line is this design's own
// addition; the paper does not say how a full receiver is handled.
// Combinational. That at most one node drives at a time is asserted in
// dd_tdma_bus, where the bus clock and reset are available.
module data_bus
  import dd_tdma_pkg::*;
#(
  parameter int unsigned NODES = 4
) (
  input  logic [NODES-1:0]        drive_en_i,
  input  logic [NODES-1:0]        valid_i,
  input  flit_t [NODES-1:0]       flit_i,
  input  logic [NODES-1:0]        hold_i,
  output logic                    valid_o,
  output flit_t                   flit_o,
  output logic                    hold_o,
  output logic                    fire_o
);

  always_comb begin
    valid_o = 1'b0;
    flit_o  = '0;
    for (int n = 0; n < NODES; n++) begin
      if (drive_en_i[n]) begin
        valid_o = valid_o | valid_i[n];
        flit_o  = flit_o | flit_i[n];
      end
    end
  end

  assign hold_o = |hold_i;
  assign fire_o = valid_o && !hold_o;

endmodule
