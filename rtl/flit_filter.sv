// flit_filter: picks out of the shared data bus the packets for this node.
//
// All nodes see every flit on the data bus. A head flit names its destination
// node; the filter remembers whether the packet in flight is for this node
// until its tail flit, and raises rx_wr_o for the flits of such packets, which
// the bus interface writes into the rx bi-sync FIFO. If that FIFO is full it
// raises hold_o, which stops the sender on the shared hold line until there is
// room. The paper only names the flit filter; the destination field, the
// per-packet match and the hold line are this design's choices.
// Timing: hold_o and rx_wr_o are combinational from the bus and registers;
// the packet-match register updates on transferred head and tail flits.
module flit_filter
  import dd_tdma_pkg::*;
#(
  parameter int unsigned NODE_ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bus_valid_i,
  input  flit_t bus_flit_i,
  input  logic  bus_fire_i,
  input  logic  rx_full_i,
  output logic  hold_o,
  output logic  rx_wr_o
);

  logic for_me_q, for_me;

  assign for_me    = is_head(bus_flit_i) ? (head_dest(bus_flit_i) == DEST_W'(NODE_ID)) : for_me_q;
  assign hold_o    = bus_valid_i && for_me && rx_full_i;
  assign rx_wr_o   = bus_fire_i && for_me;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for_me_q <= 1'b0;
    else if (bus_fire_i) for_me_q <= for_me && !is_tail(bus_flit_i);
  end

endmodule
