// bus_interface: bridge between one layer's router and the vertical DD-TDMA bus.
//
// Contents, as in the paper's bus interface diagram: a tx bi-sync FIFO
// (router -> bus), an rx bi-sync FIFO (bus -> router) fed through the flit
// filter, the distributed arbiter, the arbitrating synchronizer and the
// data-bus driver enabled by the arbitration result.
//
// Operation (bus clock): the node is active while its tx FIFO holds a flit
// (the oldest flit is always a head, since whole packets leave in order);
// in the cycle where it sends its own tail flit it is active only if another
// flit is queued behind that tail. On every Arbitration_en the arbiter sends
// its PCUA code; if the node wins, it owns the data bus from the next cycle
// until its tail flit has been transferred, sending one flit per cycle
// whenever its tx FIFO has one and no receiver holds the bus. The transferred
// tail flit is the End of Packet on which every node's synchronizer runs the
// next arbitration, in that same cycle. Owning the
// bus for a whole packet follows the paper; the valid/ready router ports, the
// hold line and the FIFO depth are this design's choices.
module bus_interface
  import dd_tdma_pkg::*;
#(
  parameter int unsigned NODES      = 4,
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter bit          LZF        = 1'b1,
  localparam int unsigned CODE_W    = NODES - 1,
  localparam int unsigned LVL_W     = $clog2(NODES)
) (
  input  logic              clk_bus,
  input  logic              clk_rtr,
  input  logic              rst_n,
  // router side (clk_rtr)
  input  logic              tx_valid_i,
  output logic              tx_ready_o,
  input  flit_t             tx_flit_i,
  output logic              rx_valid_o,
  input  logic              rx_ready_i,
  output flit_t             rx_flit_o,
  // arbitration bus (clk_bus)
  output logic [CODE_W-1:0] arb_drv_o,
  input  logic [CODE_W-1:0] arb_bus_i,
  // data bus (clk_bus)
  output logic              drive_en_o,
  output logic              valid_o,
  output flit_t             flit_o,
  output logic              hold_o,
  input  logic              bus_valid_i,
  input  flit_t             bus_flit_i,
  input  logic              bus_fire_i,
  // status
  output logic              active_o,
  output logic              win_o,
  output logic              arb_en_o,
  output logic [LVL_W-1:0]  level_o
);

  // ---------------- tx path ----------------
  logic  tx_full, tx_empty;
  flit_t tx_head;
  logic [$clog2(FIFO_DEPTH):0] tx_count;

  bisync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(FLIT_W)) u_tx_fifo (
    .rst_n,
    .wclk    (clk_rtr),
    .wr_en_i (tx_valid_i),
    .wdata_i (tx_flit_i),
    .full_o  (tx_full),
    .rclk    (clk_bus),
    .rd_en_i (drive_en_o && bus_fire_i),
    .rdata_o    (tx_head),
    .empty_o    (tx_empty),
    .rd_count_o (tx_count)
  );
  assign tx_ready_o = !tx_full;

  // ---------------- arbitration ----------------
  logic eop, own_q;
  logic [LVL_W-1:0] bus_level;

  arb_synchronizer u_sync (
    .clk         (clk_bus),
    .rst_n,
    .bus_valid_i (bus_valid_i),
    .bus_fire_i  (bus_fire_i),
    .bus_tail_i  (is_tail(bus_flit_i)),
    .arb_en_o    (arb_en_o),
    .check_o     (),
    .busy_o      ()
  );

  dd_arbiter #(.NODES(NODES), .NODE_ID(NODE_ID), .LZF(LZF)) u_arb (
    .clk         (clk_bus),
    .rst_n,
    .arb_en_i    (arb_en_o),
    .active_i    (active_o),
    .drv_o       (arb_drv_o),
    .bus_i       (arb_bus_i),
    .win_o       (win_o),
    .level_o     (level_o),
    .bus_level_o (bus_level)
  );

  assign eop = bus_fire_i && is_tail(bus_flit_i);

  // the tail being sent now does not count: active only with a flit behind it
  assign active_o = (drive_en_o && eop) ? (tx_count >= 2) : !tx_empty;

  always_ff @(posedge clk_bus or negedge rst_n) begin
    if (!rst_n)             own_q <= 1'b0;
    else if (eop)           own_q <= 1'b0;
    else if (win_o)         own_q <= 1'b1;
  end

  assign drive_en_o = win_o || own_q;
  assign valid_o    = drive_en_o && !tx_empty;
  assign flit_o     = tx_head;

  // ---------------- rx path ----------------
  logic  rx_full, rx_wr, rx_empty;

  flit_filter #(.NODE_ID(NODE_ID)) u_filter (
    .clk         (clk_bus),
    .rst_n,
    .bus_valid_i (bus_valid_i),
    .bus_flit_i  (bus_flit_i),
    .bus_fire_i  (bus_fire_i),
    .rx_full_i   (rx_full),
    .hold_o      (hold_o),
    .rx_wr_o     (rx_wr)
  );

  bisync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(FLIT_W)) u_rx_fifo (
    .rst_n,
    .wclk    (clk_bus),
    .wr_en_i (rx_wr),
    .wdata_i (bus_flit_i),
    .full_o  (rx_full),
    .rclk    (clk_rtr),
    .rd_en_i (rx_ready_i),
    .rdata_o    (rx_flit_o),
    .empty_o    (rx_empty),
    .rd_count_o ()
  );
  assign rx_valid_o = !rx_empty;

  // A winner always has a head flit ready: it was active when it arbitrated.
  a_win_has_head: assert property (@(posedge clk_bus) disable iff (!rst_n)
                                   win_o |-> (!tx_empty && is_head(tx_head)))
    else $error("bus_interface %0d: won without a head flit", NODE_ID);
  // While this node owns the bus, arbitration runs only in its tail cycle.
  a_no_arb_while_owner: assert property (@(posedge clk_bus) disable iff (!rst_n)
                                         (own_q && arb_en_o) |-> eop)
    else $error("bus_interface %0d: arbitration during own packet", NODE_ID);

endmodule
