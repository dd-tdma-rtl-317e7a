// dd_tdma_bus: one vertical DD-TDMA bus of a 3D bus-NoC hybrid network.
//
// NODES bus interfaces, one per layer, share two sets of wires (TSVs):
//  * the arbitration bus, NODES-1 wire-AND lines carrying LCC priority codes;
//  * the data bus, driven by the current winner, plus a wired-OR hold line.
// There is no central arbiter: each interface runs an identical distributed
// arbiter that updates its priority code by PCUA, so all nodes agree on a
// unique winner, the bus is never left idle while a node has a packet, and no
// node waits more than NODES packet slots. Arbitration is packet-wise: the
// winner sends a whole packet, and its tail flit starts the next arbitration.
//
// Timing (clk_bus): the next arbitration runs in the cycle that carries the
// current packet's tail flit, and the winner's head flit follows in the next
// cycle, so back-to-back packets of L flits occupy the bus for exactly L
// cycles each when nothing stalls. An idle bus arbitrates every cycle; a
// packet arriving at an idle bus starts one to two cycles after its node
// becomes active. Each router side runs on its own
// clk_rtr[n]. With LINE_MODEL = 1 (simulation only) the arbitration lines
// are the behavioural precharge/evaluate model instead of a logic AND; its
// discharge must then finish within the high half of clk_bus. The
// architecture follows the paper; port protocol
// (valid/ready), flit format, FIFO depth and hold line are this design's.
module dd_tdma_bus
  import dd_tdma_pkg::*;
#(
  parameter int unsigned NODES      = 4,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter bit          LZF        = 1'b1,
  // 1: resolve the arbitration lines with the behavioural dynamic CMOS line
  //    model (simulation only) instead of the logic wire-AND
  parameter bit          LINE_MODEL = 1'b0,
  localparam int unsigned CODE_W    = NODES - 1
) (
  input  logic              clk_bus,
  input  logic [NODES-1:0]  clk_rtr,
  input  logic              rst_n,
  input  logic [NODES-1:0]  tx_valid,
  output logic [NODES-1:0]  tx_ready,
  input  flit_t [NODES-1:0] tx_flit,
  output logic [NODES-1:0]  rx_valid,
  input  logic [NODES-1:0]  rx_ready,
  output flit_t [NODES-1:0] rx_flit,
  output logic [NODES-1:0]  grant
);

  logic  [NODES-1:0][CODE_W-1:0] arb_drv;
  logic  [CODE_W-1:0]            arb_lines;
  logic  [NODES-1:0]             drive_en, valid, hold;
  flit_t [NODES-1:0]             flit;
  logic                          bus_valid, bus_hold, bus_fire;
  flit_t                         bus_flit;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    bus_interface #(
      .NODES(NODES), .NODE_ID(n), .FIFO_DEPTH(FIFO_DEPTH), .LZF(LZF)
    ) u_bi (
      .clk_bus,
      .clk_rtr     (clk_rtr[n]),
      .rst_n,
      .tx_valid_i  (tx_valid[n]),
      .tx_ready_o  (tx_ready[n]),
      .tx_flit_i   (tx_flit[n]),
      .rx_valid_o  (rx_valid[n]),
      .rx_ready_i  (rx_ready[n]),
      .rx_flit_o   (rx_flit[n]),
      .arb_drv_o   (arb_drv[n]),
      .arb_bus_i   (arb_lines),
      .drive_en_o  (drive_en[n]),
      .valid_o     (valid[n]),
      .flit_o      (flit[n]),
      .hold_o      (hold[n]),
      .bus_valid_i (bus_valid),
      .bus_flit_i  (bus_flit),
      .bus_fire_i  (bus_fire),
      .active_o    (),
      .win_o       (),
      .arb_en_o    (),
      .level_o     ()
    );
  end

  if (LINE_MODEL) begin : g_line_model
    // each line: precharged while clk_bus is low, discharged while it is high
    // by every node that drives a 0 on it
    for (genvar b = 0; b < CODE_W; b++) begin : g_line
      logic [NODES-1:0] pull_dn;
      for (genvar n = 0; n < NODES; n++) begin : g_pd
        assign pull_dn[n] = !arb_drv[n][b];
      end
      dyn_wand_line #(.NODES(NODES), .T_PRE_1(2), .T_EVAL_1(2)) u_line (
        .clk       (clk_bus),
        .pull_dn_i (pull_dn),
        .line_o    (arb_lines[b]),
        .rd_q_o    ()
      );
    end
  end else begin : g_logic_lines
    wand_bus #(.NODES(NODES), .CODE_W(CODE_W)) u_arb_bus (
      .drv_i  (arb_drv),
      .line_o (arb_lines)
    );
  end

  data_bus #(.NODES(NODES)) u_data_bus (
    .drive_en_i (drive_en),
    .valid_i    (valid),
    .flit_i     (flit),
    .hold_i     (hold),
    .valid_o    (bus_valid),
    .flit_o     (bus_flit),
    .hold_o     (bus_hold),
    .fire_o     (bus_fire)
  );

  assign grant = drive_en;

  // the distributed arbiters must never grant the data bus to two nodes
  a_one_driver: assert property (@(posedge clk_bus) disable iff (!rst_n) $onehot0(drive_en))
    else $error("dd_tdma_bus: more than one data bus driver");
  // a receiver only holds the bus while a flit is on it
  a_hold_needs_valid: assert property (@(posedge clk_bus) disable iff (!rst_n) bus_hold |-> bus_valid)
    else $error("dd_tdma_bus: hold without a flit on the bus");

endmodule
