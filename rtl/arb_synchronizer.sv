// arb_synchronizer: starts every arbitration of the distributed arbiters.
//
// All nodes run an identical copy fed only by shared data-bus signals, so
// their Arbitration_en pulses coincide. arb_en_o is raised
//  * in the first cycle after reset;
//  * in the cycle in which a tail flit (End of Packet) is transferred on the
//    data bus, so the next winner is known when the tail has gone and can send
//    its head flit in the very next cycle: no bus cycle is lost between
//    packets;
//  * in a slot's first cycle (check_o) that finds no flit on the data bus,
//    i.e. nobody won the last arbitration; while the bus is idle this repeats
//    every cycle.
// arb_en_o is combinational from the shared bus signals in the tail cycle;
// the codes it enables are evaluated in the high half of that cycle and read
// at the falling edge. Packet-wise arbitration on the tail flit follows the
// paper; arbitrating within the tail cycle and the idle repetition are this
// design's reading of "the bus will not be idle if only there are active
// nodes".
module arb_synchronizer (
  input  logic clk,
  input  logic rst_n,
  input  logic bus_valid_i,  // a flit is on the data bus
  input  logic bus_fire_i,   // ... and it is taken this cycle
  input  logic bus_tail_i,   // ... and it is a tail flit
  output logic arb_en_o,
  output logic check_o,      // first cycle of a packet slot
  output logic busy_o        // a packet owns the data bus
);

  typedef enum logic [1:0] {S_RESET, S_CHECK, S_XFER} state_e;
  state_e state_q, state_d;

  logic eop, idle;
  assign eop  = bus_fire_i && bus_tail_i;
  assign idle = (state_q == S_CHECK) && !bus_valid_i;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_RESET: state_d = S_CHECK;
      S_CHECK: state_d = (idle || eop) ? S_CHECK : S_XFER;
      S_XFER:  state_d = eop ? S_CHECK : S_XFER;
      default: state_d = S_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_RESET;
    else        state_q <= state_d;
  end

  assign arb_en_o = (state_q == S_RESET) || idle || eop;
  assign check_o  = (state_q == S_CHECK);
  assign busy_o   = (state_q == S_XFER) || (state_q == S_CHECK && bus_valid_i);

endmodule
