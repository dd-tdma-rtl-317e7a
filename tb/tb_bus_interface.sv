// tb_bus_interface: two bus interfaces (a two-node bus, one arbitration line)
// joined by wand_bus and data_bus. Each router side sends packets of 1..8
// flits to the other, on its own clock; each side must receive exactly the
// other side's flits, in order. Every arbitration must pick the winner a
// PCUA reference model predicts (node n holds level (n + rounds) mod 2),
// contention must occur, and a full receiver must stall the sender.
module tb_bus_interface;
  import dd_tdma_pkg::*;
  localparam int N = 2, NPKT = 80;
  int checks = 0, failures = 0;
  logic clk_bus = 0, rst_n = 0;
  logic [N-1:0] clk_rtr = '0;
  logic [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready, drive_en, valid, hold, win, arb_en, active;
  flit_t [N-1:0] tx_flit, rx_flit, flit;
  logic [N-1:0][0:0] drv, level;
  logic [0:0] lines;
  logic bus_valid, bus_hold, bus_fire;
  flit_t bus_flit;

  always #5 clk_bus = ~clk_bus;
  always #4 clk_rtr[0] = ~clk_rtr[0];
  always #7 clk_rtr[1] = ~clk_rtr[1];

  for (genvar n = 0; n < N; n++) begin : g
    bus_interface #(.NODES(N), .NODE_ID(n), .FIFO_DEPTH(4)) dut (
      .clk_bus, .clk_rtr(clk_rtr[n]), .rst_n,
      .tx_valid_i(tx_valid[n]), .tx_ready_o(tx_ready[n]), .tx_flit_i(tx_flit[n]),
      .rx_valid_o(rx_valid[n]), .rx_ready_i(rx_ready[n]), .rx_flit_o(rx_flit[n]),
      .arb_drv_o(drv[n]), .arb_bus_i(lines),
      .drive_en_o(drive_en[n]), .valid_o(valid[n]), .flit_o(flit[n]), .hold_o(hold[n]),
      .bus_valid_i(bus_valid), .bus_flit_i(bus_flit), .bus_fire_i(bus_fire),
      .active_o(active[n]), .win_o(win[n]), .arb_en_o(arb_en[n]), .level_o(level[n]));
  end
  wand_bus #(.NODES(N)) u_ab (.drv_i(drv), .line_o(lines));
  data_bus #(.NODES(N)) u_db (.drive_en_i(drive_en), .valid_i(valid), .flit_i(flit), .hold_i(hold),
                              .valid_o(bus_valid), .flit_o(bus_flit), .hold_o(bus_hold), .fire_o(bus_fire));

  flit_t q [N][$];      // flits on their way to node n
  int done_cnt = 0, n_hold = 0, n_both = 0, rounds = 0;

  for (genvar n = 0; n < N; n++) begin : g_tb
    initial begin
      tx_valid[n] = 0; tx_flit[n] = '0;
      wait (rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int len, k;
        len = $urandom_range(1, 8); k = 0;
        while (k < len) begin
          @(negedge clk_rtr[n]);
          tx_valid[n] = 1;
          tx_flit[n].ftype = (len == 1) ? FLIT_HEAD_TAIL : (k == 0) ? FLIT_HEAD : (k == len - 1) ? FLIT_TAIL : FLIT_BODY;
          tx_flit[n].payload = (k == 0) ? {16'(p), 8'(n), 8'(1 - n)} : $urandom;
          @(posedge clk_rtr[n]);
          if (tx_ready[n]) begin q[1 - n].push_back(tx_flit[n]); k++; end
        end
        @(negedge clk_rtr[n]); tx_valid[n] = 0;
      end
      done_cnt++;
    end
    initial begin
      rx_ready[n] = 0;
      wait (rst_n);
      forever begin
        @(negedge clk_rtr[n]);
        rx_ready[n] = ($urandom_range(0, 2) == 0);
        @(posedge clk_rtr[n]);
        if (rx_ready[n] && rx_valid[n]) begin
          flit_t e;
          checks++;
          if (q[n].size() == 0) begin failures++; $display("node %0d: unexpected flit", n); end
          else begin
            e = q[n].pop_front();
            if (e !== rx_flit[n]) begin failures++; $display("node %0d: got %h exp %h", n, rx_flit[n], e); end
          end
        end
      end
    end
  end

  logic [N-1:0] act_q;
  logic chk = 0;
  always @(posedge clk_bus) if (rst_n) begin
    if (bus_hold) n_hold++;
    if (chk) begin
      logic [N-1:0] exp_w;
      int top;
      top = (rounds % 2 == 0) ? 1 : 0;        // node holding level 1
      if (act_q[top])           exp_w = N'(1) << top;
      else if (act_q[1 - top])  exp_w = N'(1) << (1 - top);
      else                      exp_w = '0;
      checks++; if (win !== exp_w) begin failures++; $display("round %0d: act %b win %b exp %b", rounds, act_q, win, exp_w); end
      if (act_q == '1) n_both++;
      rounds++;
    end
    chk = arb_en[0];
    act_q = active;
    checks++; if (arb_en[0] != arb_en[1]) begin failures++; $display("synchronizers disagree"); end
  end

  initial begin
    #23 rst_n = 1;
    wait (done_cnt == N);
    repeat (1000) @(posedge clk_bus);
    for (int n = 0; n < N; n++) begin
      checks++; if (q[n].size() != 0) begin failures++; $display("node %0d: %0d flits lost", n, q[n].size()); end
    end
    checks++; if (n_both == 0 || n_hold == 0) begin failures++; $display("contention %0d hold %0d", n_both, n_hold); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk_bus);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
