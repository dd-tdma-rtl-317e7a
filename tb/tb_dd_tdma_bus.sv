// tb_dd_tdma_bus: end-to-end test of the DD-TDMA bus at its default size
// (four nodes, default FIFO depth, no parameter overrides).
//
// Each node's router side runs on its own clock (periods 8, 10, 12, 14 vs a
// 10-unit bus clock) and injects NPKT packets of 2..8 flits to random other
// nodes, with random gaps; each receiver accepts flits with random
// back-pressure. Checked:
//  * every flit a router injects appears on the data bus once, in order, and
//    reaches exactly the destination router, in bus order;
//  * packets are never interleaved on the bus;
//  * each arbitration has exactly one winner when some node is active and
//    none otherwise, and it is the active node a PCUA reference model picks;
//  * no node waits more than NODES packet slots;
//  * with no stall, a packet of L flits occupies the bus exactly L cycles,
//    and when a node was waiting at the tail-cycle arbitration its head
//    flit follows the tail in the very next cycle.
// Mechanisms that must each occur at least once: arbitration with contention,
// an inactive node masked, an idle arbitration round, priority wrap-around,
// a hold by a full receiver, a sender gap inside a packet.
module tb_dd_tdma_bus;
  import dd_tdma_pkg::*;
  localparam int N = 4;
  localparam int NPKT = 60;
  int checks = 0, failures = 0;

  logic clk_bus = 0, rst_n = 0;
  logic [N-1:0] clk_rtr = '0;
  logic [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready, grant;
  flit_t [N-1:0] tx_flit, rx_flit;

  always #5 clk_bus = ~clk_bus;
  for (genvar n = 0; n < N; n++) begin : g_clk
    always #(4 + n) clk_rtr[n] = ~clk_rtr[n];
  end

  dd_tdma_bus dut (.clk_bus, .clk_rtr, .rst_n, .tx_valid, .tx_ready, .tx_flit,
                   .rx_valid, .rx_ready, .rx_flit, .grant);

  logic [N-1:0] act_v, arb_v;
  for (genvar n = 0; n < N; n++) begin : g_probe
    assign act_v[n] = dut.g_node[n].u_bi.active_o;
    assign arb_v[n] = dut.g_node[n].u_bi.arb_en_o;
  end

  flit_t src_q [N][$];   // injected, not yet on the bus
  flit_t dst_q [N][$];   // on the bus, not yet at the destination router
  int sent_pkts [N], rcvd_flits [N], injected_flits [N];
  int n_contention = 0, n_masked = 0, n_idle = 0, n_wrap = 0, n_hold = 0, n_gap = 0, n_timed = 0, n_b2b = 0;
  int last_tail_cyc = -10;
  int slots = 0;
  int waitc [N];
  logic senders_done = 0;

  function automatic flit_t mk_flit(int src, int dst, int seq, int k, int len);
    flit_t f;
    if (len == 1)          f.ftype = FLIT_HEAD_TAIL;
    else if (k == 0)       f.ftype = FLIT_HEAD;
    else if (k == len - 1) f.ftype = FLIT_TAIL;
    else                   f.ftype = FLIT_BODY;
    if (k == 0) f.payload = {16'(seq), 8'(src), 8'(dst)};
    else        f.payload = {8'(k), 8'(seq), 8'(src), 8'($urandom)};
    return f;
  endfunction

  // ---------------- senders ----------------
  int done_cnt = 0;
  for (genvar n = 0; n < N; n++) begin : g_src
    initial begin
      tx_valid[n] = 1'b0; tx_flit[n] = '0;
      wait (rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int len, dst, k;
        len = $urandom_range(2, 8);
        dst = $urandom_range(0, N - 2); if (dst >= n) dst++;
        // occasional long pause so the bus sees idle rounds and masked nodes
        if ($urandom_range(0, 9) == 0) repeat ($urandom_range(20, 60)) @(posedge clk_rtr[n]);
        k = 0;
        while (k < len) begin
          @(negedge clk_rtr[n]);
          tx_valid[n] = ($urandom_range(0, 5) != 0);
          tx_flit[n]  = mk_flit(n, dst, p, k, len);
          @(posedge clk_rtr[n]);
          if (tx_valid[n] && tx_ready[n]) begin
            src_q[n].push_back(tx_flit[n]);
            injected_flits[n]++;
            k++;
          end
        end
        @(negedge clk_rtr[n]); tx_valid[n] = 1'b0;
      end
      done_cnt++;
    end
  end

  // ---------------- receivers ----------------
  for (genvar n = 0; n < N; n++) begin : g_dst
    initial begin
      rx_ready[n] = 1'b0;
      wait (rst_n);
      forever begin
        @(negedge clk_rtr[n]);
        // long stalls now and then fill the rx FIFO so the filter must hold the bus
        if ($urandom_range(0, 99) == 0) begin
          rx_ready[n] = 1'b0;
          repeat ($urandom_range(20, 40)) @(negedge clk_rtr[n]);
        end
        rx_ready[n] = ($urandom_range(0, 3) != 0);
        @(posedge clk_rtr[n]);
        if (rx_ready[n] && rx_valid[n]) begin
          checks++;
          if (dst_q[n].size() == 0) begin failures++; $display("node %0d: unexpected flit", n); end
          else begin
            flit_t e;
            e = dst_q[n].pop_front();
            if (e !== rx_flit[n]) begin failures++; $display("node %0d: got %h exp %h", n, rx_flit[n], e); end
          end
          rcvd_flits[n]++;
        end
      end
    end
  end

  // ---------------- bus monitor and arbitration reference ----------------
  int cur_dst = -1, cur_owner = -1, cur_len = 0, arb_time = 0, pkt_stalled = 0;
  int cyc = 0;
  logic check_next = 0;
  logic [N-1:0] act_at_arb;

  function automatic logic [N-1:0] ref_win(logic [N-1:0] act, int r);
    int best, who;
    best = -1; who = -1;
    for (int i = 0; i < N; i++) if (act[i] && (i + r) % N > best) begin best = (i + r) % N; who = i; end
    return (who < 0) ? '0 : N'(1) << who;
  endfunction

  always @(posedge clk_bus) if (rst_n) begin
    cyc++;
    checks++; if (!$onehot0(grant)) begin failures++; $display("two drivers"); end
    // result of the arbitration in the previous cycle
    if (check_next) begin
      logic [N-1:0] exp_w;
      exp_w = ref_win(act_at_arb, slots);
      checks++; if (grant !== exp_w) begin failures++; $display("cyc %0d: act %b grant %b exp %b", cyc, act_at_arb, grant, exp_w); end
      if (act_at_arb == 0) n_idle++;
      if (act_at_arb != 0 && act_at_arb != '1) n_masked++;
      if ($countones(act_at_arb) >= 2) n_contention++;
      for (int i = 0; i < N; i++) begin
        if (act_at_arb[i] && !grant[i]) waitc[i]++; else waitc[i] = 0;
        checks++; if (waitc[i] >= N) begin failures++; $display("node %0d waited %0d slots", i, waitc[i]); end
      end
      slots++;
      if (slots % N == 0) n_wrap++;
      arb_time = cyc - 1; pkt_stalled = 0; cur_len = 0;
    end
    check_next = arb_v[0];
    if (arb_v[0]) begin
      act_at_arb = act_v;
      checks++; if (arb_v !== '1) begin failures++; $display("arbitration enables differ: %b", arb_v); end
    end
    if (dut.bus_valid && dut.bus_hold) begin n_hold++; pkt_stalled = 1; end
    if (grant != 0 && !dut.bus_valid) begin n_gap++; pkt_stalled = 1; end
    if (dut.bus_fire) begin
      flit_t f;
      int o;
      f = dut.bus_flit;
      o = $clog2(grant);
      cur_len++;
      checks++;
      if (cur_owner >= 0 && o != cur_owner) begin failures++; $display("packets interleaved"); end
      if (src_q[o].size() == 0) begin failures++; $display("flit from %0d never injected", o); end
      else begin
        flit_t e;
        e = src_q[o].pop_front();
        if (e !== f) begin failures++; $display("bus flit %h from %0d, exp %h", f, o, e); end
      end
      if (is_head(f)) begin
        cur_dst = int'(head_dest(f));
        // arbitration ran in the previous packet's tail cycle: no gap
        if (arb_time == last_tail_cyc && !pkt_stalled) begin
          n_b2b++;
          checks++;
          if (cyc != last_tail_cyc + 1) begin failures++; $display("gap between packets: tail %0d head %0d", last_tail_cyc, cyc); end
        end
      end
      dst_q[cur_dst].push_back(f);
      cur_owner = is_tail(f) ? -1 : o;
      if (is_tail(f)) begin
        last_tail_cyc = cyc;
        sent_pkts[o]++;
        if (!pkt_stalled) begin
          n_timed++;
          checks++;
          if (cyc - arb_time != cur_len) begin failures++; $display("packet of %0d flits took %0d cycles", cur_len, cyc - arb_time); end
        end
      end
    end
  end

  // ---------------- end ----------------
  initial begin
    for (int i = 0; i < N; i++) begin waitc[i] = 0; sent_pkts[i] = 0; rcvd_flits[i] = 0; injected_flits[i] = 0; end
    #33 rst_n = 1;
    wait (done_cnt == N);
    // drain
    repeat (2000) @(posedge clk_bus);
    for (int i = 0; i < N; i++) begin
      checks++; if (sent_pkts[i] != NPKT) begin failures++; $display("node %0d sent %0d packets", i, sent_pkts[i]); end
      checks++; if (src_q[i].size() != 0 || dst_q[i].size() != 0) begin failures++; $display("node %0d flits left", i); end
    end
    $display("mechanisms: contention=%0d masked=%0d idle=%0d wrap=%0d hold=%0d gap=%0d timed_packets=%0d back_to_back=%0d slots=%0d",
             n_contention, n_masked, n_idle, n_wrap, n_hold, n_gap, n_timed, n_b2b, slots);
    checks++; if (n_contention == 0) begin failures++; $display("no contention seen"); end
    checks++; if (n_masked == 0)     begin failures++; $display("no masked node seen"); end
    checks++; if (n_idle == 0)       begin failures++; $display("no idle round seen"); end
    checks++; if (n_wrap == 0)       begin failures++; $display("no wrap-around seen"); end
    checks++; if (n_hold == 0)       begin failures++; $display("no receiver hold seen"); end
    checks++; if (n_gap == 0)        begin failures++; $display("no sender gap seen"); end
    checks++; if (n_timed == 0)      begin failures++; $display("no unstalled packet timed"); end
    checks++; if (n_b2b == 0)        begin failures++; $display("no back-to-back packets seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_bus);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
