// tb_injection_sweep: uniform random traffic on one four-node bus at a range
// of offered loads, packets of 2..8 flits to uniformly chosen other nodes.
// Router and bus share one clock period here, so loads are in flits per bus
// cycle per node. For each load the test measures delivered throughput and
// the average packet latency (creation at the source router to tail flit
// taken by the destination router) and prints them. Checks: every packet
// arrives whole and unchanged, in order per source/destination pair; below
// saturation the bus delivers what is offered; at saturation the bus carries
// at least 0.9 flit per cycle (arbitration overlaps the tail flit, so
// back-to-back packets lose no cycle) and never more than one; latency grows
// with load.
module tb_injection_sweep;
  import dd_tdma_pkg::*;
  localparam int N = 4, WINDOW = 20000, NRATE = 7;
  localparam real RATES [NRATE] = '{0.02, 0.05, 0.10, 0.15, 0.20, 0.30, 0.50};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] tx_valid, tx_ready, rx_valid, rx_ready, grant;
  flit_t [N-1:0] tx_flit, rx_flit;

  always #5 clk = ~clk;

  dd_tdma_bus dut (.clk_bus(clk), .clk_rtr({N{clk}}), .rst_n, .tx_valid, .tx_ready, .tx_flit,
                   .rx_valid, .rx_ready, .rx_flit, .grant);

  flit_t srcq [N][$];          // flits created, not yet accepted by the tx FIFO
  flit_t expq [N][N][$];       // [src][dst] flits expected at dst
  longint born [N][N][$];      // creation cycle per packet, [src][dst]
  longint cyc = 0;
  real rate = 0.0;
  logic generating = 0;
  longint lat_sum = 0, lat_n = 0, flits_rx = 0;
  int cur_src [N];
  int seq = 0;

  always @(posedge clk) cyc++;

  // packet creation and tx injection
  for (genvar n = 0; n < N; n++) begin : g_src
    initial begin
      tx_valid[n] = 0; tx_flit[n] = '0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        if (generating && $urandom_range(0, 99999) < int'(rate / 5.0 * 100000.0)) begin
          int len, dst;
          flit_t f;
          len = $urandom_range(2, 8);
          dst = $urandom_range(0, N - 2); if (dst >= n) dst++;
          born[n][dst].push_back(cyc);
          for (int k = 0; k < len; k++) begin
            f.ftype = (k == 0) ? FLIT_HEAD : (k == len - 1) ? FLIT_TAIL : FLIT_BODY;
            f.payload = (k == 0) ? {16'(seq), 8'(n), 8'(dst)} : $urandom;
            srcq[n].push_back(f);
            expq[n][dst].push_back(f);
          end
          seq++;
        end
        tx_valid[n] = (srcq[n].size() != 0);
        if (tx_valid[n]) tx_flit[n] = srcq[n][0];
        @(posedge clk);
        if (tx_valid[n] && tx_ready[n]) void'(srcq[n].pop_front());
      end
    end
  end

  // destination routers always accept
  assign rx_ready = '1;
  for (genvar n = 0; n < N; n++) begin : g_dst
    always @(posedge clk) if (rst_n && rx_valid[n]) begin
      flit_t f, e;
      int s;
      f = rx_flit[n];
      if (is_head(f)) cur_src[n] = int'(f.payload[15:8]);
      s = cur_src[n];
      checks++;
      if (expq[s][n].size() == 0) begin failures++; $display("node %0d: unexpected flit", n); end
      else begin
        e = expq[s][n].pop_front();
        if (e !== f) begin failures++; $display("node %0d: flit %h exp %h", n, f, e); end
      end
      flits_rx++;
      if (is_tail(f)) begin
        lat_sum += cyc - born[s][n].pop_front();
        lat_n++;
      end
    end
  end

  function automatic int pending();
    int t = 0;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) t += expq[a][b].size();
    return t;
  endfunction

  initial begin
    real thr [NRATE], lat [NRATE];
    #23 rst_n = 1;
    repeat (5) @(posedge clk);
    for (int r = 0; r < NRATE; r++) begin
      rate = RATES[r];
      lat_sum = 0; lat_n = 0; flits_rx = 0;
      generating = 1;
      repeat (WINDOW) @(posedge clk);
      generating = 0;
      thr[r] = real'(flits_rx) / WINDOW / N;
      lat[r] = (lat_n > 0) ? real'(lat_sum) / lat_n : 0.0;
      // drain before the next load
      while (pending() != 0) @(posedge clk);
      repeat (20) @(posedge clk);
      $display("offered %0.2f flits/cycle/node: delivered %0.3f flits/cycle/node, average latency %0.1f cycles",
               RATES[r], thr[r], lat[r]);
      checks++; if (thr[r] * N > 1.0) begin failures++; $display("more than one flit per cycle"); end
      if (RATES[r] * N < 0.5) begin
        checks++; if (thr[r] < 0.8 * RATES[r]) begin failures++; $display("below saturation but not delivered"); end
      end
    end
    checks++; if (thr[NRATE-1] * N < 0.9) begin failures++; $display("saturated bus carries only %0.3f flits/cycle", thr[NRATE-1] * N); end
    checks++; if (!(lat[NRATE-1] > lat[0])) begin failures++; $display("latency did not grow with load"); end
    checks++; if (pending() != 0) begin failures++; $display("flits lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
