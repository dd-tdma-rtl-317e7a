// tb_starvation: starvation workload on an eight-node bus under full load.
// Every router keeps its tx FIFO supplied with packets of 2..8 flits to
// random other nodes, so every node is active at every arbitration. After
// TOTAL packets have crossed the bus the packets sent per node are counted:
// with PCUA every node must get the bus once every eight packet slots, so the
// counts may differ by at most one, and no node may wait more than eight
// slots. The relative standard deviation of the counts is printed, and the
// arbitration bus is checked to have N-1 = 7 lines.
module tb_starvation;
  import dd_tdma_pkg::*;
  localparam int N = 8, TOTAL = 500000;
  int checks = 0, failures = 0;
  logic clk_bus = 0, rst_n = 0;
  logic [N-1:0] clk_rtr = '0;
  logic [N-1:0] tx_valid, tx_ready, rx_valid, grant;
  logic [N-1:0] rx_ready = '1;
  flit_t [N-1:0] tx_flit, rx_flit;

  always #5 clk_bus = ~clk_bus;
  for (genvar n = 0; n < N; n++) begin : g_clk
    always #2 clk_rtr[n] = ~clk_rtr[n];
  end

  dd_tdma_bus #(.NODES(N)) dut (.clk_bus, .clk_rtr, .rst_n, .tx_valid, .tx_ready, .tx_flit,
                                .rx_valid, .rx_ready, .rx_flit, .grant);

  int sent [N];
  int waitc [N];
  int total = 0, last = -1, slots_full = 0;

  for (genvar n = 0; n < N; n++) begin : g_src
    initial begin
      tx_valid[n] = 0; tx_flit[n] = '0;
      wait (rst_n);
      forever begin
        int len, dst, k;
        len = $urandom_range(2, 8);
        dst = $urandom_range(0, N - 2); if (dst >= n) dst++;
        k = 0;
        while (k < len) begin
          @(negedge clk_rtr[n]);
          tx_valid[n] = 1;
          tx_flit[n].ftype = (k == 0) ? FLIT_HEAD : (k == len - 1) ? FLIT_TAIL : FLIT_BODY;
          tx_flit[n].payload = (k == 0) ? {24'(k), 8'(dst)} : $urandom;
          @(posedge clk_rtr[n]);
          if (tx_ready[n]) k++;
        end
      end
    end
  end

  always @(posedge clk_bus) if (rst_n && total < TOTAL) begin
    if (dut.bus_fire && is_tail(dut.bus_flit)) begin
      int o;
      o = $clog2(grant);
      sent[o]++;
      total++;
      for (int i = 0; i < N; i++) begin
        if (i == o) waitc[i] = 0; else waitc[i]++;
        checks++; if (waitc[i] >= N) begin failures++; $display("node %0d waited %0d slots", i, waitc[i]); end
      end
    end
  end

  initial begin
    real mean, var_s, rsd;
    int mn, mx;
    for (int i = 0; i < N; i++) begin sent[i] = 0; waitc[i] = 0; end
    #23 rst_n = 1;
    // TSV count of the arbitration bus (k-1 lines for k nodes)
    checks++; if ($bits(dut.arb_lines) != N - 1) begin failures++; $display("arbitration lines %0d, expected %0d", $bits(dut.arb_lines), N - 1); end
    $display("arbitration lines for %0d nodes: %0d", N, $bits(dut.arb_lines));
    wait (total == TOTAL);
    mean = real'(TOTAL) / N; var_s = 0.0; mn = TOTAL; mx = 0;
    for (int i = 0; i < N; i++) begin
      var_s += (sent[i] - mean) * (sent[i] - mean);
      if (sent[i] < mn) mn = sent[i];
      if (sent[i] > mx) mx = sent[i];
      $display("node %0d sent %0d packets", i + 1, sent[i]);
    end
    rsd = 100.0 * $sqrt(var_s / N) / mean;
    $display("RSD = %0.3f %%", rsd);
    checks++; if (mx - mn > 1) begin failures++; $display("unequal service: %0d..%0d", mn, mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk_bus);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
