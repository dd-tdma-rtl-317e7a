// tb_flit_filter: a stream of packets to random destinations passes the
// filter of node 2; exactly the flits of packets for node 2 are written, and
// hold is raised only for such flits while the rx FIFO is full.
module tb_flit_filter;
  import dd_tdma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic valid, fire, full, hold, wr;
  flit_t flit;
  int n_hold = 0, n_wr = 0;

  always #5 clk = ~clk;

  flit_filter #(.NODE_ID(2)) dut (.clk, .rst_n, .bus_valid_i(valid), .bus_flit_i(flit), .bus_fire_i(fire),
    .rx_full_i(full), .hold_o(hold), .rx_wr_o(wr));

  initial begin
    valid = 0; fire = 0; full = 0; flit = '0;
    #17 rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int len, dst, k;
      len = $urandom_range(1, 8); dst = $urandom_range(0, 3); k = 0;
      while (k < len) begin
        @(negedge clk);
        valid = ($urandom_range(0, 4) != 0);
        full  = ($urandom_range(0, 3) == 0);
        if (len == 1)          flit.ftype = FLIT_HEAD_TAIL;
        else if (k == 0)       flit.ftype = FLIT_HEAD;
        else if (k == len - 1) flit.ftype = FLIT_TAIL;
        else                   flit.ftype = FLIT_BODY;
        flit.payload = (k == 0) ? {$urandom_range(0, 65535), 8'($urandom), 8'(dst)} : $urandom;
        #1;
        checks++;
        if (hold !== (valid && dst == 2 && full)) begin failures++; $display("hold wrong p%0d k%0d", p, k); end
        fire = valid && !hold;
        #1;
        checks++;
        if (wr !== (fire && dst == 2)) begin failures++; $display("wr wrong p%0d k%0d", p, k); end
        if (hold) n_hold++;
        if (wr) n_wr++;
        if (fire) k++;
        @(posedge clk); #1 fire = 0; valid = 0;
      end
    end
    checks++; if (n_hold == 0 || n_wr == 0) begin failures++; $display("no hold/no write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
