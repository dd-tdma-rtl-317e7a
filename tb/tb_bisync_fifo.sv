// tb_bisync_fifo: random writes on a 7 ns clock, random reads on a 5 ns clock
// checked against a scoreboard queue: no loss,
// no duplicates, order kept, full never exceeded (DEPTH entries in flight at
// most), empty and full both seen, and the reader's entry count never
// claims more than has been written.
module tb_bisync_fifo;
  localparam int D = 8, W = 34;
  int checks = 0, failures = 0;
  logic rst_n = 0, wclk = 0, rclk = 0;
  logic wr, rd, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] cnt;
  logic [W-1:0] sb [$];
  int wper = 7, rper = 5;
  int n_full = 0, n_empty = 0, n_rd = 0;

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  bisync_fifo #(.DEPTH(D), .WIDTH(W)) dut (.rst_n, .wclk, .wr_en_i(wr), .wdata_i(wdata), .full_o(full),
                                           .rclk, .rd_en_i(rd), .rdata_o(rdata), .empty_o(empty),
                                           .rd_count_o(cnt));

  // writer
  initial begin
    wr = 0; wdata = 0;
    #30 rst_n = 1;
    repeat (2000) begin
      @(negedge wclk);
      wr = ($urandom_range(0, 3) != 0);
      wdata = {$urandom, 2'($urandom)};
      @(posedge wclk);
      if (wr && !full) sb.push_back(wdata);
      if (full) n_full++;
      checks++; if (sb.size() > D) begin failures++; $display("overfilled"); end
    end
    wr = 0;
  end

  // reader
  initial begin
    rd = 0;
    #30;
    forever begin
      @(negedge rclk);
      rd = ($urandom_range(0, 2) == 0) || (n_rd > 700);
      @(posedge rclk);
      if (empty) n_empty++;
      // the reader's count never exceeds what was written and matches empty
      checks++;
      if (int'(cnt) > sb.size() || empty != (cnt == 0)) begin failures++; $display("count %0d, %0d stored", cnt, sb.size()); end
      if (rd && !empty) begin
        checks++;
        if (sb.size() == 0) begin failures++; $display("read from empty"); end
        else begin
          logic [W-1:0] e;
          e = sb.pop_front();
          if (e !== rdata) begin failures++; $display("data %h exp %h", rdata, e); end
        end
        n_rd++;
      end
    end
  end

  initial begin
    #30000;
    wait (sb.size() == 0);
    #200;
    checks++; if (!empty) begin failures++; $display("not empty at end"); end
    checks++; if (n_full == 0 || n_empty == 0) begin failures++; $display("full %0d empty %0d", n_full, n_empty); end
    checks++; if (n_rd < 500) begin failures++; $display("only %0d reads", n_rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
