// tb_arb_synchronizer: arbitration in the first cycle after reset; then
// every slot's first cycle (check) re-arbitrates if the data bus is empty;
// an arbitration in exactly the cycle in which a tail flit is transferred,
// and never while a packet is still in flight.
module tb_arb_synchronizer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, fire = 0, tail = 0;
  logic arb_en, check, busy;

  always #5 clk = ~clk;

  arb_synchronizer dut (.clk, .rst_n, .bus_valid_i(valid), .bus_fire_i(fire), .bus_tail_i(tail),
                        .arb_en_o(arb_en), .check_o(check), .busy_o(busy));

  initial begin
    #17 rst_n = 1;
    @(negedge clk); #1;
    checks++; if (arb_en !== 1'b1 || check !== 1'b0) begin failures++; $display("no arbitration after reset"); end
    // idle: arbitration every cycle while the check cycle sees no flit
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); #1;
      checks++; if (arb_en !== 1'b1 || check !== 1'b1) begin failures++; $display("idle round %0d: arb %b check %b", r, arb_en, check); end
    end
    for (int p = 0; p < 100; p++) begin
      int len, sent;
      len = $urandom_range(1, 8); sent = 0;
      // head is on the bus in the check cycle
      while (sent < len) begin
        valid = (sent == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        fire  = valid && ($urandom_range(0, 3) != 0);
        tail  = (sent == len - 1);
        #1;
        checks++;
        if (arb_en !== (fire && tail)) begin failures++; $display("p%0d flit %0d: arb_en %b", p, sent, arb_en); end
        if (sent == 0 && busy !== 1'b1) begin failures++; $display("busy low with head on bus"); end
        if (fire) sent++;
        @(negedge clk);
        valid = 0; fire = 0; tail = 0;
      end
      // first cycle of the next slot
      #1;
      checks++; if (check !== 1'b1) begin failures++; $display("p%0d: no check cycle after tail", p); end
      // sometimes leave the bus idle for a cycle: must re-arbitrate
      if ($urandom_range(0, 3) == 0) begin
        checks++; if (arb_en !== 1'b1) begin failures++; $display("p%0d: idle check without arbitration", p); end
        @(negedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
