// tb_arb_transceiver: the driver releases every line when disabled and puts
// the code on the lines when enabled; the receiver captures the bus only at a
// falling clock edge of an enabled cycle.
module tb_arb_transceiver;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] din, drv, bus, bus_q, exp_q;

  always #5 clk = ~clk;

  arb_transceiver #(.CODE_W(3)) dut (.clk, .rst_n, .en_i(en), .din_i(din), .drv_o(drv), .bus_i(bus), .bus_q_o(bus_q));

  initial begin
    din = 0; bus = 0;
    #12 rst_n = 1;
    checks++; if (bus_q !== 3'b111) begin failures++; $display("reset value %b", bus_q); end
    exp_q = 3'b111;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk); #1;
      en = $urandom_range(0, 1); din = 3'($urandom); bus = 3'($urandom);
      #1;
      checks++; if (drv !== (en ? din : 3'b111)) begin failures++; $display("drv %b en %0d din %b", drv, en, din); end
      // nothing changes on the rising half
      checks++; if (bus_q !== exp_q) begin failures++; $display("early capture"); end
      if (en) exp_q = bus;
      @(negedge clk); #1;
      checks++; if (bus_q !== exp_q) begin failures++; $display("t%0d bus_q %b exp %b", t, bus_q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
