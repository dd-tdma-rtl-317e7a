// tb_arb_result_analyzer: win is registered at the rising edge that ends an
// arbitration cycle and lasts one cycle; it requires arb_en, an active node
// and the bus reading back the code sent; the winning level is the number
// of zeros on the bus.
module tb_arb_result_analyzer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic arb, act, win, exp_win;
  logic [2:0] bus_q, sent;
  logic [1:0] lvl, exp_lvl;

  always #5 clk = ~clk;

  arb_result_analyzer #(.CODE_W(3)) dut (.clk, .rst_n, .arb_en_i(arb), .bus_q_i(bus_q), .sent_code_i(sent),
    .sent_active_i(act), .win_o(win), .bus_level_o(lvl));

  initial begin
    arb = 0; act = 0; bus_q = '1; sent = '1;
    #17 rst_n = 1;
    checks++; if (win !== 1'b0) begin failures++; $display("win after reset"); end
    exp_lvl = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      arb = $urandom_range(0, 1); act = $urandom_range(0, 1);
      bus_q = 3'($urandom);
      sent  = ($urandom_range(0, 1) != 0) ? bus_q : 3'($urandom);
      exp_win = arb && act && (bus_q == sent);
      if (arb) exp_lvl = 2'((bus_q[0] ? 0 : 1) + (bus_q[1] ? 0 : 1) + (bus_q[2] ? 0 : 1));
      #1;
      @(posedge clk); #1;
      checks++; if (win !== exp_win) begin failures++; $display("t%0d win %b exp %b", t, win, exp_win); end
      checks++; if (lvl !== exp_lvl) begin failures++; $display("t%0d level %0d exp %0d", t, lvl, exp_lvl); end
      // inputs change while the result must stay
      bus_q = ~bus_q;
      #2;
      checks++; if (win !== exp_win) begin failures++; $display("win not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
