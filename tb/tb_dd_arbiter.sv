// tb_dd_arbiter: four distributed arbiters on one wire-AND arbitration bus.
// Part 1 replays the PCUA example (all four nodes active for four slots, then
// node 1 inactive): winners must be N4 N3 N2 N1 N4 N3 N2 N4. Part 2 uses
// random activity and checks against a reference model: exactly the active
// node with the highest level wins, nobody wins when nobody is active, and a
// node that stays active waits at most 4 slots. A second set of arbiters
// using the ones-first LCC format must pick the same winners throughout.
module tb_dd_arbiter;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, arb_en = 0;
  logic [N-1:0] active, win;
  logic [N-1:0][2:0] drv;
  logic [2:0] lines;
  logic [N-1:0][1:0] level, bus_level;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g
    dd_arbiter #(.NODES(N), .NODE_ID(i)) dut (
      .clk, .rst_n, .arb_en_i(arb_en), .active_i(active[i]),
      .drv_o(drv[i]), .bus_i(lines), .win_o(win[i]), .level_o(level[i]), .bus_level_o(bus_level[i]));
  end
  wand_bus #(.NODES(N)) u_bus (.drv_i(drv), .line_o(lines));

  // the same four arbiters in the other LCC format (ones first) must pick
  // the same winners
  logic [N-1:0] win_lof;
  logic [N-1:0][2:0] drv_lof;
  logic [2:0] lines_lof;
  for (genvar i = 0; i < N; i++) begin : g_lof
    dd_arbiter #(.NODES(N), .NODE_ID(i), .LZF(1'b0)) dut (
      .clk, .rst_n, .arb_en_i(arb_en), .active_i(active[i]),
      .drv_o(drv_lof[i]), .bus_i(lines_lof), .win_o(win_lof[i]), .level_o(), .bus_level_o());
  end
  wand_bus #(.NODES(N)) u_bus_lof (.drv_i(drv_lof), .line_o(lines_lof));

  int rounds = 0;
  int wait_slots [N];

  // one arbitration in one cycle; win appears in the next cycle only.
  // back_to_back: the next arbitration follows at once (as after a one-flit
  // packet), so win must also be a one-cycle pulse.
  task automatic slot(input logic [N-1:0] act, output logic [N-1:0] w);
    @(negedge clk); active = act; arb_en = 1;
    #1;
    checks++; if (win !== '0 && rounds == 0) begin failures++; $display("early win"); end
    @(negedge clk); arb_en = 0;
    #1 w = win;
    checks++; if (win_lof !== win) begin failures++; $display("LOF winners %b differ from LZF %b", win_lof, win); end
    rounds++;
    if ($urandom_range(0, 1)) begin
      @(negedge clk); #1;
      checks++; if (win !== '0) begin failures++; $display("win longer than one cycle"); end
    end
  endtask

  function automatic logic [N-1:0] ref_win(logic [N-1:0] act, int r);
    int best = -1, who = -1;
    for (int i = 0; i < N; i++) if (act[i] && (i + r) % N > best) begin best = (i + r) % N; who = i; end
    return (who < 0) ? '0 : N'(1) << who;
  endfunction

  initial begin
    logic [N-1:0] w;
    int fig_winner [8] = '{3, 2, 1, 0, 3, 2, 1, 3};  // N4 N3 N2 N1 N4 N3 N2 N4
    active = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      slot((s < 4) ? 4'b1111 : 4'b1110, w);
      checks++;
      if (w !== (N'(1) << fig_winner[s])) begin failures++; $display("slot %0d winner %b exp N%0d", s, w, fig_winner[s] + 1); end
    end
    for (int i = 0; i < N; i++) wait_slots[i] = 0;
    for (int s = 0; s < 400; s++) begin
      logic [N-1:0] act, exp_w;
      act = N'($urandom);
      // keep nodes that have been waiting active, as a real queue would
      for (int i = 0; i < N; i++) if (wait_slots[i] > 0) act[i] = 1'b1;
      exp_w = ref_win(act, rounds);
      slot(act, w);
      checks++; if (w !== exp_w) begin failures++; $display("slot %0d act %b win %b exp %b", s, act, w, exp_w); end
      checks++; if (!$onehot0(w) || (act != 0 && w == 0)) begin failures++; $display("not unique / idle"); end
      for (int i = 0; i < N; i++) begin
        if (act[i] && !w[i]) wait_slots[i]++;
        else wait_slots[i] = 0;
        checks++; if (wait_slots[i] >= N) begin failures++; $display("node %0d starved", i); end
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
