// tb_priority_code_manager: four PCUA code managers (node ids 0..3) updated
// together with random activity. A reference model predicts every level
// ((id + rounds) mod 4) and the code driven (LCC of the level, all ones when
// inactive), and checks that the levels of all nodes always differ.
module tb_priority_code_manager;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, arb_en = 0;
  logic [N-1:0] active;
  logic [N-1:0][1:0] level;
  logic [N-1:0][2:0] code;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g
    priority_code_manager #(.NODES(N), .NODE_ID(i)) dut (
      .clk, .rst_n, .arb_en, .active_i(active[i]), .level_o(level[i]),
      .code_o(code[i]));
  end

  function automatic logic [2:0] lzf(int l);
    return 3'b111 >> l;
  endfunction

  int rounds = 0;

  initial begin
    active = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      active = N'($urandom);
      arb_en = ($urandom_range(0, 2) != 0);
      #1;
      for (int i = 0; i < N; i++) begin
        int l;
        l = (i + rounds) % N;
        checks++; if (level[i] != 2'(l)) begin failures++; $display("t%0d node %0d level %0d exp %0d", t, i, level[i], l); end
        checks++; if (code[i] != (active[i] ? lzf(l) : 3'b111)) begin failures++; $display("t%0d node %0d code %b", t, i, code[i]); end
        for (int j = 0; j < i; j++) begin
          checks++; if (level[i] == level[j]) begin failures++; $display("levels equal"); end
        end
      end
      @(posedge clk); #1;
      if (arb_en) rounds++;
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
