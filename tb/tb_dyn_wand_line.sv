// tb_dyn_wand_line: model of one dynamic wire-AND line with four nodes. The
// receivers must read the AND of the enabled bits of each evaluation phase,
// the line must be precharged high during every low clock phase, and it must
// fall faster when more nodes pull it down.
module tb_dyn_wand_line;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [N-1:0] pd;
  logic line, q;

  dyn_wand_line #(.NODES(N), .T_PRE_1(8), .T_EVAL_1(12)) dut (.clk, .pull_dn_i(pd), .line_o(line), .rd_q_o(q));

  always #20 clk = ~clk;

  initial begin
    time t0, t1, d1, d4;
    pd = '0;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      logic [N-1:0] p;
      p = N'($urandom);
      pd = p;
      @(posedge clk);
      @(negedge clk); #1;
      checks++; if (q !== (p == 0)) begin failures++; $display("read %b for pull-downs %b", q, p); end
      pd = '0;
      #10;
      checks++; if (line !== 1'b1) begin failures++; $display("not precharged"); end
    end
    // discharge time with one and with four pull-downs
    pd = 4'b0001; @(posedge clk); t0 = $time; wait (line == 1'b0); t1 = $time; d1 = t1 - t0;
    @(negedge clk); pd = 4'b1111; @(posedge clk); t0 = $time; wait (line == 1'b0); t1 = $time; d4 = t1 - t0;
    checks++; if (!(d4 < d1)) begin failures++; $display("evaluate not faster: %0t vs %0t", d4, d1); end
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
