// tb_wand_bus: a line is 1 only when no node drives 0 on it; with LCC codes
// the bus shows the code of the highest level sent.
module tb_wand_bus;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic [N-1:0][2:0] drv;
  logic [2:0] line;

  wand_bus #(.NODES(N)) dut (.drv_i(drv), .line_o(line));

  initial begin
    for (int t = 0; t < 500; t++) begin
      drv = (4*3)'($urandom);
      #1;
      for (int b = 0; b < 3; b++) begin
        int zeros;
        zeros = 0;
        for (int n = 0; n < N; n++) if (drv[n][b] == 1'b0) zeros++;
        checks++; if (line[b] !== (zeros == 0)) begin failures++; $display("bit %0d wrong", b); end
      end
    end
    // priority covering with LZF codes: levels 0..3 -> highest wins
    for (int t = 0; t < 100; t++) begin
      int mx;
      mx = 0;
      for (int n = 0; n < N; n++) begin
        int l;
        l = $urandom_range(0, 3);
        drv[n] = 3'b111 >> l;
        if (l > mx) mx = l;
      end
      #1;
      checks++; if (line !== (3'b111 >> mx)) begin failures++; $display("covering: %b max %0d", line, mx); end
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
