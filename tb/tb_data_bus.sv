// tb_data_bus: the flit and valid of the single enabled driver reach the bus,
// disabled drivers have no effect, hold is the OR of all holds and a flit is
// transferred only when valid and not held.
module tb_data_bus;
  import dd_tdma_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic [N-1:0] en, v, h;
  flit_t [N-1:0] f;
  logic bv, bh, bf;
  flit_t bflit;

  data_bus #(.NODES(N)) dut (.drive_en_i(en), .valid_i(v), .flit_i(f), .hold_i(h),
                             .valid_o(bv), .flit_o(bflit), .hold_o(bh), .fire_o(bf));

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int who;
      who = $urandom_range(0, N);   // N = nobody drives
      en = (who == N) ? '0 : N'(1) << who;
      v = N'($urandom);
      h = ($urandom_range(0, 2) == 0) ? N'($urandom) : '0;
      for (int n = 0; n < N; n++) f[n] = flit_t'({$urandom, 2'($urandom)});
      #1;
      checks++;
      if (who < N) begin
        if (bv !== v[who] || bflit !== f[who]) begin failures++; $display("driver %0d not seen", who); end
      end else if (bv !== 1'b0) begin failures++; $display("valid with no driver"); end
      checks++; if (bh !== (h != 0)) begin failures++; $display("hold"); end
      checks++; if (bf !== (bv && h == 0)) begin failures++; $display("fire"); end
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
