// tb_lcc_encoder: checks LCC codes against the eight-bit code table (both
// formats: level L of LZF = 8'hFF >> L, of LOF = 8'hFF << L) and that the
// default 3-bit encoder's number of zeros equals the level.
module tb_lcc_encoder;
  int checks = 0, failures = 0;
  logic [3:0] lvl8;
  logic [7:0] c_lzf, c_lof;
  logic [1:0] lvl3;
  logic [2:0] c3;

  lcc_encoder #(.CODE_W(8), .LZF(1'b1)) u_lzf (.level(lvl8), .code(c_lzf));
  lcc_encoder #(.CODE_W(8), .LZF(1'b0)) u_lof (.level(lvl8), .code(c_lof));
  lcc_encoder u_def (.level(lvl3), .code(c3));

  // the eight-bit LZF column, level 0..8
  logic [7:0] lzf_tab [9] = '{8'b11111111, 8'b01111111, 8'b00111111, 8'b00011111,
                              8'b00001111, 8'b00000111, 8'b00000011, 8'b00000001, 8'b00000000};
  logic [7:0] lof_tab [9] = '{8'b11111111, 8'b11111110, 8'b11111100, 8'b11111000,
                              8'b11110000, 8'b11100000, 8'b11000000, 8'b10000000, 8'b00000000};

  initial begin
    for (int l = 0; l <= 8; l++) begin
      lvl8 = 4'(l); #1;
      checks++; if (c_lzf !== lzf_tab[l]) begin failures++; $display("LZF level %0d: %b", l, c_lzf); end
      checks++; if (c_lof !== lof_tab[l]) begin failures++; $display("LOF level %0d: %b", l, c_lof); end
    end
    for (int l = 0; l <= 3; l++) begin
      int z;
      lvl3 = 2'(l); #1;
      z = 0; for (int j = 0; j < 3; j++) if (!c3[j]) z++;
      checks++; if (z != l) begin failures++; $display("3-bit level %0d: %b", l, c3); end
      // LZF: zeros are on the MSB side
      checks++; if (l > 0 && c3[2] !== 1'b0) begin failures++; $display("3-bit LZF msb"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
