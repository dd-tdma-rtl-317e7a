// lcc_encoder: priority level -> Logic Continuous Coding (LCC) string.
//
// LCC strings hold at most one run of ones and one run of zeros. The priority
// level of a code is its number of zeros, so under a wire-AND bus the code
// with the most zeros covers all others and stays unchanged on the bus.
// Level 0 (all ones) is the lowest priority, level CODE_W (all zeros) the
// highest. Two formats exist and must not be mixed on one bus:
//   LZF = 1 : zeros first (MSB side), e.g. level 2 of 8 bits = 00111111
//   LZF = 0 : ones first (LOF),       e.g. level 2 of 8 bits = 11111100
// Both formats and the level numbering are the paper's (its eight-bit table);
// choosing LZF as the default is this design's own choice.
// Purely combinational. Levels above CODE_W saturate to all zeros.
module lcc_encoder #(
  parameter int unsigned CODE_W = 3,
  parameter bit          LZF    = 1'b1,
  localparam int unsigned LVL_W = $clog2(CODE_W + 1)
) (
  input  logic [LVL_W-1:0]  level,
  output logic [CODE_W-1:0] code
);

  always_comb begin
    for (int unsigned j = 0; j < CODE_W; j++) begin
      if (LZF) code[j] = (j + 32'(level) < CODE_W);  // top `level` bits are 0
      else     code[j] = (j >= 32'(level));          // bottom `level` bits are 0
    end
  end

endmodule
