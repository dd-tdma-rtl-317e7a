// bisync_fifo: dual-clock (bi-synchronous) FIFO between router and bus clocks.
//
// The bus interface uses two of them: router -> bus (tx) and bus -> router
// (rx), because the router and the vertical bus run at different clock
// frequencies. Classic design: a DEPTH-entry register array, binary
// read/write pointers with one extra wrap bit, their Gray-coded copies passed
// to the other clock domain through two-flop synchronizers, full computed in
// the write domain and empty in the read domain (both conservative).
// The read side is first-word-fall-through: rdata_o shows the oldest entry
// whenever empty_o is low, and rd_en_i pops it. A write takes effect on the
// reader's side three to four read-clock edges later. rd_count_o is the
// number of entries the reader can see (conservative, like empty_o). The paper only states
// the FIFO's purpose; the depth and the Gray-pointer structure are this
// design's. DEPTH must be a power of two. rst_n resets both sides
// asynchronously.
module bisync_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 34,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             rst_n,
  // write (producer) side
  input  logic             wclk,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wdata_i,
  output logic             full_o,
  // read (consumer) side
  input  logic             rclk,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rdata_o,
  output logic             empty_o,
  output logic [AW:0]      rd_count_o   // entries visible to the reader
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer in read domain
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer in write domain
  logic [AW:0] wbin_d, rbin_d;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic do_wr;
  assign do_wr  = wr_en_i && !full_o;
  assign wbin_d = wbin_q + (AW+1)'(do_wr);
  // full: the write pointer is one lap ahead of the synchronized read pointer
  assign full_o = (wgray_q == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin_q[AW-1:0]] <= wdata_i;
  end

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin_q   <= wbin_d;
      wgray_q  <= bin2gray(wbin_d);
      rgray_w1 <= rgray_q;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read domain ----------------
  logic do_rd;
  assign do_rd   = rd_en_i && !empty_o;
  assign rbin_d  = rbin_q + (AW+1)'(do_rd);
  assign empty_o = (rgray_q == wgray_r2);
  assign rdata_o = mem[rbin_q[AW-1:0]];

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign rd_count_o = gray2bin(wgray_r2) - rbin_q;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin_q   <= rbin_d;
      rgray_q  <= bin2gray(rbin_d);
      wgray_r1 <= wgray_q;
      wgray_r2 <= wgray_r1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH)
      else $error("bisync_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
