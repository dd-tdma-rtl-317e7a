// dd_tdma_pkg: types and constants shared by the DD-TDMA vertical bus.
//
// A flit is carried on the data bus as a two-bit type plus a 32-bit payload.
// Packets are head ... tail (or a single head_tail flit); the head flit names
// the destination node of the bus in its low payload bits. The paper arbitrates
// packet-wise and detects the end of a packet from the tail flit; the exact flit
// encoding, the payload width and the position of the destination field are
// this design's own choices.
package dd_tdma_pkg;

  localparam int unsigned DATA_W = 32;  // flit payload width (own choice)
  localparam int unsigned DEST_W = 8;   // destination field in a head flit payload

  typedef enum logic [1:0] {
    FLIT_BODY      = 2'b00,
    FLIT_HEAD      = 2'b01,
    FLIT_TAIL      = 2'b10,
    FLIT_HEAD_TAIL = 2'b11   // one-flit packet
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  function automatic logic is_head(flit_t f);
    return f.ftype == FLIT_HEAD || f.ftype == FLIT_HEAD_TAIL;
  endfunction

  function automatic logic is_tail(flit_t f);
    return f.ftype == FLIT_TAIL || f.ftype == FLIT_HEAD_TAIL;
  endfunction

  function automatic logic [DEST_W-1:0] head_dest(flit_t f);
    return f.payload[DEST_W-1:0];
  endfunction

endpackage
