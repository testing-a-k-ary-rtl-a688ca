// router_pkg: types and constants shared by the wormhole router blocks.
//
// A flit carries a head bit, a tail bit and a 16-bit payload. In a header
// flit the payload holds the relative destination address: a direction bit
// and a 6-bit hop count for each of x and y. Hop counts of 0..63 follow the
// header sweep j = 0..63 of the functional tests; the direction bits, the
// field placement and the payload width are this design's own choice.
//
// An inter-router physical link carries one flit per cycle tagged with its
// virtual lane (link_fwd_t). Each lane returns a stop and an empty status
// bit (link_bwd_t). A sender may put a flit of a lane on the link only while
// it sees that lane's stop low; the receiving buffer keeps enough room for
// the flits already in flight.
package router_pkg;

  localparam int unsigned LANES    = 2;   // virtual lanes per physical channel
  localparam int unsigned DATA_W   = 16;  // payload bits per flit
  localparam int unsigned HOP_W    = 6;   // bits of one relative hop count
  localparam int unsigned SEC_IN   = 6;   // input lanes of one dimension section
  localparam int unsigned SEC_OUT  = 6;   // output lanes of one dimension section
  localparam int unsigned SEC_DEST = 3;   // output destinations of one section

  // Input lane numbering inside a dimension section (x: fromPE1, fromPE2,
  // Xp1, Xp2, Xn1, Xn2; y: xtoy1, xtoy2, Yp1, Yp2, Yn1, Yn2). A lower index
  // has higher arbitration priority.
  localparam int unsigned IN_LOC1 = 0;
  localparam int unsigned IN_LOC2 = 1;
  localparam int unsigned IN_P1   = 2;
  localparam int unsigned IN_P2   = 3;
  localparam int unsigned IN_N1   = 4;
  localparam int unsigned IN_N2   = 5;

  // Output destinations of a section; destination d owns output lanes 2d and
  // 2d+1 (x: Xp1, Xp2, Xn1, Xn2, xtoy1, xtoy2; y: Yp1, Yp2, Yn1, Yn2,
  // toPE1, toPE2).
  typedef enum logic [1:0] {
    DEST_P   = 2'd0,
    DEST_N   = 2'd1,
    DEST_LOC = 2'd2
  } dest_e;

  typedef struct packed {
    logic             xdir;   // 0: toward +x (Xp), 1: toward -x (Xn)
    logic [HOP_W-1:0] xhops;  // remaining hops in x
    logic             ydir;   // 0: toward +y (Yp), 1: toward -y (Yn)
    logic [HOP_W-1:0] yhops;  // remaining hops in y
    logic [1:0]       spare;
  } hdr_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic       valid;
    logic [0:0] lane;
    flit_t      flit;
  } link_fwd_t;

  typedef struct packed {
    logic [LANES-1:0] stop;
    logic [LANES-1:0] empty;
  } link_bwd_t;

  localparam link_fwd_t LINK_IDLE = '0;
  localparam link_bwd_t LINK_OPEN = '{stop: '0, empty: '1};

  function automatic flit_t make_head(logic xdir, logic [HOP_W-1:0] xhops,
                                      logic ydir, logic [HOP_W-1:0] yhops);
    hdr_t h;
    h = '{xdir: xdir, xhops: xhops, ydir: ydir, yhops: yhops, spare: 2'b00};
    return '{head: 1'b1, tail: 1'b0, data: h};
  endfunction

  function automatic flit_t make_data(logic [DATA_W-1:0] d);
    return '{head: 1'b0, tail: 1'b0, data: d};
  endfunction

  function automatic flit_t make_tail(logic [DATA_W-1:0] d);
    return '{head: 1'b0, tail: 1'b1, data: d};
  endfunction

endpackage
