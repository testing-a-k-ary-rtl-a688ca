// addr_dec: address decoder of one input virtual lane.
//
// The header detect and decode part recognises a header flit waiting in the
// lane's internal flow controller and decodes its relative address for this
// router's dimension (DIM 0 = x, 1 = y): a non-zero hop count selects the
// positive or negative output of the dimension by the direction bit, a zero
// hop count (zero address detection) selects the local destination, which is
// the pair xtoy1/xtoy2 in the x section and toPE1/toPE2 in the y section. The
// request generation part then requests that destination from the routing
// decision block until the acknowledgment arrives, and stays connected until
// the lane's tail flit has left.
//
// Interface: flit_valid/flit come from the internal flow controller; req and
// dest go to the routing decision block, ack returns from it; tail_sent comes
// from the internal flow controller. Timing: req is combinational; the
// connected state is registered on ack and cleared on tail_sent.
//
// The reference architecture names both sub-blocks and their function; the encoding of the
// destination and the request/acknowledge protocol are this design's choice.
module addr_dec
  import router_pkg::*;
#(
  parameter int unsigned DIM = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flit_valid,
  input  flit_t flit,
  input  logic  ack,
  input  logic  tail_sent,
  output logic  req,
  output dest_e dest,
  output logic  connected
);
  hdr_t             h;
  logic             dir;
  logic [HOP_W-1:0] hops;

  assign h    = hdr_t'(flit.data);
  assign dir  = (DIM == 0) ? h.xdir  : h.ydir;
  assign hops = (DIM == 0) ? h.xhops : h.yhops;

  always_comb begin
    if (hops == '0)  dest = DEST_LOC;
    else if (dir)    dest = DEST_N;
    else             dest = DEST_P;
  end

  assign req = flit_valid && flit.head && !connected;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         connected <= 1'b0;
    else if (tail_sent) connected <= 1'b0;
    else if (ack)       connected <= 1'b1;
  end

  a_ack_only_on_req: assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);
endmodule
