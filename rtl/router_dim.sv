// router_dim: one dimension section of the router (x or y).
//
// A section has six input lanes and six output lanes. Its inputs are two
// single-lane local channels (fromPE1/fromPE2 in x, xtoy1/xtoy2 in y) and
// two physical channels of two virtual lanes each (Xp, Xn or Yp, Yn). Each
// input lane has an external flow controller, an internal flow controller
// and an address decoder; one routing decision block and one crossbar serve
// the section. The positive and negative output channels each go through a
// virtual channel controller onto their physical link; the two local output
// lanes (xtoy1/xtoy2 or toPE1/toPE2) are brought out as valid/ready ports.
//
// Interface: *_in links carry flits in, *_in_bwd return their lanes' stop and
// empty status; *_out links carry flits out, *_out_bwd bring the downstream
// status back. loc_in_valid/loc_in_flit feed the local input lanes, which
// answer with loc_in_stop/loc_in_empty. Timing: a header that finds an empty
// path crosses from the input link to the output link in five cycles (input
// buffer, internal flow controller, connection set-up, collection, delivery).
//
// The composition follows the canonical router architecture; the lane
// numbering and priorities are in router_pkg.
module router_dim
  import router_pkg::*;
#(
  parameter int unsigned DIM       = 0,
  parameter int unsigned XFC_DEPTH = 8,
  parameter int unsigned XFC_STOP  = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic      [1:0]     loc_in_valid,
  input  flit_t     [1:0]     loc_in_flit,
  output logic      [1:0]     loc_in_stop,
  output logic      [1:0]     loc_in_empty,
  input  link_fwd_t           p_in,
  output link_bwd_t           p_in_bwd,
  input  link_fwd_t           n_in,
  output link_bwd_t           n_in_bwd,
  output link_fwd_t           p_out,
  input  link_bwd_t           p_out_bwd,
  output link_fwd_t           n_out,
  input  link_bwd_t           n_out_bwd,
  output logic      [1:0]     loc_out_valid,
  output flit_t     [1:0]     loc_out_flit,
  input  logic      [1:0]     loc_out_ready
);
  localparam int unsigned OW = $clog2(SEC_OUT);
  localparam int unsigned IW = $clog2(SEC_IN);

  // Input lane demultiplexing of the two physical channels.
  logic  [SEC_IN-1:0] push;
  flit_t [SEC_IN-1:0] push_flit;
  logic  [SEC_IN-1:0] stop, empty;

  always_comb begin
    push[IN_LOC1]      = loc_in_valid[0];
    push[IN_LOC2]      = loc_in_valid[1];
    push[IN_P1]        = p_in.valid && (p_in.lane == 1'b0);
    push[IN_P2]        = p_in.valid && (p_in.lane == 1'b1);
    push[IN_N1]        = n_in.valid && (n_in.lane == 1'b0);
    push[IN_N2]        = n_in.valid && (n_in.lane == 1'b1);
    push_flit[IN_LOC1] = loc_in_flit[0];
    push_flit[IN_LOC2] = loc_in_flit[1];
    push_flit[IN_P1]   = p_in.flit;
    push_flit[IN_P2]   = p_in.flit;
    push_flit[IN_N1]   = n_in.flit;
    push_flit[IN_N2]   = n_in.flit;
  end

  assign loc_in_stop  = stop[IN_LOC2:IN_LOC1];
  assign loc_in_empty = empty[IN_LOC2:IN_LOC1];
  assign p_in_bwd     = '{stop: stop[IN_P2:IN_P1], empty: empty[IN_P2:IN_P1]};
  assign n_in_bwd     = '{stop: stop[IN_N2:IN_N1], empty: empty[IN_N2:IN_N1]};

  // Per input lane: XFC -> IFC, with the AD watching the IFC.
  logic  [SEC_IN-1:0] x_valid, x_ready;
  flit_t [SEC_IN-1:0] x_flit;
  logic  [SEC_IN-1:0] f_valid, f_ready, tail_sent;
  flit_t [SEC_IN-1:0] f_flit, f_head;
  logic  [SEC_IN-1:0] req, ack, connected;
  dest_e [SEC_IN-1:0] dest;

  for (genvar i = 0; i < SEC_IN; i++) begin : g_in
    xfc #(.DEPTH(XFC_DEPTH), .STOP_AT(XFC_STOP)) u_xfc (
      .clk, .rst_n,
      .in_valid (push[i]),
      .in_flit  (push_flit[i]),
      .stop     (stop[i]),
      .empty    (empty[i]),
      .out_valid(x_valid[i]),
      .out_flit (x_flit[i]),
      .out_ready(x_ready[i])
    );
    ifc #(.DIM(DIM)) u_ifc (
      .clk, .rst_n,
      .in_valid (x_valid[i]),
      .in_flit  (x_flit[i]),
      .in_ready (x_ready[i]),
      .out_valid(f_valid[i]),
      .out_flit (f_flit[i]),
      .out_ready(f_ready[i]),
      .head_flit(f_head[i]),
      .tail_sent(tail_sent[i])
    );
    addr_dec #(.DIM(DIM)) u_ad (
      .clk, .rst_n,
      .flit_valid(f_valid[i]),
      .flit      (f_head[i]),
      .ack       (ack[i]),
      .tail_sent (tail_sent[i]),
      .req       (req[i]),
      .dest      (dest[i]),
      .connected (connected[i])
    );
  end

  // Routing decision and crossbar.
  logic [SEC_IN-1:0]           conn_valid;
  logic [SEC_IN-1:0][OW-1:0]   conn_out;
  logic [SEC_OUT-1:0]          out_busy;
  logic [SEC_OUT-1:0][IW-1:0]  out_owner;

  route_dec u_rd (
    .clk, .rst_n,
    .req, .dest, .tail_sent, .ack,
    .conn_valid, .conn_out, .out_busy, .out_owner
  );

  logic  [SEC_OUT-1:0] o_valid, o_ready;
  flit_t [SEC_OUT-1:0] o_flit;

  crossbar u_cb (
    .in_valid (f_valid),
    .in_flit  (f_flit),
    .in_ready (f_ready),
    .out_valid(o_valid),
    .out_flit (o_flit),
    .out_ready(o_ready),
    .conn_valid, .conn_out, .out_busy, .out_owner
  );

  // Output side: two virtual channel controllers and the local lanes.
  vc_ctrl u_vc_p (
    .clk, .rst_n,
    .in_valid(o_valid[1:0]),
    .in_flit (o_flit[1:0]),
    .in_ready(o_ready[1:0]),
    .stop    (p_out_bwd.stop),
    .link_out(p_out)
  );
  vc_ctrl u_vc_n (
    .clk, .rst_n,
    .in_valid(o_valid[3:2]),
    .in_flit (o_flit[3:2]),
    .in_ready(o_ready[3:2]),
    .stop    (n_out_bwd.stop),
    .link_out(n_out)
  );

  assign loc_out_valid = o_valid[5:4];
  assign loc_out_flit  = o_flit[5:4];
  assign o_ready[5:4]  = loc_out_ready;
endmodule
