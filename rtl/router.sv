// router: dimension-order wormhole router for a 2-D mesh with two virtual
// lanes per physical channel.
//
// The router is built from two dimension sections. The x section routes the
// processing element's two injection channels (fromPE1, fromPE2) and the two
// x channels (Xp, Xn) either on along x or, once the x hop count is zero, to
// the two internal channels xtoy1/xtoy2. The y section takes xtoy1/xtoy2 and
// the two y channels (Yp, Yn) and routes them on along y or, once the y hop
// count is zero, through the output buffers B to the processing element's
// ejection channels toPE1/toPE2. A packet therefore travels x first, then y
// (deterministic dimension-order routing) and is switched as a worm: its
// header sets up a lane-to-lane connection in each router and its tail
// releases it.
//
// Channel naming follows the direction of travel: Xp carries packets moving
// toward +x, so the Xp input comes from the -x neighbour's Xp output.
//
// Interface: four physical input links and four output links (forward flit
// plus backward stop/empty per lane); two injection channels with stop and
// empty; two ejection channels held off by the processing element's stop.
// Timing: a header crossing straight through a section takes five cycles;
// a header entering from the processing element and leaving on the same node
// passes both sections and an output buffer.
//
// The block structure follows the canonical router; widths, buffer depths
// and the flit format are this design's own (see router_pkg).
module router
  import router_pkg::*;
#(
  parameter int unsigned XFC_DEPTH = 8,
  parameter int unsigned XFC_STOP  = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  // processing element injection
  input  logic  [1:0]     pe_in_valid,
  input  flit_t [1:0]     pe_in_flit,
  output logic  [1:0]     pe_in_stop,
  output logic  [1:0]     pe_in_empty,
  // processing element ejection
  output logic  [1:0]     pe_out_valid,
  output flit_t [1:0]     pe_out_flit,
  input  logic  [1:0]     pe_out_stop,
  // physical channels
  input  link_fwd_t       xp_in,
  output link_bwd_t       xp_in_bwd,
  input  link_fwd_t       xn_in,
  output link_bwd_t       xn_in_bwd,
  input  link_fwd_t       yp_in,
  output link_bwd_t       yp_in_bwd,
  input  link_fwd_t       yn_in,
  output link_bwd_t       yn_in_bwd,
  output link_fwd_t       xp_out,
  input  link_bwd_t       xp_out_bwd,
  output link_fwd_t       xn_out,
  input  link_bwd_t       xn_out_bwd,
  output link_fwd_t       yp_out,
  input  link_bwd_t       yp_out_bwd,
  output link_fwd_t       yn_out,
  input  link_bwd_t       yn_out_bwd
);
  // xtoy1/xtoy2 internal channels
  logic  [1:0] xy_valid, xy_ready, xy_stop, xy_empty;
  flit_t [1:0] xy_flit;

  router_dim #(.DIM(0), .XFC_DEPTH(XFC_DEPTH), .XFC_STOP(XFC_STOP)) u_x (
    .clk, .rst_n,
    .loc_in_valid (pe_in_valid),
    .loc_in_flit  (pe_in_flit),
    .loc_in_stop  (pe_in_stop),
    .loc_in_empty (pe_in_empty),
    .p_in         (xp_in),
    .p_in_bwd     (xp_in_bwd),
    .n_in         (xn_in),
    .n_in_bwd     (xn_in_bwd),
    .p_out        (xp_out),
    .p_out_bwd    (xp_out_bwd),
    .n_out        (xn_out),
    .n_out_bwd    (xn_out_bwd),
    .loc_out_valid(xy_valid),
    .loc_out_flit (xy_flit),
    .loc_out_ready(xy_ready)
  );

  assign xy_ready = ~xy_stop;

  logic  [1:0] ej_valid, ej_ready;
  flit_t [1:0] ej_flit;

  router_dim #(.DIM(1), .XFC_DEPTH(XFC_DEPTH), .XFC_STOP(XFC_STOP)) u_y (
    .clk, .rst_n,
    .loc_in_valid (xy_valid & xy_ready),
    .loc_in_flit  (xy_flit),
    .loc_in_stop  (xy_stop),
    .loc_in_empty (xy_empty),
    .p_in         (yp_in),
    .p_in_bwd     (yp_in_bwd),
    .n_in         (yn_in),
    .n_in_bwd     (yn_in_bwd),
    .p_out        (yp_out),
    .p_out_bwd    (yp_out_bwd),
    .n_out        (yn_out),
    .n_out_bwd    (yn_out_bwd),
    .loc_out_valid(ej_valid),
    .loc_out_flit (ej_flit),
    .loc_out_ready(ej_ready)
  );

  for (genvar k = 0; k < 2; k++) begin : g_b
    out_buf u_b (
      .clk, .rst_n,
      .in_valid (ej_valid[k]),
      .in_flit  (ej_flit[k]),
      .in_ready (ej_ready[k]),
      .out_valid(pe_out_valid[k]),
      .out_flit (pe_out_flit[k]),
      .stop     (pe_out_stop[k])
    );
  end
endmodule
