// mesh_net: K x K two-dimensional mesh of dimension-order wormhole routers.
//
// Router (x, y) sits at node index y*K + x and has its own processing
// element ports. Neighbouring routers are joined by pipelined physical links:
// the forward flit and the backward stop/empty status each pass one register
// stage, which the input buffers' stop threshold allows for. Packets travel
// x first, then y, so a header with relative address (dx, dy) injected at
// node (x, y) leaves at node (x+dx, y+dy).
//
// The links at the edge of the mesh are brought out as ports, so test flits
// can be routed in from the periphery and observed leaving it: west_* is the
// x = 0 edge (Xp in, Xn out), east_* the x = K-1 edge (Xn in, Xp out),
// south_* the y = 0 edge (Yp in, Yn out) and north_* the y = K-1 edge (Yn in,
// Yp out); each array is indexed by the row or column along the edge. The
// edge links are not registered inside the mesh.
//
// The mesh form follows the dimension-order routed mesh of the reference design; K = 3
// and the one-stage link pipeline are this design's choices.
module mesh_net
  import router_pkg::*;
#(
  parameter int unsigned K         = 3,
  parameter int unsigned XFC_DEPTH = 8,
  parameter int unsigned XFC_STOP  = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic  [K*K-1:0][1:0]   pe_in_valid,
  input  flit_t [K*K-1:0][1:0]   pe_in_flit,
  output logic  [K*K-1:0][1:0]   pe_in_stop,
  output logic  [K*K-1:0][1:0]   pe_in_empty,
  output logic  [K*K-1:0][1:0]   pe_out_valid,
  output flit_t [K*K-1:0][1:0]   pe_out_flit,
  input  logic  [K*K-1:0][1:0]   pe_out_stop,
  input  link_fwd_t [K-1:0]      west_in,
  output link_bwd_t [K-1:0]      west_in_bwd,
  output link_fwd_t [K-1:0]      west_out,
  input  link_bwd_t [K-1:0]      west_out_bwd,
  input  link_fwd_t [K-1:0]      east_in,
  output link_bwd_t [K-1:0]      east_in_bwd,
  output link_fwd_t [K-1:0]      east_out,
  input  link_bwd_t [K-1:0]      east_out_bwd,
  input  link_fwd_t [K-1:0]      south_in,
  output link_bwd_t [K-1:0]      south_in_bwd,
  output link_fwd_t [K-1:0]      south_out,
  input  link_bwd_t [K-1:0]      south_out_bwd,
  input  link_fwd_t [K-1:0]      north_in,
  output link_bwd_t [K-1:0]      north_in_bwd,
  output link_fwd_t [K-1:0]      north_out,
  input  link_bwd_t [K-1:0]      north_out_bwd
);
  // Router-side signals, one set per node.
  link_fwd_t [K*K-1:0] xp_in, xn_in, yp_in, yn_in;
  link_fwd_t [K*K-1:0] xp_out, xn_out, yp_out, yn_out;
  link_bwd_t [K*K-1:0] xp_in_bwd, xn_in_bwd, yp_in_bwd, yn_in_bwd;
  link_bwd_t [K*K-1:0] xp_out_bwd, xn_out_bwd, yp_out_bwd, yn_out_bwd;

  for (genvar y = 0; y < K; y++) begin : g_row
    for (genvar x = 0; x < K; x++) begin : g_col
      localparam int unsigned N = y * K + x;

      router #(.XFC_DEPTH(XFC_DEPTH), .XFC_STOP(XFC_STOP)) u_router (
        .clk, .rst_n,
        .pe_in_valid (pe_in_valid[N]),
        .pe_in_flit  (pe_in_flit[N]),
        .pe_in_stop  (pe_in_stop[N]),
        .pe_in_empty (pe_in_empty[N]),
        .pe_out_valid(pe_out_valid[N]),
        .pe_out_flit (pe_out_flit[N]),
        .pe_out_stop (pe_out_stop[N]),
        .xp_in (xp_in[N]),  .xp_in_bwd (xp_in_bwd[N]),
        .xn_in (xn_in[N]),  .xn_in_bwd (xn_in_bwd[N]),
        .yp_in (yp_in[N]),  .yp_in_bwd (yp_in_bwd[N]),
        .yn_in (yn_in[N]),  .yn_in_bwd (yn_in_bwd[N]),
        .xp_out(xp_out[N]), .xp_out_bwd(xp_out_bwd[N]),
        .xn_out(xn_out[N]), .xn_out_bwd(xn_out_bwd[N]),
        .yp_out(yp_out[N]), .yp_out_bwd(yp_out_bwd[N]),
        .yn_out(yn_out[N]), .yn_out_bwd(yn_out_bwd[N])
      );

      // Xp input: from the west neighbour's Xp output, or the west edge.
      if (x == 0) begin : g_w
        assign xp_in[N]       = west_in[y];
        assign west_in_bwd[y] = xp_in_bwd[N];
        assign west_out[y]    = xn_out[N];
        assign xn_out_bwd[N]  = west_out_bwd[y];
      end else begin : g_wl
        link_pipe u_xp (.clk, .rst_n,
          .src(xp_out[N-1]), .src_bwd(xp_out_bwd[N-1]),
          .dst(xp_in[N]),    .dst_bwd(xp_in_bwd[N]));
        link_pipe u_xn (.clk, .rst_n,
          .src(xn_out[N]),   .src_bwd(xn_out_bwd[N]),
          .dst(xn_in[N-1]),  .dst_bwd(xn_in_bwd[N-1]));
      end
      if (x == K - 1) begin : g_e
        assign xn_in[N]       = east_in[y];
        assign east_in_bwd[y] = xn_in_bwd[N];
        assign east_out[y]    = xp_out[N];
        assign xp_out_bwd[N]  = east_out_bwd[y];
      end
      if (y == 0) begin : g_s
        assign yp_in[N]        = south_in[x];
        assign south_in_bwd[x] = yp_in_bwd[N];
        assign south_out[x]    = yn_out[N];
        assign yn_out_bwd[N]   = south_out_bwd[x];
      end else begin : g_sl
        link_pipe u_yp (.clk, .rst_n,
          .src(yp_out[N-K]), .src_bwd(yp_out_bwd[N-K]),
          .dst(yp_in[N]),    .dst_bwd(yp_in_bwd[N]));
        link_pipe u_yn (.clk, .rst_n,
          .src(yn_out[N]),   .src_bwd(yn_out_bwd[N]),
          .dst(yn_in[N-K]),  .dst_bwd(yn_in_bwd[N-K]));
      end
      if (y == K - 1) begin : g_n
        assign yn_in[N]        = north_in[x];
        assign north_in_bwd[x] = yn_in_bwd[N];
        assign north_out[x]    = yp_out[N];
        assign yp_out_bwd[N]   = north_out_bwd[x];
      end
    end
  end
endmodule
