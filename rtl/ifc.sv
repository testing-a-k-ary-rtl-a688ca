// ifc: internal flow controller of one input virtual lane.
//
// The internal flow controller holds the flit at the head of its lane in a
// one-flit register. Downstream it offers that flit to the crossbar and moves
// it when the connected output lane is ready (intranode flow control with the
// virtual channel controller). On the way out it updates a header flit for
// relative addressing: the hop count of this router's dimension (DIM 0 = x,
// 1 = y) is decremented when it is not zero, since a non-zero count means the
// header leaves along this dimension and the next router is one hop closer.
// It detects the tail flit and flags the cycle in which the tail leaves, which
// is when the lane's connection is torn down. The stored flit is the
// original, so the address decoder sees the address before the update.
//
// Interface: in_* is a valid/ready port from the external flow controller;
// out_* a valid/ready port into the crossbar; head_flit is the stored
// (un-updated) flit for the address decoder; tail_sent pulses as the tail
// moves on. Timing: one register stage; a flit accepted in a cycle is offered
// in the next, and a full stage accepts a new flit in the cycle it drains.
//
// The reference architecture assigns header update and tail detection to this block; the
// one-register form and the decrement-when-non-zero rule are this design's.
module ifc
  import router_pkg::*;
#(
  parameter int unsigned DIM = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready,
  output flit_t head_flit,
  output logic  tail_sent
);
  logic  full;
  flit_t held;
  hdr_t  h, hu;

  assign in_ready  = !full || out_ready;
  assign out_valid = full;
  assign head_flit = held;
  assign tail_sent = full && out_ready && held.tail;

  // Header update of the relative address.
  always_comb begin
    h  = hdr_t'(held.data);
    hu = h;
    if (DIM == 0) begin
      if (h.xhops != '0) hu.xhops = h.xhops - 1'b1;
    end else begin
      if (h.yhops != '0) hu.yhops = h.yhops - 1'b1;
    end
    out_flit = held;
    if (held.head) out_flit.data = hu;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      held <= '0;
    end else if (in_ready) begin
      full <= in_valid;
      if (in_valid) held <= in_flit;
    end
  end
endmodule
