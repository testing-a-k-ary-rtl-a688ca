// link_pipe: one pipeline stage of a physical link between two routers.
//
// The forward flit (valid, lane, flit) and the backward per-lane stop/empty
// status are each registered once, modelling a link whose signals take one
// cycle to cross. The receiving input buffers raise stop early enough to
// absorb the flits in flight across this stage.
//
// Interface: src/src_bwd face the sending router's output, dst/dst_bwd the
// receiving router's input. Timing: one cycle each way. After reset the link
// is idle and reports every lane empty and not stopped.
module link_pipe
  import router_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  link_fwd_t src,
  output link_bwd_t src_bwd,
  output link_fwd_t dst,
  input  link_bwd_t dst_bwd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst     <= LINK_IDLE;
      src_bwd <= LINK_OPEN;
    end else begin
      dst     <= src;
      src_bwd <= dst_bwd;
    end
  end
endmodule
