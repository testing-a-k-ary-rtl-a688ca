// vc_ctrl: virtual channel controller of one output physical channel.
//
// It multiplexes the physical link among the two virtual lanes of the
// channel. It alternates between two phases. In the collection phase it
// takes a flit from every lane that offers one through the crossbar and whose
// downstream buffer is not stopped; one flit goes straight to the output
// buffer, the other to a secondary buffer. The delivery phase starts the next
// cycle: the output buffer's flit is put on the link while the flit in the
// secondary buffer moves to the output buffer; this repeats until all
// collected flits are sent, and the controller then returns to collection.
// Lane 1 is placed in the output buffer first.
//
// Interface: in_valid/in_flit/in_ready per lane from the crossbar; link_out
// is the physical link (valid, lane, flit); stop is the per-lane stop status
// from the downstream router as seen at this end of the link. Timing: a
// collection cycle followed by one delivery cycle per collected flit, so two
// lanes each sending continuously share the link two flits every three cycles
// and a single lane gets one flit every two cycles.
//
// The collection/delivery operation follows the reference architecture; the lane order and
// checking stop at collection time are this design's choices.
module vc_ctrl
  import router_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic      [LANES-1:0]  in_valid,
  input  flit_t     [LANES-1:0]  in_flit,
  output logic      [LANES-1:0]  in_ready,
  input  logic      [LANES-1:0]  stop,
  output link_fwd_t              link_out
);
  typedef enum logic {COLLECT, DELIVER} phase_e;

  phase_e phase;
  logic   ob_valid, sb_valid;
  logic   ob_lane, sb_lane;
  flit_t  ob_flit, sb_flit;
  logic   [LANES-1:0] take;

  assign in_ready = (phase == COLLECT) ? ~stop : '0;
  assign take     = in_valid & in_ready;

  always_comb begin
    link_out = LINK_IDLE;
    if (phase == DELIVER && ob_valid) begin
      link_out.valid = 1'b1;
      link_out.lane  = ob_lane;
      link_out.flit  = ob_flit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= COLLECT;
      ob_valid <= 1'b0;
      sb_valid <= 1'b0;
      ob_lane  <= 1'b0;
      sb_lane  <= 1'b0;
      ob_flit  <= '0;
      sb_flit  <= '0;
    end else if (phase == COLLECT) begin
      if (take != '0) begin
        phase    <= DELIVER;
        ob_valid <= 1'b1;
        if (take[0]) begin
          ob_lane  <= 1'b0;
          ob_flit  <= in_flit[0];
          sb_valid <= take[1];
          sb_lane  <= 1'b1;
          sb_flit  <= in_flit[1];
        end else begin
          ob_lane  <= 1'b1;
          ob_flit  <= in_flit[1];
          sb_valid <= 1'b0;
        end
      end
    end else begin
      if (sb_valid) begin
        ob_lane  <= sb_lane;
        ob_flit  <= sb_flit;
        sb_valid <= 1'b0;
      end else begin
        ob_valid <= 1'b0;
        phase    <= COLLECT;
      end
    end
  end
endmodule
