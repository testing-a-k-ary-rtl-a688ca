// out_buf: output buffer toward the processing element.
//
// A one-flit register between a local output lane of the y section's
// crossbar and the processing element's ejection channel. It forwards its
// flit while the processing element's stop is low and accepts a new flit in
// the cycle it becomes or stays free.
//
// Interface: in_valid/in_flit/in_ready from the crossbar; out_valid/out_flit
// to the processing element, which holds off the buffer with stop.
// Timing: one register stage.
//
// The reference architecture only shows this buffer (B in front of toPE1 and toPE2); its
// depth of one flit and the stop handshake are this design's choice.
module out_buf
  import router_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  stop
);
  logic full;

  assign out_valid = full && !stop;
  assign in_ready  = !full || !stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= 1'b0;
      out_flit <= '0;
    end else if (in_ready) begin
      full <= in_valid;
      if (in_valid) out_flit <= in_flit;
    end
  end
endmodule
