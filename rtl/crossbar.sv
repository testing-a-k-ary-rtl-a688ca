// crossbar: input lane to output lane switch of one dimension section.
//
// Each output lane takes the flit of the input lane that owns it, as set up
// by the routing decision block; each input lane sees the ready signal of the
// output lane it is connected to. Unconnected output lanes carry no flit and
// unconnected input lanes are never ready.
//
// Interface: in_valid/in_flit/in_ready per input lane; out_valid/out_flit/
// out_ready per output lane; conn_valid/conn_out per input lane and
// out_busy/out_owner per output lane from the routing decision block.
// Timing: purely combinational.
//
// The reference architecture names the crossbar and says the routing decision block drives
// it; the multiplexer form is this design's choice.
module crossbar
  import router_pkg::*;
#(
  parameter int unsigned N_IN  = SEC_IN,
  parameter int unsigned N_OUT = SEC_OUT
) (
  input  logic  [N_IN-1:0]                   in_valid,
  input  flit_t [N_IN-1:0]                   in_flit,
  output logic  [N_IN-1:0]                   in_ready,
  output logic  [N_OUT-1:0]                  out_valid,
  output flit_t [N_OUT-1:0]                  out_flit,
  input  logic  [N_OUT-1:0]                  out_ready,
  input  logic  [N_IN-1:0]                   conn_valid,
  input  logic  [N_IN-1:0][$clog2(N_OUT)-1:0] conn_out,
  input  logic  [N_OUT-1:0]                  out_busy,
  input  logic  [N_OUT-1:0][$clog2(N_IN)-1:0] out_owner
);
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      out_valid[o] = out_busy[o] && in_valid[out_owner[o]];
      out_flit[o]  = in_flit[out_owner[o]];
    end
    for (int i = 0; i < int'(N_IN); i++) begin
      in_ready[i] = conn_valid[i] && out_ready[conn_out[i]];
    end
  end
endmodule
