// xfc: external flow controller of one input virtual lane.
//
// The external flow controller terminates the pipelined link from the
// upstream router. It buffers arriving flits of its lane in a FIFO and tells
// the sender to hold off through the lane's stop signal; it also reports the
// lane's empty status. Because the stop signal reaches the sender late, stop
// is raised while DEPTH-STOP_AT entries are still free, so flits already in
// flight when data flow is stopped are never lost.
//
// Interface: in_valid/in_flit push one flit (the sender must have seen stop
// low); out_valid/out_flit/out_ready hand the oldest flit to the internal
// flow controller, a transfer happening when valid and ready are both high.
// stop and empty are combinational functions of the registered occupancy.
// Timing: a pushed flit is visible on the output one cycle later.
//
// The reference architecture gives the role of this block (buffering so that stopping and
// resuming flow loses no data, an empty status between routers). The FIFO
// form, its depth and the stop threshold are this design's own choices.
module xfc
  import router_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned STOP_AT = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  stop,
  output logic  empty,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [AW:0]    count;
  logic           push, pop;

  assign push      = in_valid;
  assign pop       = out_valid && out_ready;
  assign out_valid = (count != 0);
  assign out_flit  = mem[rd_ptr];
  assign stop      = (count >= (AW+1)'(STOP_AT));
  assign empty     = (count == 0);

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  // A flit arriving at a full buffer would be lost.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (count < (AW+1)'(DEPTH)) || pop);
endmodule
