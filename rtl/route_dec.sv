// route_dec: routing decision block of one dimension section.
//
// Five parts, as in the canonical router:
//  - request arbitrator: for each output destination, picks one requesting
//    input lane by fixed priority (input lane 0 highest);
//  - lane allocator: gives the winner the first free lane of that destination
//    (lane 1 before lane 2); a winner with no free lane waits;
//  - connection: latches the granted input lane -> output lane connections
//    that drive the crossbar;
//  - input/output lane status: a connection flag per input lane and a busy
//    flag per output lane;
//  - acknowledgment generator: acknowledges the granted request to the
//    input lane's address decoder.
// A connection is released in the cycle its input lane's tail flit crosses
// the crossbar, so the output lane is free again from the next cycle.
//
// Interface: req/dest from the address decoders; tail_sent from the internal
// flow controllers; ack back to the address decoders; conn_valid/conn_out
// per input lane and out_busy/out_owner per output lane to the crossbar.
// Output destination d owns output lanes 2d and 2d+1. Timing: arbitration
// and allocation are combinational on the requests; the connection is
// registered, so a header granted in cycle t can cross in cycle t+1. At most
// one grant per destination per cycle.
//
// The reference architecture gives the sub-blocks and that the highest priority input wins;
// the priority order and the one-grant-per-cycle allocation are this design's
// choice.
module route_dec
  import router_pkg::*;
#(
  parameter int unsigned N_IN   = SEC_IN,
  parameter int unsigned N_DEST = SEC_DEST
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic  [N_IN-1:0]                req,
  input  dest_e [N_IN-1:0]                dest,
  input  logic  [N_IN-1:0]                tail_sent,
  output logic  [N_IN-1:0]                ack,
  output logic  [N_IN-1:0]                conn_valid,
  output logic  [N_IN-1:0][$clog2(2*N_DEST)-1:0] conn_out,
  output logic  [2*N_DEST-1:0]            out_busy,
  output logic  [2*N_DEST-1:0][$clog2(N_IN)-1:0] out_owner
);
  localparam int unsigned N_OUT = 2 * N_DEST;
  localparam int unsigned OW    = $clog2(N_OUT);
  localparam int unsigned IW    = $clog2(N_IN);

  // Request arbitrator and lane allocator.
  logic [N_IN-1:0]          grant;
  logic [N_IN-1:0][OW-1:0]  grant_lane;

  always_comb begin
    grant      = '0;
    grant_lane = '0;
    for (int d = 0; d < int'(N_DEST); d++) begin
      automatic logic found = 1'b0;
      for (int i = 0; i < int'(N_IN); i++) begin
        if (!found && req[i] && (int'(dest[i]) == d)) begin
          found = 1'b1;
          if (!out_busy[2*d]) begin
            grant[i]      = 1'b1;
            grant_lane[i] = OW'(2*d);
          end else if (!out_busy[2*d+1]) begin
            grant[i]      = 1'b1;
            grant_lane[i] = OW'(2*d+1);
          end
        end
      end
    end
  end

  // Acknowledgment generator.
  assign ack = grant;

  // Connection and lane status.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn_valid <= '0;
      conn_out   <= '0;
      out_busy   <= '0;
      out_owner  <= '0;
    end else begin
      for (int i = 0; i < int'(N_IN); i++) begin
        if (conn_valid[i] && tail_sent[i]) begin
          conn_valid[i]          <= 1'b0;
          out_busy[conn_out[i]]  <= 1'b0;
        end
      end
      for (int i = 0; i < int'(N_IN); i++) begin
        if (grant[i]) begin
          conn_valid[i]            <= 1'b1;
          conn_out[i]              <= grant_lane[i];
          out_busy[grant_lane[i]]  <= 1'b1;
          out_owner[grant_lane[i]] <= IW'(i);
        end
      end
    end
  end

  // An output lane is given to one input lane at a time.
  always_comb begin
    for (int i = 0; i < int'(N_IN); i++) begin
      for (int j = i + 1; j < int'(N_IN); j++) begin
        a_one_owner: assert (!(conn_valid[i] && conn_valid[j] && conn_out[i] == conn_out[j]) || !rst_n);
      end
    end
  end
endmodule
