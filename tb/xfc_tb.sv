// xfc_tb: self-checking test of the external flow controller.
//
// Pushes random flits at random times (only while stop is low, plus the
// flits already "in flight" on a two-cycle modelled link) and pops them with
// a random ready. Checks that flits leave in order and intact, that stop
// follows the occupancy threshold, that empty follows occupancy, and that
// the buffer absorbs the in-flight flits without loss.
module xfc_tb;
  import router_pkg::*;

  localparam int unsigned DEPTH = 8;     // the defaults of xfc
  localparam int unsigned STOP_AT = 5;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, stop, empty, out_valid, out_ready;
  flit_t in_flit, out_flit;
  int    checks = 0, failures = 0;

  xfc dut (.*);

  always #5 clk = ~clk;

  flit_t q[$];
  int    model_count;
  logic  stop_seen;   // stop as the sender sees it, one cycle late
  int    stops = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; out_ready = 0; stop_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // occupancy-derived status
      checks++;
      if (stop !== (q.size() >= STOP_AT)) begin failures++; $display("stop mismatch size=%0d", q.size()); end
      checks++;
      if (empty !== (q.size() == 0)) begin failures++; $display("empty mismatch"); end
      if (stop) stops++;
      // sender: sends only when the stop it sees (one cycle late) is low
      in_valid = !stop_seen && ($urandom_range(0, 3) != 0);
      in_flit  = '{head: $urandom_range(0,1), tail: $urandom_range(0,1), data: 16'($urandom)};
      out_ready = (cyc % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || out_flit !== q[0]) begin
          failures++; $display("data mismatch at cycle %0d", cyc);
        end
        if (q.size() != 0) void'(q.pop_front());
      end
      if (in_valid) begin
        checks++;
        if (q.size() >= DEPTH && !(out_valid && out_ready)) begin failures++; $display("overflow"); end
        q.push_back(in_flit);
      end
      @(posedge clk);
      stop_seen = stop;
    end
    checks++;
    if (stops == 0) begin failures++; $display("stop never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
