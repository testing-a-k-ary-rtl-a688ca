// out_buf_tb: self-checking test of the output buffer toward the PE.
//
// Offers random flits with random valid while the processing element raises
// stop at random. Checks that the buffer sends nothing while stopped, sends
// every accepted flit exactly once and in order, and accepts a new flit in the
// cycle its held flit leaves (full throughput when never stopped).
module out_buf_tb;
  import router_pkg::*;

  logic  clk = 0, rst_n = 0;
  int    checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, stop;
  flit_t in_flit, out_flit;

  out_buf dut (.*);

  flit_t q[$];
  int    sent = 0, stopped_cycles = 0;
  logic  acc;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; stop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // full-rate phase: never stopped, always valid -> one flit per cycle
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (cyc >= 100) stop = ($urandom_range(0, 2) == 0);
      in_valid = (cyc < 100) ? 1'b1 : $urandom_range(0, 1);
      in_flit  = flit_t'($urandom);
      #1;
      if (stop) begin
        stopped_cycles++;
        checks++;
        if (out_valid) begin failures++; $display("sent while stopped"); end
      end
      if (out_valid) begin
        checks++;
        sent++;
        if (q.size() == 0 || out_flit !== q[0]) begin failures++; $display("flit mismatch"); end
        if (q.size() != 0) void'(q.pop_front());
      end
      if (cyc >= 2 && cyc < 100) begin
        checks++;
        if (!(in_ready && out_valid)) begin failures++; $display("no full throughput at %0d", cyc); end
      end
      acc = in_valid && in_ready;
      @(posedge clk);
      #1;
      if (acc) q.push_back(in_flit);
    end
    checks++;
    if (stopped_cycles == 0 || sent < 500) begin failures++; $display("coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
