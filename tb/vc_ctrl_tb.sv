// vc_ctrl_tb: self-checking test of the virtual channel controller.
//
// Two lane sources offer random flits (held until taken) and the downstream
// stop bits change at random. The test keeps its own record of the phase
// sequence: a collection cycle takes exactly the lanes that offer a flit and
// are not stopped, lane 1's flit is sent in the next cycle and lane 2's in
// the one after, and the controller is back in collection right after the
// last flit leaves. It checks each lane's flit order and content on the link,
// that no stopped lane is taken, and the link occupancy of two flits per
// three cycles when both lanes are busy and never stopped.
module vc_ctrl_tb;
  import router_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic      [1:0] in_valid, in_ready, stop;
  flit_t     [1:0] in_flit;
  link_fwd_t       link_out;

  vc_ctrl dut (.*);

  flit_t lq[2][$];       // flits taken, per lane, awaiting transmission
  int    sched[$];       // expected lane per coming cycle, -1 = idle
  int    both = 0, single = 0, stopped_offer = 0, busy_cycles = 0, sent_in_window = 0;
  logic  [1:0] take;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; stop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      for (int l = 0; l < 2; l++) begin
        if (!in_valid[l] || take[l]) begin
          in_valid[l] = (cyc < 300) ? 1'b1 : ($urandom_range(0, 2) != 0);
          in_flit[l]  = flit_t'($urandom);
        end
      end
      stop = (cyc < 300) ? 2'b00 : 2'($urandom_range(0, 3) == 0 ? $urandom : 0);
      #1;
      // expected link activity of this cycle
      begin
        int e;
        e = (sched.size() != 0) ? sched.pop_front() : -1;
        checks++;
        if (e < 0) begin
          if (link_out.valid) begin failures++; $display("cyc %0d unexpected flit", cyc); end
        end else begin
          if (!link_out.valid || int'(link_out.lane) != e || lq[e].size() == 0 ||
              link_out.flit !== lq[e][0]) begin
            failures++; $display("cyc %0d expected lane %0d flit", cyc, e);
          end
          if (lq[e].size() != 0) void'(lq[e].pop_front());
          if (cyc >= 10 && cyc < 298) sent_in_window++;
        end
        // collection happens only in a cycle with nothing left to deliver
        checks++;
        if ((e < 0) ? (in_ready != ~stop) : (in_ready != 2'b00)) begin
          failures++; $display("cyc %0d ready %b in wrong phase", cyc, in_ready);
        end
      end
      for (int l = 0; l < 2; l++) if (in_valid[l] && stop[l]) stopped_offer++;
      take = in_valid & in_ready;
      checks++;
      if ((take & stop) != 0) begin failures++; $display("stopped lane taken"); end
      if (take != 0) begin
        if (take[0]) begin lq[0].push_back(in_flit[0]); sched.push_back(0); end
        if (take[1]) begin lq[1].push_back(in_flit[1]); sched.push_back(1); end
        if (take == 2'b11) both++; else single++;
      end
      @(posedge clk);
      #1;
    end
    // cycles 10..297: both lanes always offer, never stopped -> 2 flits per 3 cycles
    checks++;
    if (sent_in_window < 190 || sent_in_window > 193) begin
      failures++; $display("link occupancy %0d flits in 288 cycles", sent_in_window);
    end
    checks++;
    if (both == 0 || single == 0 || stopped_offer == 0) begin failures++; $display("coverage"); end
    $display("both=%0d single=%0d stopped=%0d window=%0d", both, single, stopped_offer, sent_in_window);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
