// route_dec_tb: self-checking test of the routing decision block.
//
// A reference model of arbitration (lowest input lane index wins per
// destination), lane allocation (lane 1 of the destination before lane 2,
// none if both busy), connection set-up and release on the tail is run next
// to the block. Random requests come only from unconnected input lanes and
// tails only from connected ones, as the address decoders and internal flow
// controllers would produce them. Every cycle the acknowledgments, the
// connection table and the output lane status are compared. Counts how often
// a request lost arbitration, got lane 2 and found both lanes busy.
module route_dec_tb;
  import router_pkg::*;

  localparam int NI = 6, NO = 6;
  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  [NI-1:0] req, tail_sent, ack, conn_valid;
  dest_e [NI-1:0] dest;
  logic  [NI-1:0][2:0] conn_out;
  logic  [NO-1:0] out_busy;
  logic  [NO-1:0][2:0] out_owner;

  route_dec dut (.*);

  // reference state
  logic m_conn [NI];
  int   m_out  [NI];
  logic m_busy [NO];
  int   m_own  [NO];
  logic e_ack  [NI];
  int   lost = 0, lane2 = 0, blocked = 0, released = 0;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; tail_sent = '0; dest = '0;
    foreach (m_conn[i]) begin m_conn[i] = 0; m_out[i] = 0; end
    foreach (m_busy[o]) begin m_busy[o] = 0; m_own[o] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i]       = !m_conn[i] && ($urandom_range(0, 2) != 0);
        dest[i]      = dest_e'($urandom_range(0, 2));
        tail_sent[i] = m_conn[i] && ($urandom_range(0, 5) == 0);
      end
      // reference arbitration and allocation
      foreach (e_ack[i]) e_ack[i] = 0;
      for (int d = 0; d < 3; d++) begin
        int w;
        w = -1;
        for (int i = NI - 1; i >= 0; i--) if (req[i] && int'(dest[i]) == d) w = i;
        for (int i = 0; i < NI; i++) if (req[i] && int'(dest[i]) == d && i != w) lost++;
        if (w >= 0) begin
          if (!m_busy[2*d]) begin e_ack[w] = 1; m_out[w] = 2*d; end
          else if (!m_busy[2*d+1]) begin e_ack[w] = 1; m_out[w] = 2*d+1; lane2++; end
          else blocked++;
        end
      end
      #1;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (ack[i] !== e_ack[i]) begin failures++; $display("cyc %0d ack[%0d] got %b exp %b", cyc, i, ack[i], e_ack[i]); end
      end
      @(posedge clk);
      #1;
      // reference update: release, then grants
      for (int i = 0; i < NI; i++)
        if (m_conn[i] && tail_sent[i]) begin m_conn[i] = 0; m_busy[m_out[i]] = 0; released++; end
      for (int i = 0; i < NI; i++)
        if (e_ack[i]) begin m_conn[i] = 1; m_busy[m_out[i]] = 1; m_own[m_out[i]] = i; end
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (conn_valid[i] !== m_conn[i] || (m_conn[i] && int'(conn_out[i]) != m_out[i])) begin
          failures++; $display("cyc %0d connection of input %0d", cyc, i);
        end
      end
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_busy[o] !== m_busy[o] || (m_busy[o] && int'(out_owner[o]) != m_own[o])) begin
          failures++; $display("cyc %0d status of output %0d", cyc, o);
        end
      end
    end
    checks++;
    if (lost == 0 || lane2 == 0 || blocked == 0 || released == 0) begin
      failures++; $display("coverage lost=%0d lane2=%0d blocked=%0d released=%0d", lost, lane2, blocked, released);
    end
    $display("lost=%0d lane2=%0d blocked=%0d released=%0d", lost, lane2, blocked, released);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
