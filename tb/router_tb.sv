// router_tb: functional tests of one router.
//
// The test bench surrounds the router with flit sources on every input lane
// and flit sinks on every output lane, and runs these functional tests:
//  1. Non-blocking tests on every input lane of the x section: headers with
//     every x hop count 0..63 and y = 0 followed by a tail, headers with x = 0
//     and a random y, and header / all-ones / all-zeros / tail packets; the
//     same sweep over y = 0..63 on the Yp and Yn lanes; single-flit packets.
//     Each packet must arrive complete and in order at the output lane
//     predicted by dimension-order routing, with the header hop count of the
//     crossed dimension decremented.
//  2. Blocking tests on both lanes of Xp: the destination output is blocked,
//     by giving both its lanes to packets from the processing element or by
//     raising the downstream stop bits; the flit under test must not appear
//     while blocked and must appear after the output is freed.
//  3. Arbitration and allocation tests: four headers wait for the xtoy
//     destination while both its lanes are held; lanes are freed one at a time
//     (the waiting header of the highest-priority input lane must go first)
//     or both at once (the two highest-priority headers must take lane 1 and
//     lane 2).
//  4. Virtual channel test: packets on both lanes of Xp toward the Xp output
//     wait behind a raised stop; when freed both lanes must interleave on the
//     link and each lane's flits must be intact.
//  5. Crossbar connection tests: a header from each of the six x input lanes
//     to lane 1 and lane 2 of each x output destination (Xp, Xn, xtoy), lane 2
//     being reached by first occupying lane 1 from the channel's other lane.
// The router's latency for a header on a free path (input link to output
// link) is checked against its five-cycle design value.
module router_tb;
  import router_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  // DUT ports
  logic  [1:0] pe_in_valid, pe_in_stop, pe_in_empty, pe_out_valid, pe_out_stop;
  flit_t [1:0] pe_in_flit, pe_out_flit;
  link_fwd_t xp_in, xn_in, yp_in, yn_in, xp_out, xn_out, yp_out, yn_out;
  link_bwd_t xp_in_bwd, xn_in_bwd, yp_in_bwd, yn_in_bwd;
  link_bwd_t xp_out_bwd, xn_out_bwd, yp_out_bwd, yn_out_bwd;

  router dut (.*);

  // Input channels: 0 fromPE1, 1 fromPE2, 2 Xp, 3 Xn, 4 Yp, 5 Yn.
  // Output channels: 0 Xp, 1 Xn, 2 Yp, 3 Yn, 4 toPE1, 5 toPE2.
  localparam int I_PE1 = 0, I_PE2 = 1, I_XP = 2, I_XN = 3, I_YP = 4, I_YN = 5;
  localparam int O_XP = 0, O_XN = 1, O_YP = 2, O_YN = 3, O_PE = 4;

  flit_t txq[6][2][$];
  flit_t rxq[6][2][$];
  int    rx_time[6][2][$];
  logic  [1:0] ostop[4];
  int    cycle = 0;
  logic  rr[6];

  // ---------------------------------------------------------------- driver
  task automatic drive_link(int ch, input link_bwd_t bwd, output link_fwd_t l);
    l = LINK_IDLE;
    for (int t = 0; t < 2; t++) begin
      int ln;
      ln = rr[ch] ^ t;
      if (!l.valid && txq[ch][ln].size() != 0 && !bwd.stop[ln]) begin
        l.valid = 1'b1;
        l.lane  = 1'(ln);
        l.flit  = txq[ch][ln].pop_front();
        rr[ch]  = !rr[ch];
      end
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        pe_in_valid[k] = 1'b0;
        if (txq[k][0].size() != 0 && !pe_in_stop[k]) begin
          pe_in_valid[k] = 1'b1;
          pe_in_flit[k]  = txq[k][0].pop_front();
        end
      end
      drive_link(I_XP, xp_in_bwd, xp_in);
      drive_link(I_XN, xn_in_bwd, xn_in);
      drive_link(I_YP, yp_in_bwd, yp_in);
      drive_link(I_YN, yn_in_bwd, yn_in);
      xp_out_bwd = '{stop: ostop[0], empty: ~ostop[0]};
      xn_out_bwd = '{stop: ostop[1], empty: ~ostop[1]};
      yp_out_bwd = '{stop: ostop[2], empty: ~ostop[2]};
      yn_out_bwd = '{stop: ostop[3], empty: ~ostop[3]};
      #1;
      sink(O_XP, xp_out);
      sink(O_XN, xn_out);
      sink(O_YP, yp_out);
      sink(O_YN, yn_out);
      for (int k = 0; k < 2; k++)
        if (pe_out_valid[k]) begin
          rxq[O_PE + k][0].push_back(pe_out_flit[k]);
          rx_time[O_PE + k][0].push_back(cycle);
        end
      cycle++;
    end
  end

  task automatic sink(int ch, link_fwd_t l);
    if (l.valid) begin
      checks++;
      if (ch < 4 && ostop[ch][l.lane]) begin
        failures++; $display("flit sent on stopped lane %0d.%0d", ch, l.lane);
      end
      rxq[ch][l.lane].push_back(l.flit);
      rx_time[ch][l.lane].push_back(cycle);
    end
  endtask

  // --------------------------------------------------------------- helpers
  function automatic int rx_total();
    int n = 0;
    for (int c = 0; c < 6; c++) for (int l = 0; l < 2; l++) n += rxq[c][l].size();
    return n;
  endfunction

  function automatic flit_t hdr(int xdir, int xh, int ydir, int yh, int tag = 0);
    flit_t f;
    hdr_t  h;
    f = make_head(1'(xdir), 6'(xh), 1'(ydir), 6'(yh));
    h = hdr_t'(f.data);
    h.spare = 2'(tag);
    f.data = h;
    return f;
  endfunction

  // Output channel and updated header for a header flit entering the router.
  function automatic void route(flit_t f, output int och, output flit_t upd);
    hdr_t h;
    h = hdr_t'(f.data);
    if (h.xhops != 0) begin
      och = h.xdir ? O_XN : O_XP; h.xhops = h.xhops - 1;
    end else if (h.yhops != 0) begin
      och = h.ydir ? O_YN : O_YP; h.yhops = h.yhops - 1;
    end else och = O_PE;
    upd = f;
    upd.data = h;
  endfunction

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  task automatic wait_rx(int och, int lane, int n, int limit = 200);
    int t = 0;
    while (rxq[och][lane].size() < n && t < limit) begin @(posedge clk); t++; end
    chk(rxq[och][lane].size() >= n, $sformatf("timeout waiting for %0d flits on %0d.%0d", n, och, lane));
  endtask

  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  // Send a whole packet on one input lane and check it at the output.
  task automatic packet(int ich, int lane, flit_t pkt[$], int olane = 0);
    int    och;
    flit_t upd;
    int    n_before;
    route(pkt[0], och, upd);
    n_before = rx_total();
    foreach (pkt[n]) txq[ich][lane].push_back(pkt[n]);
    wait_rx(och, olane, pkt.size());
    idle(4);
    chk(rx_total() == n_before + pkt.size(), "flits appeared at another output");
    foreach (pkt[n]) begin
      flit_t e;
      e = (n == 0) ? upd : pkt[n];
      chk(rxq[och][olane].size() != 0 && rxq[och][olane][0] === e,
          $sformatf("packet flit %0d at output %0d.%0d", n, och, olane));
      if (rxq[och][olane].size() != 0) begin
        void'(rxq[och][olane].pop_front());
        void'(rx_time[och][olane].pop_front());
      end
    end
  endtask

  task automatic expect_flit(int och, int lane, flit_t e, string what);
    wait_rx(och, lane, 1);
    chk(rxq[och][lane].size() != 0 && rxq[och][lane][0] === e, what);
    if (rxq[och][lane].size() != 0) begin
      void'(rxq[och][lane].pop_front());
      void'(rx_time[och][lane].pop_front());
    end
  endtask

  task automatic expect_none(int n, string what);
    int n_before;
    n_before = rx_total();
    idle(n);
    chk(rx_total() == n_before, what);
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- tests
  initial begin
    flit_t pkt[$];
    flit_t f, u;
    int    och, t0;
    pe_in_valid = '0; pe_in_flit = '0; pe_out_stop = '0;
    xp_in = LINK_IDLE; xn_in = LINK_IDLE; yp_in = LINK_IDLE; yn_in = LINK_IDLE;
    xp_out_bwd = LINK_OPEN; xn_out_bwd = LINK_OPEN; yp_out_bwd = LINK_OPEN; yn_out_bwd = LINK_OPEN;
    foreach (ostop[c]) ostop[c] = 2'b00;
    foreach (rr[c]) rr[c] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    idle(2);

    // Latency of a header on a free path: Xp input link to Xp output link.
    begin
      int sent_at;
      @(negedge clk);
      txq[I_XP][0].push_back(hdr(0, 5, 0, 0));
      sent_at = cycle;             // driven in this cycle's negedge slot
      wait_rx(O_XP, 0, 1);
      chk(rx_time[O_XP][0][0] - sent_at == 5,
          $sformatf("header latency %0d cycles, expected 5", rx_time[O_XP][0][0] - sent_at));
      void'(rxq[O_XP][0].pop_front()); void'(rx_time[O_XP][0].pop_front());
      txq[I_XP][0].push_back(make_tail(16'h0));
      wait_rx(O_XP, 0, 1);
      void'(rxq[O_XP][0].pop_front()); void'(rx_time[O_XP][0].pop_front());
      idle(3);
    end

    // 1. non-blocking tests on every input lane of the x
    //    section (fromPE1, fromPE2, Xp1, Xp2, Xn1, Xn2), then the same sweep
    //    over the y hop count on the y section's link lanes (Yp, Yn).
    for (int il = 0; il < 6; il++) begin
      int ich, k, dir;
      ich = (il < 2) ? il : (il < 4 ? I_XP : I_XN);
      k   = (il < 2) ? 0 : (il % 2);
      for (int j = 0; j < 64; j++) begin
        dir = (ich == I_XN) ? 1 : (ich == I_XP) ? 0 : (j % 2);
        pkt = {hdr(dir, j, 0, 0), make_tail(16'(j))};
        packet(ich, k, pkt);
        pkt = {hdr(dir, 0, $urandom_range(0, 1), $urandom_range(1, 63)), make_tail(16'(j))};
        packet(ich, k, pkt);
        pkt = {hdr(dir, $urandom_range(1, 63), 0, 0), make_data(16'hffff), make_data(16'h0000),
               make_tail(16'(j))};
        packet(ich, k, pkt);
      end
    end
    for (int il = 0; il < 4; il++) begin
      int ich, k, dir;
      ich = (il < 2) ? I_YP : I_YN;
      k   = il % 2;
      dir = (ich == I_YN) ? 1 : 0;
      for (int j = 0; j < 64; j++) begin
        pkt = {hdr(0, 0, dir, j), make_tail(16'(j))};
        packet(ich, k, pkt);
        pkt = {hdr(0, 0, dir, $urandom_range(1, 63)), make_data(16'hffff), make_data(16'h0000),
               make_tail(16'(j))};
        packet(ich, k, pkt);
      end
    end

    // Single-flit packets (head and tail in one flit) on both Xp lanes.
    for (int k = 0; k < 2; k++)
      for (int j = 0; j < 3; j++) begin
        f = hdr(0, j, 0, 0);
        f.tail = 1'b1;
        pkt = {f};
        packet(I_XP, k, pkt);
      end

    // 2. Blocking tests on Xp lanes 1 and 2.
    for (int k = 0; k < 2; k++) begin
      // block(i) w.r.t. Xp: both Xp output lanes held by PE packets
      txq[I_PE1][0].push_back(hdr(0, 3, 0, 0, 1));
      expect_flit(O_XP, 0, hdr(0, 2, 0, 0, 1), "PE1 holds Xp lane 1");
      txq[I_PE2][0].push_back(hdr(0, 3, 0, 0, 2));
      expect_flit(O_XP, 1, hdr(0, 2, 0, 0, 2), "PE2 holds Xp lane 2");
      f = hdr(0, 9, 0, 0, 3);
      txq[I_XP][k].push_back(f);
      expect_none(40, "blocked header stays in the router");
      // free(i): release lane 1
      txq[I_PE1][0].push_back(make_tail(16'h1));
      expect_flit(O_XP, 0, make_tail(16'h1), "PE1 tail");
      expect_flit(O_XP, 0, hdr(0, 8, 0, 0, 3), "freed header on Xp lane 1");
      txq[I_PE2][0].push_back(make_tail(16'h2));
      expect_flit(O_XP, 1, make_tail(16'h2), "PE2 tail");
      // block(i) with the downstream stop for data and tail flits
      pkt = {make_data(16'hffff), make_data(16'h0000), make_tail(16'h5a5a)};
      foreach (pkt[n]) begin
        ostop[0] = 2'b11;
        idle(2);
        txq[I_XP][k].push_back(pkt[n]);
        expect_none(30, "blocked flit stays in the router");
        ostop[0] = 2'b00;
        expect_flit(O_XP, 0, pkt[n], "freed flit");
      end
      // block(i) w.r.t. xtoy: both xtoy lanes held by PE packets for toPE
      txq[I_PE1][0].push_back(hdr(0, 0, 0, 0, 1));
      expect_flit(O_PE, 0, hdr(0, 0, 0, 0, 1), "PE1 holds xtoy1 and toPE1");
      txq[I_PE2][0].push_back(hdr(0, 0, 0, 0, 2));
      expect_flit(O_PE + 1, 0, hdr(0, 0, 0, 0, 2), "PE2 holds xtoy2 and toPE2");
      txq[I_XP][k].push_back(hdr(0, 0, 0, 4, 3));
      expect_none(40, "header blocked on xtoy");
      txq[I_PE1][0].push_back(make_tail(16'h1));
      txq[I_PE2][0].push_back(make_tail(16'h2));
      expect_flit(O_PE, 0, make_tail(16'h1), "PE1 tail at toPE1");
      expect_flit(O_PE + 1, 0, make_tail(16'h2), "PE2 tail at toPE2");
      expect_flit(O_YP, 0, hdr(0, 0, 0, 3, 3), "freed header turns to Yp");
      txq[I_XP][k].push_back(make_tail(16'h3));
      expect_flit(O_YP, 0, make_tail(16'h3), "tail follows on Yp");
    end

    // 3. Arbitration and allocation on the xtoy destination.
    for (int mode = 0; mode < 2; mode++) begin
      // holders: Xn lanes 1 and 2, bound for toPE
      txq[I_XN][0].push_back(hdr(0, 0, 0, 0, 0));
      expect_flit(O_PE, 0, hdr(0, 0, 0, 0, 0), "Xn1 holder");
      txq[I_XN][1].push_back(hdr(0, 0, 0, 0, 0));
      expect_flit(O_PE + 1, 0, hdr(0, 0, 0, 0, 0), "Xn2 holder");
      // contenders, tagged by priority rank, sent in reverse priority order
      txq[I_XP][1].push_back(hdr(0, 0, 0, 0, 3));
      idle(3);
      txq[I_XP][0].push_back(hdr(0, 0, 0, 0, 2));
      idle(3);
      txq[I_PE2][0].push_back(hdr(0, 0, 0, 0, 1));
      idle(3);
      txq[I_PE1][0].push_back(hdr(0, 0, 0, 0, 0));
      expect_none(30, "contenders wait");
      if (mode == 0) begin
        // incorrect arbitration test: free lane 1 only
        txq[I_XN][0].push_back(make_tail(16'h10));
        expect_flit(O_PE, 0, make_tail(16'h10), "Xn1 holder tail");
        expect_flit(O_PE, 0, hdr(0, 0, 0, 0, 0), "highest priority (fromPE1) wins lane 1");
        expect_none(20, "others still wait");
        txq[I_XN][1].push_back(make_tail(16'h11));
        expect_flit(O_PE + 1, 0, make_tail(16'h11), "Xn2 holder tail");
        expect_flit(O_PE + 1, 0, hdr(0, 0, 0, 0, 1), "next priority (fromPE2) wins lane 2");
      end else begin
        // incorrect allocation test: free both lanes together
        txq[I_XN][0].push_back(make_tail(16'h10));
        txq[I_XN][1].push_back(make_tail(16'h11));
        expect_flit(O_PE, 0, make_tail(16'h10), "Xn1 holder tail");
        expect_flit(O_PE + 1, 0, make_tail(16'h11), "Xn2 holder tail");
        expect_flit(O_PE, 0, hdr(0, 0, 0, 0, 0), "fromPE1 on lane 1");
        expect_flit(O_PE + 1, 0, hdr(0, 0, 0, 0, 1), "fromPE2 on lane 2");
      end
      // release in turn; the Xp lanes follow
      txq[I_PE1][0].push_back(make_tail(16'h20));
      expect_flit(O_PE, 0, make_tail(16'h20), "fromPE1 tail");
      expect_flit(O_PE, 0, hdr(0, 0, 0, 0, 2), "Xp1 next");
      txq[I_PE2][0].push_back(make_tail(16'h21));
      expect_flit(O_PE + 1, 0, make_tail(16'h21), "fromPE2 tail");
      expect_flit(O_PE + 1, 0, hdr(0, 0, 0, 0, 3), "Xp2 last");
      txq[I_XP][0].push_back(make_tail(16'h22));
      txq[I_XP][1].push_back(make_tail(16'h23));
      expect_flit(O_PE, 0, make_tail(16'h22), "Xp1 tail");
      expect_flit(O_PE + 1, 0, make_tail(16'h23), "Xp2 tail");
      idle(5);
    end

    // 4. Virtual channel controller: both Xp lanes to the Xp output.
    begin
      int first_t, last_t;
      ostop[0] = 2'b11;
      idle(2);
      for (int k = 0; k < 2; k++) begin
        txq[I_XP][k].push_back(hdr(0, 7, 0, 0, k));
        for (int n = 0; n < 4; n++) txq[I_XP][k].push_back(make_data(16'(k * 256 + n)));
        txq[I_XP][k].push_back(make_tail(16'(k)));
      end
      expect_none(40, "VC holds both lanes while stopped");
      ostop[0] = 2'b00;
      wait_rx(O_XP, 0, 6);
      wait_rx(O_XP, 1, 6);
      first_t = rx_time[O_XP][0][0];
      last_t  = rx_time[O_XP][0][5];
      // both lanes interleave: lane 2 starts before lane 1 finishes
      chk(rx_time[O_XP][1][0] < last_t, "lanes interleave on the link");
      for (int k = 0; k < 2; k++) begin
        chk(rxq[O_XP][k][0] === hdr(0, 6, 0, 0, k), "VC header");
        for (int n = 0; n < 4; n++)
          chk(rxq[O_XP][k][n + 1] === make_data(16'(k * 256 + n)), "VC data");
        chk(rxq[O_XP][k][5] === make_tail(16'(k)), "VC tail");
        rxq[O_XP][k].delete();
        rx_time[O_XP][k].delete();
      end
    end

    // 5. Crossbar connection tests: every x input lane to every lane of every
    //    x output destination. Lane 2 is reached by first giving lane 1 to a
    //    header from the other lane of the same input channel.
    for (int il = 0; il < 6; il++) begin
      for (int j = 0; j < 3; j++) begin
        for (int l = 0; l < 2; l++) begin
          int ich, ilane, och_, ich2, ilane2;
          flit_t h, hu, h2, h2u;
          ich   = (il < 2) ? il : (il < 4 ? I_XP : I_XN);
          ilane = (il < 2) ? 0 : (il % 2);
          ich2  = (il < 2) ? (1 - il) : ich;
          ilane2 = (il < 2) ? 0 : 1 - ilane;
          case (j)
            0: begin h = hdr(0, 2, 0, 0, 1); h2 = hdr(0, 2, 0, 0, 2); och_ = O_XP; end
            1: begin h = hdr(1, 2, 0, 0, 1); h2 = hdr(1, 2, 0, 0, 2); och_ = O_XN; end
            default: begin h = hdr(0, 0, 0, 0, 1); h2 = hdr(0, 0, 0, 0, 2); och_ = O_PE; end
          endcase
          route(h, och, hu);
          route(h2, och, h2u);
          if (l == 1) begin
            txq[ich2][ilane2].push_back(h2);
            if (och_ == O_PE) expect_flit(O_PE, 0, h2u, "occupant on lane 1");
            else              expect_flit(och_, 0, h2u, "occupant on lane 1");
          end
          txq[ich][ilane].push_back(h);
          if (och_ == O_PE) expect_flit(O_PE + l, 0, hu, $sformatf("input %0d to dest %0d lane %0d", il, j, l + 1));
          else              expect_flit(och_, l, hu, $sformatf("input %0d to dest %0d lane %0d", il, j, l + 1));
          txq[ich][ilane].push_back(make_tail(16'h77));
          if (och_ == O_PE) expect_flit(O_PE + l, 0, make_tail(16'h77), "tail");
          else              expect_flit(och_, l, make_tail(16'h77), "tail");
          if (l == 1) begin
            txq[ich2][ilane2].push_back(make_tail(16'h66));
            if (och_ == O_PE) expect_flit(O_PE, 0, make_tail(16'h66), "occupant tail");
            else              expect_flit(och_, 0, make_tail(16'h66), "occupant tail");
          end
          idle(3);
        end
      end
    end

    idle(5);
    chk(rx_total() == 0, "no stray flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
