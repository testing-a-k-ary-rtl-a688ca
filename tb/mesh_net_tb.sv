// mesh_net_tb: end-to-end test of the mesh of routers at its default size.
//
// Phase 1 applies single-packet tests to every router from the periphery of
// the network, one at a time: packets enter on a west-edge lane, are steered
// by their relative address to each router in turn, and leave either at that
// router's processing element or through the north or south edge.
// Phase 1b repeats this with the north edge stopped, as a blocking test of
// the routers at the north edge seen from the periphery.
// Phase 2 runs random traffic: every processing element injection channel and
// every edge input lane sends packets of random length to random
// destinations, including destinations beyond the edge of the mesh, while
// ejection channels and edge outputs raise stop at random.
//
// Each packet is a header, a data flit with the packet number, data flits
// derived from it and a tail. Every sink reassembles what it receives per lane
// (a lane carries one worm at a time) and checks the packet against the
// destination and final header worked out here by walking the
// dimension-order route. At the end every packet must have arrived once.
// The test also counts how often the mechanisms of the design happened and
// counts a failure for any that never did: x-to-y turns, both lanes of a
// virtual channel controller buffered at once, flits on lane 2 of a link,
// a request losing arbitration, a header waiting with both lanes busy,
// stop raised toward an injecting processing element and toward an edge
// sender, an ejection buffer held by the processing element, packets leaving
// and entering at the edge.
module mesh_net_tb;
  import router_pkg::*;

  localparam int K = 3;          // must match the mesh's default size
  localparam int N = K * K;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  [N-1:0][1:0] pe_in_valid, pe_in_stop, pe_in_empty, pe_out_valid, pe_out_stop;
  flit_t [N-1:0][1:0] pe_in_flit, pe_out_flit;
  link_fwd_t [K-1:0] west_in, west_out, east_in, east_out, south_in, south_out, north_in, north_out;
  link_bwd_t [K-1:0] west_in_bwd, west_out_bwd, east_in_bwd, east_out_bwd;
  link_bwd_t [K-1:0] south_in_bwd, south_out_bwd, north_in_bwd, north_out_bwd;

  mesh_net dut (.*);

  // ------------------------------------------------------------ sources
  // Source s: 0..2N-1 PE injection channels (node*2+ch); then edge lanes:
  // west, east, south, north, each K links x 2 lanes.
  localparam int SRC_EDGE = 2 * N;
  localparam int NSRC = 2 * N + 4 * K * 2;
  // Sinks: 0..N-1 PE nodes (both ejection channels), N.. edge outputs
  // (west, east, south, north) x K. Reassembly slots per sink: 2 lanes/channels.
  localparam int NSINK = N + 4 * K;

  flit_t txq[NSRC][$];
  logic  rr_w[K], rr_e[K], rr_s[K], rr_n[K];

  typedef struct {
    int    sink;
    flit_t head;   // header as it should arrive
    int    len;
    logic  done;
  } pkt_t;
  pkt_t pkts[$];

  function automatic logic [15:0] body(int id, int n);
    return 16'((id * 40503 + n * 2654435) >> 3);
  endfunction

  // Walk the dimension-order route from router (x, y); start_y tells whether
  // the packet enters at the y section (edge inputs of the y dimension).
  function automatic void walk(int x, int y, logic start_y, flit_t f,
                               output int sink, output flit_t fin);
    hdr_t h;
    h = hdr_t'(f.data);
    sink = -1;
    if (!start_y) begin
      while (h.xhops != 0 && sink < 0) begin
        h.xhops = h.xhops - 1;
        x = h.xdir ? x - 1 : x + 1;
        if (x < 0)  sink = N + 0 * K + y;
        if (x >= K) sink = N + 1 * K + y;
      end
    end
    if (sink < 0) begin
      while (h.yhops != 0 && sink < 0) begin
        h.yhops = h.yhops - 1;
        y = h.ydir ? y - 1 : y + 1;
        if (y < 0)  sink = N + 2 * K + x;
        if (y >= K) sink = N + 3 * K + x;
      end
    end
    if (sink < 0) sink = y * K + x;
    fin = f;
    fin.data = h;
  endfunction

  function automatic void src_pos(int s, output int x, output int y, output logic sy);
    int e, i;
    sy = 0;
    if (s < SRC_EDGE) begin x = (s / 2) % K; y = (s / 2) / K; return; end
    e = (s - SRC_EDGE) / (2 * K);
    i = ((s - SRC_EDGE) % (2 * K)) / 2;
    case (e)
      0: begin x = 0;     y = i; end
      1: begin x = K - 1; y = i; end
      2: begin x = i;     y = 0;     sy = 1; end
      default: begin x = i; y = K - 1; sy = 1; end
    endcase
  endfunction

  // Queue a packet on source s with the given header; returns its number.
  function automatic int send(int s, flit_t h, int len);
    int    x, y, sink, id;
    logic  sy;
    flit_t fin;
    pkt_t  p;
    src_pos(s, x, y, sy);
    walk(x, y, sy, h, sink, fin);
    id = pkts.size();
    p.sink = sink; p.head = fin; p.len = len; p.done = 0;
    pkts.push_back(p);
    txq[s].push_back(h);
    txq[s].push_back(make_data(16'(id)));
    for (int n = 2; n < len - 1; n++) txq[s].push_back(make_data(body(id, n)));
    txq[s].push_back(make_tail(body(id, len - 1)));
    return id;
  endfunction

  // ------------------------------------------------------------ sinks
  flit_t asm_q[NSINK][2][$];
  int    delivered = 0, edge_out_pkts = 0, edge_in_pkts = 0;
  logic  edge_stop_on = 0, pe_stop_on = 0, north_block = 0;
  int    n_blocked_tests = 0;

  task automatic take(int sink, int slot, flit_t f);
    asm_q[sink][slot].push_back(f);
    if (f.tail) begin
      flit_t q[$];
      int    id;
      q = asm_q[sink][slot];
      asm_q[sink][slot].delete();
      checks++;
      if (q.size() < 3 || !q[0].head) begin
        failures++; $display("sink %0d: malformed packet of %0d flits", sink, q.size());
        return;
      end
      id = int'(q[1].data);
      if (id >= pkts.size() || pkts[id].done) begin
        failures++; $display("sink %0d: unknown or repeated packet %0d", sink, id); return;
      end
      pkts[id].done = 1;
      delivered++;
      if (sink >= N) edge_out_pkts++;
      checks++;
      if (pkts[id].sink != sink) begin
        failures++; $display("packet %0d at sink %0d, expected %0d", id, sink, pkts[id].sink);
      end
      checks++;
      if (q[0] !== pkts[id].head) begin
        failures++; $display("packet %0d header %h expected %h", id, q[0], pkts[id].head);
      end
      checks++;
      if (q.size() != pkts[id].len) begin
        failures++; $display("packet %0d length %0d expected %0d", id, q.size(), pkts[id].len);
      end
      for (int n = 2; n < q.size(); n++) begin
        checks++;
        if (q[n].data !== body(id, n) || q[n].head) begin
          failures++; $display("packet %0d flit %0d corrupted", id, n);
        end
      end
    end
  endtask

  // ------------------------------------------------------ drive and sample
  task automatic drive(int s0, input link_bwd_t bwd, inout logic rr, output link_fwd_t l);
    l = LINK_IDLE;
    for (int t = 0; t < 2; t++) begin
      int ln;
      ln = rr ^ t;
      if (!l.valid && txq[s0 + ln].size() != 0 && !bwd.stop[ln]) begin
        l.valid = 1'b1;
        l.lane  = 1'(ln);
        l.flit  = txq[s0 + ln].pop_front();
        rr      = !rr;
      end
    end
  endtask

  int cyc = 0;
  int c_pe_stop = 0, c_edge_stop = 0, c_pe_hold = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < N; n++)
        for (int k = 0; k < 2; k++) begin
          pe_in_valid[n][k] = 1'b0;
          if (pe_in_stop[n][k]) c_pe_stop++;
          if (txq[2 * n + k].size() != 0 && !pe_in_stop[n][k]) begin
            pe_in_valid[n][k] = 1'b1;
            pe_in_flit[n][k]  = txq[2 * n + k].pop_front();
          end
          pe_out_stop[n][k] = pe_stop_on && ($urandom_range(0, 3) == 0);
        end
      for (int i = 0; i < K; i++) begin
        if (west_in_bwd[i].stop != 0 || east_in_bwd[i].stop != 0 ||
            south_in_bwd[i].stop != 0 || north_in_bwd[i].stop != 0) c_edge_stop++;
        drive(SRC_EDGE + 0 * 2 * K + 2 * i, west_in_bwd[i],  rr_w[i], west_in[i]);
        drive(SRC_EDGE + 1 * 2 * K + 2 * i, east_in_bwd[i],  rr_e[i], east_in[i]);
        drive(SRC_EDGE + 2 * 2 * K + 2 * i, south_in_bwd[i], rr_s[i], south_in[i]);
        drive(SRC_EDGE + 3 * 2 * K + 2 * i, north_in_bwd[i], rr_n[i], north_in[i]);
        west_out_bwd[i].stop  = edge_stop_on ? 2'($urandom_range(0, 3) == 0 ? $urandom : 0) : 2'b00;
        east_out_bwd[i].stop  = edge_stop_on ? 2'($urandom_range(0, 3) == 0 ? $urandom : 0) : 2'b00;
        south_out_bwd[i].stop = edge_stop_on ? 2'($urandom_range(0, 3) == 0 ? $urandom : 0) : 2'b00;
        north_out_bwd[i].stop = north_block ? 2'b11 :
                                edge_stop_on ? 2'($urandom_range(0, 3) == 0 ? $urandom : 0) : 2'b00;
        west_out_bwd[i].empty  = ~west_out_bwd[i].stop;
        east_out_bwd[i].empty  = ~east_out_bwd[i].stop;
        south_out_bwd[i].empty = ~south_out_bwd[i].stop;
        north_out_bwd[i].empty = ~north_out_bwd[i].stop;
      end
      #1;
      for (int n = 0; n < N; n++)
        for (int k = 0; k < 2; k++)
          if (pe_out_valid[n][k]) take(n, k, pe_out_flit[n][k]);
      for (int i = 0; i < K; i++) begin
        edge_sink(N + 0 * K + i, west_out[i],  west_out_bwd[i]);
        edge_sink(N + 1 * K + i, east_out[i],  east_out_bwd[i]);
        edge_sink(N + 2 * K + i, south_out[i], south_out_bwd[i]);
        edge_sink(N + 3 * K + i, north_out[i], north_out_bwd[i]);
      end
      cyc++;
    end
  end

  task automatic edge_sink(int sink, link_fwd_t l, link_bwd_t b);
    // the stop just driven is seen by the router one cycle later, so a flit
    // may still arrive on a lane whose stop was raised this cycle
    if (l.valid) take(sink, int'(l.lane), l.flit);
  endtask

  // ------------------------------------------------- mechanism counters
  int c_turn = 0, c_vc_both = 0, c_lane2 = 0, c_arb_lost = 0, c_lanes_busy = 0;

  for (genvar r = 0; r < K; r++) begin : g_r
    for (genvar c = 0; c < K; c++) begin : g_c
      always @(posedge clk) if (rst_n) begin
        c_turn    += $countones(dut.g_row[r].g_col[c].u_router.xy_valid &
                                dut.g_row[r].g_col[c].u_router.xy_ready);
        c_vc_both += int'(dut.g_row[r].g_col[c].u_router.u_x.u_vc_p.sb_valid)
                   + int'(dut.g_row[r].g_col[c].u_router.u_x.u_vc_n.sb_valid)
                   + int'(dut.g_row[r].g_col[c].u_router.u_y.u_vc_p.sb_valid)
                   + int'(dut.g_row[r].g_col[c].u_router.u_y.u_vc_n.sb_valid);
        c_lane2   += int'(dut.g_row[r].g_col[c].u_router.xp_out.valid && dut.g_row[r].g_col[c].u_router.xp_out.lane == 1'b1)
                   + int'(dut.g_row[r].g_col[c].u_router.yp_out.valid && dut.g_row[r].g_col[c].u_router.yp_out.lane == 1'b1)
                   + int'(dut.g_row[r].g_col[c].u_router.xn_out.valid && dut.g_row[r].g_col[c].u_router.xn_out.lane == 1'b1)
                   + int'(dut.g_row[r].g_col[c].u_router.yn_out.valid && dut.g_row[r].g_col[c].u_router.yn_out.lane == 1'b1);
        c_arb_lost += $countones(dut.g_row[r].g_col[c].u_router.u_x.u_rd.req & ~dut.g_row[r].g_col[c].u_router.u_x.u_rd.ack)
                    + $countones(dut.g_row[r].g_col[c].u_router.u_y.u_rd.req & ~dut.g_row[r].g_col[c].u_router.u_y.u_rd.ack);
        c_lanes_busy += int'(dut.g_row[r].g_col[c].u_router.u_x.u_rd.out_busy[1:0] == 2'b11)
                      + int'(dut.g_row[r].g_col[c].u_router.u_y.u_rd.out_busy[1:0] == 2'b11);
        if (pe_out_stop[r * K + c][0] && dut.g_row[r].g_col[c].u_router.g_b[0].u_b.full) c_pe_hold++;
        if (pe_out_stop[r * K + c][1] && dut.g_row[r].g_col[c].u_router.g_b[1].u_b.full) c_pe_hold++;
      end
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired, delivered %0d of %0d", delivered, pkts.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_all(int limit);
    int t = 0;
    while (delivered < pkts.size() && t < limit) begin @(posedge clk); t++; end
    checks++;
    if (delivered != pkts.size()) begin
      failures++; $display("only %0d of %0d packets delivered", delivered, pkts.size());
    end
  endtask

  function automatic flit_t rhead(logic xd, int xh, logic yd, int yh);
    return make_head(xd, 6'(xh), yd, 6'(yh));
  endfunction

  // --------------------------------------------------------------- test
  initial begin
    int id;
    pe_in_valid = '0; pe_in_flit = '0; pe_out_stop = '0;
    west_in = '0; east_in = '0; south_in = '0; north_in = '0;
    west_out_bwd = '0; east_out_bwd = '0; south_out_bwd = '0; north_out_bwd = '0;
    for (int i = 0; i < K; i++) begin rr_w[i] = 0; rr_e[i] = 0; rr_s[i] = 0; rr_n[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Phase 1: test each router from the west edge, one packet at a time.
    for (int y = 0; y < K; y++)
      for (int x = 0; x < K; x++)
        for (int lane = 0; lane < 2; lane++) begin
          int s;
          s = SRC_EDGE + 2 * y + lane;
          // to the router's own processing element
          id = send(s, rhead(0, x, 0, 0), 4);
          wait_all(300);
          // through the router toward the north edge
          id = send(s, rhead(0, x, 0, K - y), 3);
          wait_all(300);
          // through the router toward the south edge
          id = send(s, rhead(0, x, 1, y + 1), 3);
          wait_all(300);
        end
    // Phase 1b: blocking test in the network. The north edge lanes of each
    // column are stopped; a packet steered there from the west edge must not
    // leave while stopped and must leave once the edge is freed.
    for (int x = 0; x < K; x++) begin
      int n_done;
      north_block = 1;
      id = send(SRC_EDGE + 2 * (K - 1), rhead(0, x, 0, 1), 4);
      n_done = delivered;
      repeat (60) @(posedge clk);
      checks++;
      if (delivered != n_done || asm_q[N + 3 * K + x][0].size() != 0) begin
        failures++; $display("packet left a blocked edge at column %0d", x);
      end
      north_block = 0;
      wait_all(300);
      n_blocked_tests++;
    end
    edge_in_pkts = pkts.size();

    // Phase 2: random traffic with random stops at the sinks.
    edge_stop_on = 1;
    pe_stop_on   = 1;
    for (int round = 0; round < 6; round++) begin
      for (int s = 0; s < NSRC; s++) begin
        int x, y, tx, ty, len;
        logic sy;
        src_pos(s, x, y, sy);
        for (int p = 0; p < 3; p++) begin
          len = $urandom_range(3, 8);
          // destination column -1..K (beyond the edge leaves the mesh)
          tx = sy ? x : $urandom_range(0, K + 1) - 1;
          ty = $urandom_range(0, K + 1) - 1;
          if (s >= SRC_EDGE && !sy) begin
            // entering on an x edge: start one column outside
            if ((s - SRC_EDGE) / (2 * K) == 0) x = -1; else x = K;
            if (tx == x) tx = (x < 0) ? 0 : K - 1;
          end
          if (sy) begin
            if ((s - SRC_EDGE) / (2 * K) == 2) y = -1; else y = K;
            if (ty == y) ty = (y < 0) ? 0 : K - 1;
          end
          id = send(s, rhead(tx < x, (tx < x) ? x - tx : tx - x,
                             ty < y, (ty < y) ? y - ty : ty - y), len);
          src_pos(s, x, y, sy);
        end
      end
      repeat (200) @(posedge clk);
    end
    wait_all(20000);
    edge_stop_on = 0;
    pe_stop_on = 0;
    repeat (20) @(posedge clk);

    $display("packets %0d delivered %0d (edge out %0d)", pkts.size(), delivered, edge_out_pkts);
    $display("turns %0d vc_both %0d lane2 %0d arb_lost %0d lanes_busy %0d pe_stop %0d edge_stop %0d pe_hold %0d",
             c_turn, c_vc_both, c_lane2, c_arb_lost, c_lanes_busy, c_pe_stop, c_edge_stop, c_pe_hold);
    checks++; if (c_turn == 0)       begin failures++; $display("no x-to-y turn"); end
    checks++; if (c_vc_both == 0)    begin failures++; $display("no VC with two flits collected"); end
    checks++; if (c_lane2 == 0)      begin failures++; $display("no lane 2 traffic"); end
    checks++; if (c_arb_lost == 0)   begin failures++; $display("no lost arbitration"); end
    checks++; if (c_lanes_busy == 0) begin failures++; $display("never both lanes busy"); end
    checks++; if (c_pe_stop == 0)    begin failures++; $display("no stop toward a PE"); end
    checks++; if (c_edge_stop == 0)  begin failures++; $display("no stop toward an edge sender"); end
    checks++; if (c_pe_hold == 0)    begin failures++; $display("no ejection buffer held"); end
    checks++; if (n_blocked_tests != K) begin failures++; $display("edge blocking tests missing"); end
    checks++; if (edge_out_pkts == 0 || edge_in_pkts == 0) begin failures++; $display("no edge traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
