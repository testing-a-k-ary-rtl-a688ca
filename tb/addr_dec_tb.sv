// addr_dec_tb: self-checking test of the address decoder.
//
// For the x and the y instance, applies every direction bit and every hop
// count 0..63 of the own dimension (with random values in the other fields)
// and checks the decoded destination: zero hops -> local pair, otherwise the
// positive or negative output by the direction bit. Checks that a request is
// raised only for a waiting header, that it drops after the acknowledgment
// and stays down until the tail has left, and that data flits raise none.
module addr_dec_tb;
  import router_pkg::*;

  logic  clk = 0, rst_n = 0;
  int    checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic  [1:0] flit_valid, ack, tail_sent, req, connected;
  flit_t [1:0] flit;
  dest_e [1:0] dest;

  for (genvar d = 0; d < 2; d++) begin : g_dut
    addr_dec #(.DIM(d)) dut (.clk, .rst_n, .flit_valid(flit_valid[d]), .flit(flit[d]),
      .ack(ack[d]), .tail_sent(tail_sent[d]), .req(req[d]), .dest(dest[d]),
      .connected(connected[d]));
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_valid = 0; ack = 0; tail_sent = 0; flit = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int d = 0; d < 2; d++) begin
      for (int dir = 0; dir < 2; dir++) begin
        for (int hops = 0; hops < 64; hops++) begin
          dest_e exp_d;
          logic [HOP_W-1:0] other;
          other = 6'($urandom);
          exp_d = (hops == 0) ? DEST_LOC : (dir ? DEST_N : DEST_P);
          @(negedge clk);
          flit_valid[d] = 1;
          flit[d] = (d == 0) ? make_head(dir[0], 6'(hops), $urandom_range(0,1), other)
                             : make_head($urandom_range(0,1), other, dir[0], 6'(hops));
          #1;
          chk(req[d] === 1'b1, "request for a waiting header");
          chk(dest[d] === exp_d, $sformatf("dest d=%0d dir=%0d hops=%0d got %0d", d, dir, hops, dest[d]));
          ack[d] = 1;
          @(negedge clk);
          ack[d] = 0;
          #1;
          chk(connected[d] === 1'b1 && req[d] === 1'b0, "request dropped after ack");
          // body flits: no request while connected
          flit[d] = make_data(16'($urandom));
          @(negedge clk);
          chk(req[d] === 1'b0, "no request for data flit");
          flit[d] = make_tail(16'($urandom));
          tail_sent[d] = 1;
          @(negedge clk);
          tail_sent[d] = 0;
          flit_valid[d] = 0;
          #1;
          chk(connected[d] === 1'b0, "released after tail");
          chk(req[d] === 1'b0, "no request without a flit");
        end
      end
    end
    // a data flit with no connection raises no request
    @(negedge clk);
    flit_valid = 2'b11; flit[0] = make_data(16'hffff); flit[1] = make_tail(16'h0);
    #1;
    chk(req === 2'b00, "no request for non-header flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
