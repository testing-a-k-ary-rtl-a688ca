// ifc_tb: self-checking test of the internal flow controller.
//
// Streams random packets (header, data, tail) through the x-dimension and
// the y-dimension instance with random valid and ready. Checks order and
// content, the relative-address update of header flits (the hop count of the
// instance's own dimension drops by one unless it is already zero, the other
// fields are untouched), the unchanged head_flit view and the tail_sent
// pulse.
module ifc_tb;
  import router_pkg::*;

  logic  clk = 0, rst_n = 0;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic  [1:0] in_valid, in_ready, out_valid, out_ready, tail_sent;
  flit_t [1:0] in_flit, out_flit, head_flit;

  ifc #(.DIM(0)) dut_x (.clk, .rst_n, .in_valid(in_valid[0]), .in_flit(in_flit[0]),
    .in_ready(in_ready[0]), .out_valid(out_valid[0]), .out_flit(out_flit[0]),
    .out_ready(out_ready[0]), .head_flit(head_flit[0]), .tail_sent(tail_sent[0]));
  ifc #(.DIM(1)) dut_y (.clk, .rst_n, .in_valid(in_valid[1]), .in_flit(in_flit[1]),
    .in_ready(in_ready[1]), .out_valid(out_valid[1]), .out_flit(out_flit[1]),
    .out_ready(out_ready[1]), .head_flit(head_flit[1]), .tail_sent(tail_sent[1]));

  flit_t q0[$], q1[$];
  hdr_t  eh;
  logic [1:0] acc;
  int    tails = 0, heads = 0, zero_heads = 0;

  function automatic flit_t expect_out(flit_t f, int dim);
    hdr_t h;
    if (!f.head) return f;
    h = hdr_t'(f.data);
    if (dim == 0 && h.xhops != 0) h.xhops = h.xhops - 1;
    if (dim == 1 && h.yhops != 0) h.yhops = h.yhops - 1;
    f.data = h;
    return f;
  endfunction

  function automatic flit_t rand_flit(int k);
    case (k % 3)
      0: return make_head($urandom_range(0,1), ($urandom_range(0,3)==0) ? 6'd0 : 6'($urandom),
                          $urandom_range(0,1), ($urandom_range(0,3)==0) ? 6'd0 : 6'($urandom));
      1: return make_data(16'($urandom));
      default: return make_tail(16'($urandom));
    endcase
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k0 = 0, k1 = 0;
  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      out_ready[0] = $urandom_range(0,2) != 0;
      out_ready[1] = $urandom_range(0,2) != 0;
      if (!in_valid[0]) begin in_valid[0] = $urandom_range(0,1); in_flit[0] = rand_flit(k0); end
      if (!in_valid[1]) begin in_valid[1] = $urandom_range(0,1); in_flit[1] = rand_flit(k1); end
      #1;
      for (int d = 0; d < 2; d++) begin
        if (out_valid[d]) begin
          flit_t exp_f;
          exp_f = (d == 0) ? q0[0] : q1[0];
          checks++;
          if (head_flit[d] !== exp_f) begin failures++; $display("head_flit mismatch d=%0d", d); end
          checks++;
          if (tail_sent[d] !== (out_ready[d] && exp_f.tail)) begin failures++; $display("tail_sent mismatch"); end
          if (out_ready[d]) begin
            checks++;
            if (out_flit[d] !== expect_out(exp_f, d)) begin
              failures++; $display("out mismatch d=%0d got %h exp %h", d, out_flit[d], expect_out(exp_f, d));
            end
            if (exp_f.tail) tails++;
            if (exp_f.head) begin
              heads++;
              eh = hdr_t'(exp_f.data);
              if ((d == 0 && eh.xhops == 0) || (d == 1 && eh.yhops == 0)) zero_heads++;
            end
            if (d == 0) void'(q0.pop_front()); else void'(q1.pop_front());
          end
        end else begin
          checks++;
          if (tail_sent[d]) begin failures++; $display("tail_sent while empty"); end
        end
      end
      acc = in_valid & in_ready;
      @(posedge clk);
      #1;
      if (acc[0]) begin q0.push_back(in_flit[0]); k0++; in_valid[0] = 0; end
      if (acc[1]) begin q1.push_back(in_flit[1]); k1++; in_valid[1] = 0; end
    end
    checks++;
    if (tails < 50 || heads < 50 || zero_heads < 5) begin failures++; $display("too few packets"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
