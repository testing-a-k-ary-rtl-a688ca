// crossbar_tb: self-checking test of the crossbar.
//
// Builds random one-to-one connection sets (a random partial permutation of
// input lanes onto output lanes, with matching owner tables), drives random
// flits, valids and readies, and checks every output lane's valid and flit
// and every input lane's ready against a reference computed here.
module crossbar_tb;
  import router_pkg::*;

  localparam int N = 6;
  int checks = 0, failures = 0;

  logic  [N-1:0] in_valid, in_ready, out_valid, out_ready, conn_valid, out_busy;
  flit_t [N-1:0] in_flit, out_flit;
  logic  [N-1:0][2:0] conn_out, out_owner;

  crossbar dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm[N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      conn_valid = '0; out_busy = '0; conn_out = '0; out_owner = '0;
      for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 3) != 0) begin
          conn_valid[i] = 1'b1;
          conn_out[i] = 3'(perm[i]);
          out_busy[perm[i]] = 1'b1;
          out_owner[perm[i]] = 3'(i);
        end
      end
      in_valid  = 6'($urandom);
      out_ready = 6'($urandom);
      for (int i = 0; i < N; i++) in_flit[i] = flit_t'($urandom);
      #1;
      for (int o = 0; o < N; o++) begin
        logic ev;
        ev = 1'b0;
        for (int i = 0; i < N; i++)
          if (conn_valid[i] && perm[i] == o) begin
            ev = in_valid[i];
            checks++;
            if (in_valid[i] && out_flit[o] !== in_flit[i]) begin failures++; $display("flit mismatch o=%0d", o); end
          end
        checks++;
        if (out_valid[o] !== ev) begin failures++; $display("valid mismatch o=%0d", o); end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_ready[i] !== (conn_valid[i] && out_ready[perm[i]])) begin
          failures++; $display("ready mismatch i=%0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
