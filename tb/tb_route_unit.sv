// tb_route_unit: random coordinate pairs in an 8-ary 3-cube and a 10-ary one.
// The expected hops are counted by stepping round each ring; the expected
// output is the highest dimension with hops left, on the high VC when the
// remaining path crosses the wrap-around link (coordinate K-1 to 0).
module tb_route_unit;
  import hybrid_pkg::*;
  int checks = 0, failures = 0;

  coords_t here8, dest8, hops8, here10, dest10, hops10;
  logic at8, hi8, at10, hi10;
  logic [1:0] dim8, dim10;
  port_t port8, port10;
  logic [N-1:0] prod8, prod10;

  route_unit #(.K(8)) dut8 (.my_coord(here8), .dest(dest8), .at_dest(at8), .det_dim(dim8),
    .det_high(hi8), .det_port(port8), .hops(hops8), .productive(prod8));
  route_unit #(.K(10)) dut10 (.my_coord(here10), .dest(dest10), .at_dest(at10), .det_dim(dim10),
    .det_high(hi10), .det_port(port10), .hops(hops10), .productive(prod10));

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one(int K, coords_t h, coords_t t, coords_t hops, logic at, logic [1:0] dim,
                     logic hi, port_t port);
    int exp_hops [N];
    int exp_dim;
    bit wraps [N];
    for (int d = 0; d < N; d++) begin
      int c;
      c = h[d]; exp_hops[d] = 0; wraps[d] = 0;
      while (c != t[d]) begin
        if (c == K - 1) wraps[d] = 1;
        c = (c + 1) % K;
        exp_hops[d]++;
      end
      check(int'(hops[d]) == exp_hops[d], $sformatf("hops K=%0d d=%0d", K, d));
    end
    exp_dim = -1;
    for (int d = N - 1; d >= 0; d--) if (exp_dim < 0 && exp_hops[d] != 0) exp_dim = d;
    check(at == (exp_dim < 0), "at_dest");
    if (exp_dim < 0) check(int'(port) == LOCAL, "sink port");
    else begin
      check(int'(dim) == exp_dim, "dim");
      check(hi == wraps[exp_dim], "high/low");
      check(int'(port) == exp_dim * 3 + (wraps[exp_dim] ? 0 : 1), "port");
    end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      for (int d = 0; d < N; d++) begin
        here8[d]  = coord_t'($urandom_range(0, 7));
        dest8[d]  = ($urandom_range(0, 2) == 0) ? here8[d] : coord_t'($urandom_range(0, 7));
        here10[d] = coord_t'($urandom_range(0, 9));
        dest10[d] = ($urandom_range(0, 2) == 0) ? here10[d] : coord_t'($urandom_range(0, 9));
      end
      #1;
      one(8, here8, dest8, hops8, at8, dim8, hi8, port8);
      one(10, here10, dest10, hops10, at10, dim10, hi10, port10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
