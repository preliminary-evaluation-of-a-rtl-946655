// tb_path_allocator: directed cases for the first router stage, each with the
// grant worked out by hand from the routing rules:
// FDP for a header that keeps its high/low VC, slow path when the type or
// dimension changes, deterministic VC before adaptive, adaptive VC in the
// dimension with most hops left, FDP winning a shared output, no adaptive
// escape for the sink, round-robin among adaptive buffers, adaptive buffers
// before deterministic ones and deterministic ones before the source.
module tb_path_allocator;
  import hybrid_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPORT-1:0] hdr_valid, out_free, grant, grant_fdp;
  port_t [NPORT-1:0] det_port, grant_port;
  coords_t [NPORT-1:0] hops;
  int checks = 0, failures = 0;

  path_allocator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    hdr_valid = '0; out_free = '0; det_port = '0; hops = '0;
  endtask

  function automatic coords_t h3(int x, int y, int z);
    coords_t c;
    c[0] = coord_t'(x); c[1] = coord_t'(y); c[2] = coord_t'(z);
    return c;
  endfunction

  // Expect input i granted port p (p < 0: not granted) and FDP flag.
  task automatic expect_grant(int i, int p, bit fdp, string what);
    checks++;
    if (p < 0) begin
      if (grant[i]) begin failures++; $display("FAIL %s: input %0d granted", what, i); end
    end else if (!grant[i] || int'(grant_port[i]) != p || grant_fdp[i] != fdp) begin
      failures++;
      $display("FAIL %s: input %0d grant=%b port=%0d fdp=%b, want port %0d fdp %0b",
               what, i, grant[i], grant_port[i], grant_fdp[i], p, fdp);
    end
  endtask

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst = 0;

    // 1: x-high header continuing on x-high -> FDP
    @(negedge clk); clear();
    hdr_valid[0] = 1; det_port[0] = 0; hops[0] = h3(3, 0, 0); out_free = '1;
    #1 expect_grant(0, 0, 1, "fdp");

    // 2: x-low header wanting x-high (type change) -> SDP on port 0
    @(negedge clk); clear();
    hdr_valid[1] = 1; det_port[1] = 0; hops[1] = h3(3, 0, 0); out_free = '1;
    #1 expect_grant(1, 0, 0, "type change");

    // 3: adaptive header, deterministic y-low busy -> adaptive z (5 hops > 3)
    @(negedge clk); clear();
    hdr_valid[2] = 1; det_port[2] = 4; hops[2] = h3(0, 3, 5); out_free = '1; out_free[4] = 0;
    #1 expect_grant(2, 8, 0, "adaptive most hops");

    // 4: same with adaptive z busy -> adaptive y
    @(negedge clk); clear();
    hdr_valid[2] = 1; det_port[2] = 4; hops[2] = h3(0, 3, 5); out_free = '1;
    out_free[4] = 0; out_free[8] = 0;
    #1 expect_grant(2, 5, 0, "adaptive next dim");

    // 4b: most hops in a lower dimension: x has 6 left, y 2 -> adaptive x
    @(negedge clk); clear();
    hdr_valid[2] = 1; det_port[2] = 4; hops[2] = h3(6, 2, 0); out_free = '1; out_free[4] = 0;
    #1 expect_grant(2, 2, 0, "adaptive lower dim with most hops");

    // 5: adaptive header wants deterministic y-low which is free -> takes it
    @(negedge clk); clear();
    hdr_valid[2] = 1; det_port[2] = 4; hops[2] = h3(0, 3, 5); out_free = '1;
    #1 expect_grant(2, 4, 0, "deterministic first");

    // 6: FDP of input 0 beats adaptive input 2 for port 0; input 2 goes adaptive x
    @(negedge clk); clear();
    hdr_valid[0] = 1; det_port[0] = 0; hops[0] = h3(2, 0, 0);
    hdr_valid[2] = 1; det_port[2] = 0; hops[2] = h3(4, 0, 0); out_free = '1;
    #1 expect_grant(0, 0, 1, "fdp priority"); expect_grant(2, 2, 0, "loser adaptive");

    // 7: header at its destination, sink busy -> waits, adaptive not used
    @(negedge clk); clear();
    hdr_valid[5] = 1; det_port[5] = LOCAL; hops[5] = h3(0, 0, 0); out_free = '1;
    out_free[LOCAL] = 0;
    #1 expect_grant(5, -1, 0, "sink busy");
    @(negedge clk); out_free[LOCAL] = 1;
    #1 expect_grant(5, LOCAL, 0, "sink free");

    // 8: round-robin among adaptive buffers 2 and 5, both want only port 4
    @(negedge clk); clear();
    hdr_valid[2] = 1; hdr_valid[5] = 1; det_port[2] = 4; det_port[5] = 4;
    hops[2] = h3(0, 1, 0); hops[5] = h3(0, 1, 0); out_free[4] = 1;
    // (the last adaptive winner was input 5, so the pointer is at input 8)
    #1 expect_grant(2, 4, 0, "rr adaptive first turn");
    expect_grant(5, -1, 0, "rr adaptive loser");
    @(negedge clk);
    #1 expect_grant(5, 4, 0, "rr adaptive second turn"); expect_grant(2, -1, 0, "rr loser 2");
    @(negedge clk);
    #1 expect_grant(2, 4, 0, "rr adaptive third turn");

    // 9: adaptive buffer before deterministic buffer for the same output
    @(negedge clk); clear();
    hdr_valid[1] = 1; det_port[1] = 4; hops[1] = h3(0, 2, 0);
    hdr_valid[8] = 1; det_port[8] = 4; hops[8] = h3(0, 2, 0); out_free[4] = 1;
    #1 expect_grant(8, 4, 0, "adaptive before deterministic"); expect_grant(1, -1, 0, "det waits");

    // 10: deterministic buffer before the source
    @(negedge clk); clear();
    hdr_valid[LOCAL] = 1; det_port[LOCAL] = 7; hops[LOCAL] = h3(0, 0, 2);
    hdr_valid[3] = 1; det_port[3] = 7; hops[3] = h3(0, 0, 2); out_free[7] = 1;
    #1 expect_grant(3, 7, 0, "det before source"); expect_grant(LOCAL, -1, 0, "source waits");

    // 11: several grants in one cycle, all different outputs
    @(negedge clk); clear();
    out_free = '1;
    hdr_valid[0] = 1; det_port[0] = 0; hops[0] = h3(1, 0, 0);
    hdr_valid[4] = 1; det_port[4] = 4; hops[4] = h3(0, 1, 0);
    hdr_valid[LOCAL] = 1; det_port[LOCAL] = 6; hops[LOCAL] = h3(1, 1, 1);
    #1 expect_grant(0, 0, 1, "multi fdp x"); expect_grant(4, 4, 1, "multi fdp y");
    expect_grant(LOCAL, 6, 0, "multi source");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
