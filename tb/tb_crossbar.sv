// tb_crossbar: random partial permutations of 10 inputs onto 10 outputs; each
// output must carry exactly the flit of the input bound to it.
module tb_crossbar;
  import hybrid_pkg::*;
  localparam int NI = 10, NO = 10;
  logic [NI-1:0] in_valid;
  flit_t [NI-1:0] in_flit;
  logic [NI-1:0][$clog2(NO)-1:0] in_sel;
  logic [NO-1:0] out_valid;
  flit_t [NO-1:0] out_flit;
  logic [NO-1:0][$clog2(NI)-1:0] out_src;
  int checks = 0, failures = 0;

  crossbar #(.NI(NI), .NO(NO)) dut (.*);

  initial begin
    int perm [NO];
    for (int it = 0; it < 2000; it++) begin
      for (int o = 0; o < NO; o++) perm[o] = o;
      perm.shuffle();
      for (int i = 0; i < NI; i++) begin
        in_valid[i] = ($urandom_range(0, 3) != 0);
        in_sel[i]   = 4'(perm[i]);
        in_flit[i]  = flit_t'($urandom);
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        int src;
        src = -1;
        for (int i = 0; i < NI; i++) if (perm[i] == o) src = i;
        checks++;
        if (out_valid[o] != in_valid[src] ||
            (in_valid[src] && (out_flit[o] != in_flit[src] || int'(out_src[o]) != src))) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
