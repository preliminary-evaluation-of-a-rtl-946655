// crossbar: the switch of the slow deterministic and adaptive paths.
//
// NI inputs, NO outputs, one flit wide. Each input presents a flit with the
// output it is bound to (in_sel); each output passes on the flit of the valid
// input bound to it and reports which input that is (out_src). The router's
// allocation binds at most one input to an output, so no arbitration is done
// here. Ports are per virtual channel: nine network VCs plus the local port
// (P = 10), as in the evaluated 3-cube router. Purely combinational; the
// router latches the result in its output-VC registers.
module crossbar
  import hybrid_pkg::*;
#(
  parameter int NI = 10,
  parameter int NO = 10
) (
  input  logic [NI-1:0]                  in_valid,
  input  flit_t [NI-1:0]                 in_flit,
  input  logic [NI-1:0][$clog2(NO)-1:0]  in_sel,
  output logic [NO-1:0]                  out_valid,
  output flit_t [NO-1:0]                 out_flit,
  output logic [NO-1:0][$clog2(NI)-1:0]  out_src
);
  always_comb begin
    out_valid = '0;
    out_flit  = '0;
    out_src   = '0;
    for (int o = 0; o < NO; o++) begin
      for (int i = 0; i < NI; i++) begin
        if (in_valid[i] && int'(in_sel[i]) == o) begin
          out_valid[o] = 1'b1;
          out_flit[o]  = in_flit[i];
          out_src[o]   = ($clog2(NI))'(i);
        end
      end
    end
  end

endmodule
