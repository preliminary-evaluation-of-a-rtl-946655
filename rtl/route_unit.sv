// route_unit: address decoding for one header in a k-ary 3-cube with
// unidirectional rings.
//
// For every dimension it computes the hops still to go, (dest - here) mod K.
// The dimension-order (deterministic) output is the highest dimension with
// hops left: a message only moves to a lower dimension when no hops remain in
// the higher ones. Within that dimension the message takes the high VC while
// it still has to cross the wrap-around link (destination coordinate below
// the current one) and the low VC after it, which breaks the cycle of each
// ring. At the destination the output is the sink. productive marks the
// dimensions with hops left (the candidates for adaptive VCs).
// Purely combinational. Dimension order follows the document; the high/low
// rule is this design's choice of the usual two-VC dateline scheme.
module route_unit
  import hybrid_pkg::*;
#(
  parameter int K = 8
) (
  input  coords_t             my_coord,
  input  coords_t             dest,
  output logic                at_dest,
  output logic [1:0]          det_dim,
  output logic                det_high,
  output port_t               det_port,
  output coords_t             hops,
  output logic [N-1:0]        productive
);
  always_comb begin
    det_dim  = '0;
    det_high = 1'b0;
    for (int d = 0; d < N; d++) begin
      if (dest[d] >= my_coord[d]) hops[d] = coord_t'(dest[d] - my_coord[d]);
      else                        hops[d] = coord_t'(int'(dest[d]) + K - int'(my_coord[d]));
      productive[d] = (hops[d] != 0);
    end
    // Highest dimension with hops left wins.
    for (int d = 0; d < N; d++) begin
      if (productive[d]) begin
        det_dim  = 2'(d);
        det_high = (dest[d] < my_coord[d]);
      end
    end
    at_dest  = (productive == '0);
    det_port = at_dest ? port_t'(LOCAL)
                       : port_of(int'(det_dim), det_high ? VC_HIGH : VC_LOW);
  end

endmodule
