// vc_controller: last pipeline stage of one outgoing physical channel
// (FD2 / SD3 / A3).
//
// Three output VCs (high, low, adaptive) share the channel. Each cycle the
// controller picks, round-robin, one VC that has a flit ready and whose
// downstream buffer has a free slot, and puts that flit on the link tagged
// with its VC; sent tells the router which VC went. It keeps one credit
// counter per downstream VC buffer: it starts at BUF_DEPTH, drops by one per
// flit sent and rises by one per credit pulse from downstream. room tells the
// router that a whole message of MSG_LEN flits fits downstream, the condition
// for granting the VC to a new header under virtual cut-through.
// The link is driven combinationally from the candidates; the receiving
// router latches it into its input buffer at the end of the same cycle.
// Multiplexing VCs onto one channel follows the document; credits and the
// round-robin choice are this design's own.
module vc_controller
  import hybrid_pkg::*;
#(
  parameter int BUF_DEPTH = 8,
  parameter int MSG_LEN   = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NUM_VC-1:0]   cand_valid,
  input  flit_t [NUM_VC-1:0]  cand_flit,
  output logic [NUM_VC-1:0]   sent,
  output link_t               link,
  input  logic [NUM_VC-1:0]   credit_in,
  output logic [NUM_VC-1:0]   room
);
  localparam int CW = $clog2(BUF_DEPTH + 1);
  logic [NUM_VC-1:0][CW-1:0] credits;
  logic [NUM_VC-1:0]         elig;

  always_comb
    for (int v = 0; v < NUM_VC; v++) begin
      elig[v] = cand_valid[v] && (credits[v] != 0);
      room[v] = (int'(credits[v]) >= MSG_LEN);
    end

  rr_arbiter #(.N(NUM_VC)) u_arb (
    .clk, .rst, .req(elig), .advance(1'b1), .grant(sent)
  );

  always_comb begin
    link = '0;
    for (int v = 0; v < NUM_VC; v++)
      if (sent[v]) begin
        link.valid = 1'b1;
        link.vc    = vc_type_e'(v);
        link.flit  = cand_flit[v];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(BUF_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VC; v++)
        credits[v] <= credits[v] - CW'(sent[v]) + CW'(credit_in[v]);
    end
  end

  for (genvar v = 0; v < NUM_VC; v++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (rst)
      int'(credits[v]) <= BUF_DEPTH);
  end

endmodule
