// hybrid_torus: a K-ary 3-cube of hybrid deterministic/adaptive routers using
// virtual cut-through switching.
//
// Node n sits at x = n mod K, y = (n / K) mod K, z = n / K^2. In every
// dimension the nodes form a unidirectional ring: node n sends on its
// dimension-d physical channel to the node whose coordinate d is one higher
// (mod K) and receives from the one below. Each channel carries a flit per
// cycle tagged with its VC (high, low or adaptive); the per-VC credit pulses
// run the other way. The channel is a plain wire from the sending router's
// last pipeline stage into the receiving router's input buffer.
//
// Every node's local processor port is brought out: inj_* feeds the source
// queue (valid/ready), ej_* is the sink (one flit per cycle, always taken).
// hdr_grant / hdr_fdp report, per node and input port, the headers granted an
// output this cycle and which of them took the fast deterministic path
// (ports 0..8 are the network VCs, 3*dimension + {high, low, adaptive}; 9 is
// the source): a grant at an adaptive port or the source is on the adaptive
// path, a non-FDP grant at a high or low port on the slow deterministic path.
// The torus and its channels follow the document's network model; the node
// numbering and the performance ports are this design's own.
module hybrid_torus
  import hybrid_pkg::*;
#(
  parameter int K         = 8,
  parameter int MSG_LEN   = 8,
  parameter int BUF_DEPTH = 8,
  localparam int NODES    = K * K * K
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic  [NODES-1:0]             inj_valid,
  input  flit_t [NODES-1:0]             inj_flit,
  output logic  [NODES-1:0]             inj_ready,
  output logic  [NODES-1:0]             ej_valid,
  output flit_t [NODES-1:0]             ej_flit,
  output logic  [NODES-1:0][NPORT-1:0]  hdr_grant,
  output logic  [NODES-1:0][NPORT-1:0]  hdr_fdp
);
  link_t [NODES-1:0][N-1:0]             link;     // out_link of each node
  logic  [NODES-1:0][N-1:0][NUM_VC-1:0] credit;   // in_credit of each node

  function automatic int stride(int d);
    return (d == 0) ? 1 : (d == 1) ? K : K * K;
  endfunction

  // Node one step further along dimension d (ring successor).
  function automatic int next_node(int n, int d);
    int c;
    c = (n / stride(d)) % K;
    return (c == K - 1) ? n - (K - 1) * stride(d) : n + stride(d);
  endfunction

  // Node one step back along dimension d (ring predecessor).
  function automatic int prev_node(int n, int d);
    int c;
    c = (n / stride(d)) % K;
    return (c == 0) ? n + (K - 1) * stride(d) : n - stride(d);
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    coords_t                   coord;
    link_t [N-1:0]             in_link;
    logic  [N-1:0][NUM_VC-1:0] out_credit;

    for (genvar d = 0; d < N; d++) begin : g_dim
      assign coord[d]      = coord_t'((n / stride(d)) % K);
      assign in_link[d]    = link[prev_node(n, d)][d];
      assign out_credit[d] = credit[next_node(n, d)][d];
    end

    hybrid_router #(.K(K), .MSG_LEN(MSG_LEN), .BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk, .rst,
      .my_coord  (coord),
      .in_link   (in_link),
      .in_credit (credit[n]),
      .out_link  (link[n]),
      .out_credit(out_credit),
      .inj_valid (inj_valid[n]),
      .inj_flit  (inj_flit[n]),
      .inj_ready (inj_ready[n]),
      .ej_valid  (ej_valid[n]),
      .ej_flit   (ej_flit[n]),
      .hdr_grant (hdr_grant[n]),
      .hdr_fdp   (hdr_fdp[n])
    );
  end

endmodule
