// hybrid_pkg: types and constants shared by the hybrid deterministic/adaptive
// router and the k-ary 3-cube built from it.
//
// A message is a fixed number of flits. Each flit carries a head bit, a tail
// bit and a 16-bit payload; in the head flit the low 12 bits of the payload are
// the destination coordinates (x in [3:0], y in [7:4], z in [11:8]). Each
// dimension has one unidirectional physical channel (PC) per node that carries
// three virtual channels (VCs): high and low (the two dimension-order escape
// channels) and adaptive. The port numbering used inside a router is
// 3*dimension + VC type for the nine network VCs, and 9 for the local port
// (the source queue on the input side, the sink on the output side).
// The flit width and the field layout are choices of this design; three
// dimensions and three VCs per dimension follow the evaluated configuration.
package hybrid_pkg;

  localparam int N         = 3;   // dimensions of the k-ary n-cube
  localparam int COORD_W   = 4;   // bits per coordinate, radix up to 16
  localparam int PAYLOAD_W = 16;  // payload bits per flit
  localparam int NUM_VC    = 3;   // VCs per physical channel: high, low, adaptive
  localparam int NPORT     = N * NUM_VC + 1;  // crossbar ports (P = 10)
  localparam int LOCAL     = NPORT - 1;       // index of the source / sink port
  localparam int PORT_W    = $clog2(NPORT);

  typedef logic [PORT_W-1:0]             port_t;
  typedef logic [COORD_W-1:0]            coord_t;
  typedef logic [N-1:0][COORD_W-1:0]     coords_t;

  typedef enum logic [1:0] {
    VC_HIGH  = 2'd0,
    VC_LOW   = 2'd1,
    VC_ADAPT = 2'd2
  } vc_type_e;

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // One physical channel: at most one flit per cycle, tagged with its VC.
  typedef struct packed {
    logic     valid;
    vc_type_e vc;
    flit_t    flit;
  } link_t;

  function automatic coords_t flit_dest(logic [PAYLOAD_W-1:0] payload);
    return coords_t'(payload[N*COORD_W-1:0]);
  endfunction

  function automatic port_t port_of(int dim, vc_type_e vc);
    return port_t'(dim * NUM_VC + int'(vc));
  endfunction

endpackage
