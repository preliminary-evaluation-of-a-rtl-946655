// hybrid_router: one node of the hybrid deterministic/adaptive router for
// virtual cut-through switching in a k-ary 3-cube.
//
// Each dimension has one incoming and one outgoing unidirectional physical
// channel carrying three VCs: high and low (dimension-order channels) and
// adaptive. Every incoming VC and the local source have an input buffer of
// BUF_DEPTH flits. Messages are MSG_LEN flits long; a header is only granted
// an output VC when the whole message fits in the downstream buffer.
//
// Three logical paths share the hardware:
//  * FDP (fast deterministic path): a header that came on a high/low VC and
//    leaves on the same VC. Cycle 1 (FD1): routed and granted, latched in the
//    output-VC register. Cycle 2 (FD2): sent on the channel. Data flits of the
//    message go straight from the input buffer to the channel in one cycle,
//    bypassing the crossbar.
//  * SDP (slow deterministic path, header came on a high/low VC but changes
//    type, dimension or goes to the sink) and AP (adaptive path, header came
//    on an adaptive VC or from the source). Cycle 1 (SD1/A1): routed and
//    granted, latched in the input's stage-1 register. Cycle 2 (SD2/A2):
//    through the crossbar into the output-VC register. Cycle 3 (SD3/A3): sent
//    on the channel. Data flits skip stage 1 and take two cycles.
// Stage 1 is the path_allocator, stage 2 the crossbar, the shared last stage
// the per-channel vc_controller (and the sink). A cycle counts from the cycle
// after a flit is written into this router's input buffer to the cycle in
// which it is written into the next router's buffer.
//
// Flow control: in_credit pulses once per flit read from an input VC buffer;
// out_credit carries the downstream router's pulses. The sink always accepts
// a flit; once granted to a message it stays with it until the tail is out.
// The paths, stage counts and the routing rules follow the document; the
// register-level organisation, credits and reset are this design's own.
module hybrid_router
  import hybrid_pkg::*;
#(
  parameter int K         = 8,
  parameter int MSG_LEN   = 8,
  parameter int BUF_DEPTH = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  coords_t                      my_coord,
  // network channels, one per dimension
  input  link_t [N-1:0]                in_link,
  output logic [N-1:0][NUM_VC-1:0]     in_credit,
  output link_t [N-1:0]                out_link,
  input  logic [N-1:0][NUM_VC-1:0]     out_credit,
  // local processor
  input  logic                         inj_valid,
  input  flit_t                        inj_flit,
  output logic                         inj_ready,
  output logic                         ej_valid,
  output flit_t                        ej_flit,
  // header grants this cycle, per input port, and which were on the FDP
  output logic [NPORT-1:0]             hdr_grant,
  output logic [NPORT-1:0]             hdr_fdp
);
  localparam int CNT_W = $clog2(BUF_DEPTH + 1);

  // ---------------------------------------------------------------- buffers
  logic  [NPORT-1:0] fifo_wr, fifo_rd, fifo_empty, fifo_full;
  flit_t [NPORT-1:0] fifo_wdata, fifo_head;

  always_comb begin
    for (int i = 0; i < LOCAL; i++) begin
      fifo_wr[i]    = in_link[i / NUM_VC].valid &&
                      int'(in_link[i / NUM_VC].vc) == (i % NUM_VC);
      fifo_wdata[i] = in_link[i / NUM_VC].flit;
    end
    fifo_wr[LOCAL]    = inj_valid && !fifo_full[LOCAL];
    fifo_wdata[LOCAL] = inj_flit;
  end
  assign inj_ready = !fifo_full[LOCAL];

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    logic [CNT_W-1:0] unused_count;
    vc_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst,
      .wr_en(fifo_wr[i]), .wr_flit(fifo_wdata[i]),
      .rd_en(fifo_rd[i]), .head(fifo_head[i]),
      .empty(fifo_empty[i]), .full(fifo_full[i]), .count(unused_count)
    );
  end

  always_comb
    for (int i = 0; i < LOCAL; i++) in_credit[i / NUM_VC][i % NUM_VC] = fifo_rd[i];

  // ------------------------------------------------------ input VC state
  logic  [NPORT-1:0] in_bound;   // input holds an output VC for its message
  logic  [NPORT-1:0] in_fdp;     // ... on the fast deterministic path
  port_t [NPORT-1:0] in_port;    // ... which output VC
  logic  [NPORT-1:0] sd1_v;      // stage-1 register of SDP/AP holds the header
  flit_t [NPORT-1:0] sd1_f;

  // ----------------------------------------------------- output VC state
  logic  [NPORT-1:0] o_alloc;    // output VC held by a message
  logic  [NPORT-1:0] olat_v;     // output-VC register (FD1 / SD2 result)
  flit_t [NPORT-1:0] olat_f;

  // ---------------------------------------------- stage 1: route, allocate
  port_t   [NPORT-1:0] det_port;
  coords_t [NPORT-1:0] hops;
  logic    [NPORT-1:0] hdr_valid, out_free, grant, grant_fdp;
  port_t   [NPORT-1:0] grant_port;
  logic    [N*NUM_VC-1:0] room;

  for (genvar i = 0; i < NPORT; i++) begin : g_route
    logic         at_dest, det_high;
    logic [1:0]   det_dim;
    logic [N-1:0] productive;
    route_unit #(.K(K)) u_route (
      .my_coord, .dest(flit_dest(fifo_head[i].payload)),
      .at_dest, .det_dim, .det_high, .det_port(det_port[i]),
      .hops(hops[i]), .productive
    );
  end

  always_comb begin
    for (int i = 0; i < NPORT; i++)
      hdr_valid[i] = !in_bound[i] && !fifo_empty[i] && fifo_head[i].head;
    for (int o = 0; o < LOCAL; o++) out_free[o] = !o_alloc[o] && room[o];
    out_free[LOCAL] = !o_alloc[LOCAL];
  end

  path_allocator u_alloc (
    .clk, .rst, .hdr_valid, .det_port, .hops, .out_free,
    .grant, .grant_port, .grant_fdp
  );

  assign hdr_grant = grant;
  assign hdr_fdp   = grant & grant_fdp;

  // ------------------------------------------- last stage: candidates
  logic  [NPORT-1:0] cand_v, cand_fifo, sent, olat_ready;
  flit_t [NPORT-1:0] cand_f;

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      cand_v[o]    = olat_v[o];
      cand_f[o]    = olat_f[o];
      cand_fifo[o] = 1'b0;
      // FDP data flits go from input buffer o straight to output VC o.
      if (!olat_v[o] && o < LOCAL && in_bound[o] && in_fdp[o] && !fifo_empty[o]) begin
        cand_v[o]    = 1'b1;
        cand_f[o]    = fifo_head[o];
        cand_fifo[o] = 1'b1;
      end
    end
  end

  for (genvar d = 0; d < N; d++) begin : g_out
    vc_controller #(.BUF_DEPTH(BUF_DEPTH), .MSG_LEN(MSG_LEN)) u_vcc (
      .clk, .rst,
      .cand_valid(cand_v[d*NUM_VC +: NUM_VC]),
      .cand_flit (cand_f[d*NUM_VC +: NUM_VC]),
      .sent      (sent[d*NUM_VC +: NUM_VC]),
      .link      (out_link[d]),
      .credit_in (out_credit[d]),
      .room      (room[d*NUM_VC +: NUM_VC])
    );
  end

  // The sink takes a flit every cycle.
  assign sent[LOCAL] = cand_v[LOCAL];
  assign ej_valid    = cand_v[LOCAL];
  assign ej_flit     = cand_f[LOCAL];

  always_comb
    for (int o = 0; o < NPORT; o++) olat_ready[o] = !olat_v[o] || sent[o];

  // -------------------------------------------- stage 2: SDP/AP crossbar
  logic  [NPORT-1:0]              xin_v, xfer;
  flit_t [NPORT-1:0]              xin_f;
  logic  [NPORT-1:0]              xout_v;
  flit_t [NPORT-1:0]              xout_f;
  logic  [NPORT-1:0][PORT_W-1:0]  xout_src;

  always_comb
    for (int i = 0; i < NPORT; i++) begin
      xin_v[i] = in_bound[i] && !in_fdp[i] && (sd1_v[i] || !fifo_empty[i]);
      xin_f[i] = sd1_v[i] ? sd1_f[i] : fifo_head[i];
      xfer[i]  = xin_v[i] && olat_ready[in_port[i]];
    end

  crossbar #(.NI(NPORT), .NO(NPORT)) u_xbar (
    .in_valid(xfer), .in_flit(xin_f), .in_sel(in_port),
    .out_valid(xout_v), .out_flit(xout_f), .out_src(xout_src)
  );

  // ------------------------------------------------------ buffer reads
  always_comb
    for (int i = 0; i < NPORT; i++)
      fifo_rd[i] = grant[i]                              // header leaves
                 || (xfer[i] && !sd1_v[i])               // SDP/AP data
                 || (i < LOCAL && cand_fifo[i] && sent[i]); // FDP data

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (rst) begin
      in_bound <= '0;
      in_fdp   <= '0;
      in_port  <= '0;
      sd1_v    <= '0;
      sd1_f    <= '0;
      o_alloc  <= '0;
      olat_v   <= '0;
      olat_f   <= '0;
    end else begin
      for (int i = 0; i < NPORT; i++) begin
        if (grant[i]) begin
          in_bound[i] <= 1'b1;
          in_fdp[i]   <= grant_fdp[i];
          in_port[i]  <= grant_port[i];
          if (!grant_fdp[i]) begin
            sd1_v[i] <= 1'b1;
            sd1_f[i] <= fifo_head[i];
          end
        end else begin
          if (sd1_v[i] && xfer[i]) sd1_v[i] <= 1'b0;
          if (in_bound[i] && fifo_rd[i] && fifo_head[i].tail) in_bound[i] <= 1'b0;
        end
      end
      for (int o = 0; o < NPORT; o++) begin
        if (sent[o] && cand_f[o].tail) o_alloc[o] <= 1'b0;
        if (xout_v[o]) begin
          olat_v[o] <= 1'b1;
          olat_f[o] <= xout_f[o];
        end else if (sent[o] && !cand_fifo[o]) begin
          olat_v[o] <= 1'b0;
        end
      end
      for (int i = 0; i < NPORT; i++) begin
        if (grant[i]) begin
          o_alloc[grant_port[i]] <= 1'b1;
          if (grant_fdp[i]) begin
            olat_v[grant_port[i]] <= 1'b1;
            olat_f[grant_port[i]] <= fifo_head[i];
          end
        end
      end
    end
  end

  // A message needs a head and a tail flit; the whole message must fit.
  initial begin
    assert (MSG_LEN >= 2) else $error("MSG_LEN must be at least 2");
    assert (BUF_DEPTH >= MSG_LEN) else $error("BUF_DEPTH must hold a whole message");
  end

endmodule
