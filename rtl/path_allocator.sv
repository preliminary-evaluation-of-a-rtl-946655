// path_allocator: first pipeline stage of the hybrid router (FD1 / SD1 / A1):
// routing arbitration and output-VC selection for waiting headers.
//
// Inputs 0..8 are the network input VCs (port = 3*dimension + type), input 9
// the source queue. For each input whose idle buffer shows a header, the
// router gives the dimension-order output (det_port) and the hops left per
// dimension. An output VC may be granted when out_free says it is held by no
// message and its downstream buffer has room for a whole message.
//
//  * Fast deterministic path: a header that arrived on a high or low VC and
//    wants to leave on the very same VC (same dimension, same type), which is
//    free, is granted that VC on the FDP. These grants are made first.
//  * Slow deterministic and adaptive paths: the remaining headers are served
//    in round-robin order, first among the adaptive input buffers, then among
//    the deterministic ones, the source last. Each takes its dimension-order
//    VC if free, otherwise the free adaptive VC of the productive dimension
//    with the most hops left; if neither is free it waits. A header that
//    arrived on an adaptive VC (or from the source) is on the AP, one that
//    arrived on a deterministic VC on the SDP.
//
// Several headers can be granted in one cycle, each to a different output VC.
// Grants are combinational; the round-robin pointers move at the clock edge
// past the first slow-path winner of each group. The selection rules follow
// the document; granting several per cycle and FDP-first are this design's
// choices.
module path_allocator
  import hybrid_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NPORT-1:0]       hdr_valid,
  input  port_t [NPORT-1:0]      det_port,
  input  coords_t [NPORT-1:0]    hops,
  input  logic [NPORT-1:0]       out_free,
  output logic [NPORT-1:0]       grant,
  output port_t [NPORT-1:0]      grant_port,
  output logic [NPORT-1:0]       grant_fdp
);
  localparam int NA = N;          // adaptive input buffers
  localparam int ND = 2 * N;      // deterministic input buffers

  logic [$clog2(NA)-1:0] ptr_a;
  logic [$clog2(ND)-1:0] ptr_d;
  logic                  win_a_any, win_d_any;
  logic [$clog2(NA)-1:0] win_a;
  logic [$clog2(ND)-1:0] win_d;

  always_comb begin
    logic [NPORT-1:0] taken;
    int               order [NPORT];
    int               i, best, best_hops, p, j;
    grant      = '0;
    grant_port = '0;
    grant_fdp  = '0;
    taken      = '0;
    win_a_any  = 1'b0;
    win_d_any  = 1'b0;
    win_a      = ptr_a;
    win_d      = ptr_d;
    i = 0; best = -1; best_hops = 0; p = 0; j = 0;

    // FDP: continue on the same VC when it is free.
    for (int f = 0; f < LOCAL; f++) begin
      if ((f % NUM_VC) != int'(VC_ADAPT) && hdr_valid[f] &&
          int'(det_port[f]) == f && out_free[f]) begin
        grant[f]      = 1'b1;
        grant_fdp[f]  = 1'b1;
        grant_port[f] = port_t'(f);
        taken[f]      = 1'b1;
      end
    end

    // Service order: adaptive buffers, deterministic buffers, source.
    for (int k = 0; k < NA; k++)
      order[k] = ((int'(ptr_a) + k) % NA) * NUM_VC + int'(VC_ADAPT);
    for (int k = 0; k < ND; k++) begin
      j = (int'(ptr_d) + k) % ND;
      order[NA + k] = (j / 2) * NUM_VC + (j % 2);
    end
    order[NPORT-1] = LOCAL;

    for (int k = 0; k < NPORT; k++) begin
      i = order[k];
      if (hdr_valid[i] && !grant[i]) begin
        best      = -1;
        best_hops = 0;
        if (out_free[det_port[i]] && !taken[det_port[i]]) begin
          best = int'(det_port[i]);
        end else if (int'(det_port[i]) != LOCAL) begin
          // Adaptive VC in the dimension with the most hops left.
          for (int d = N - 1; d >= 0; d--) begin
            p = d * NUM_VC + int'(VC_ADAPT);
            if (hops[i][d] != 0 && out_free[p] && !taken[p] &&
                int'(hops[i][d]) > best_hops) begin
              best      = p;
              best_hops = int'(hops[i][d]);
            end
          end
        end
        if (best >= 0) begin
          grant[i]      = 1'b1;
          grant_port[i] = port_t'(best);
          taken[best]   = 1'b1;
          if (k < NA && !win_a_any) begin
            win_a_any = 1'b1;
            win_a     = ($clog2(NA))'(i / NUM_VC);
          end else if (k >= NA && k < NA + ND && !win_d_any) begin
            win_d_any = 1'b1;
            win_d     = ($clog2(ND))'((i / NUM_VC) * 2 + (i % NUM_VC));
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr_a <= '0;
      ptr_d <= '0;
    end else begin
      if (win_a_any) ptr_a <= (int'(win_a) == NA - 1) ? '0 : win_a + 1'b1;
      if (win_d_any) ptr_d <= (int'(win_d) == ND - 1) ? '0 : win_d + 1'b1;
    end
  end

  // Each output VC is granted to at most one header per cycle.
  logic dup_grant;
  always_comb begin
    dup_grant = 1'b0;
    for (int a = 0; a < NPORT; a++)
      for (int b = a + 1; b < NPORT; b++)
        if (grant[a] && grant[b] && grant_port[a] == grant_port[b]) dup_grant = 1'b1;
  end
  a_excl: assert property (@(posedge clk) disable iff (rst) !dup_grant);

endmodule
