// tb_hybrid_torus: end-to-end test of a 4-ary 3-cube (64 routers) with
// 8-flit messages and 8-flit buffers.
//
// Phase 1, idle network: single messages whose latency is worked out from the
// per-router stage counts (source 3 cycles on the adaptive path, 2 per router
// passed straight through on the fast path, 3 per dimension change or into
// the sink on the slow path), and the tail must follow the header by
// MSG_LEN-1 cycles.
// Phase 2, random uniform traffic: every node injects messages to random
// other nodes at a low and then a high rate. A scoreboard checks that every
// message arrives once, whole, in order and at its destination.
// Each mechanism must show up at least once: fast-path, slow-path and
// adaptive-path headers, a header arriving on an adaptive VC, the high
// (wrap-around) VC on the fast path, a full source queue (back-pressure) and
// sink deliveries.
module tb_hybrid_torus;
  import hybrid_pkg::*;
  localparam int K = 4, LEN = 8, BUF = 8;
  localparam int NODES = K * K * K;

  logic clk = 0, rst = 1;
  logic  [NODES-1:0]            inj_valid, inj_ready, ej_valid;
  flit_t [NODES-1:0]            inj_flit, ej_flit;
  logic  [NODES-1:0][NPORT-1:0] hdr_grant, hdr_fdp;

  hybrid_torus #(.K(K), .MSG_LEN(LEN), .BUF_DEPTH(BUF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cx(int n, int d);
    return (d == 0) ? n % K : (d == 1) ? (n / K) % K : n / (K * K);
  endfunction

  // -------------------------------------------------------- injection
  flit_t inj_q [NODES][$];
  int    next_id = 0;
  int    exp_dest [int];
  bit    delivered [int];
  int    n_stall = 0;

  task automatic queue_msg(int src, int dst);
    int id;
    flit_t f;
    id = next_id++;
    exp_dest[id] = dst;
    f.head = 1; f.tail = 0;
    f.payload = {4'(id), 4'(cx(dst, 2)), 4'(cx(dst, 1)), 4'(cx(dst, 0))};
    inj_q[src].push_back(f);
    for (int s = 1; s < LEN; s++) begin
      f.head = 0; f.tail = (s == LEN - 1);
      f.payload = 16'(id * 16 + s);
      inj_q[src].push_back(f);
    end
  endtask

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      inj_valid[n] = (inj_q[n].size() != 0) && !rst;
      inj_flit[n]  = (inj_q[n].size() != 0) ? inj_q[n][0] : '0;
    end
  end

  always @(posedge clk) if (!rst)
    for (int n = 0; n < NODES; n++) begin
      if (inj_valid[n] && inj_ready[n]) begin
        void'(inj_q[n].pop_front());
      end
      if (inj_valid[n] && !inj_ready[n]) n_stall++;
    end

  // ------------------------------------------------------------ sinks
  int  cur_id [NODES];
  int  cur_seq [NODES];
  int  cur_hdr_cyc [NODES];
  int  cur_tag [NODES];
  int  last_hdr_lat, last_tail_gap;
  int  n_delivered = 0;

  always @(negedge clk) if (!rst)
    for (int n = 0; n < NODES; n++) if (ej_valid[n]) begin
      flit_t f;
      f = ej_flit[n];
      if (f.head) begin
        check(cur_seq[n] == 0, "header while a message is open at the sink");
        check(int'(f.payload[3:0]) == cx(n, 0) && int'(f.payload[7:4]) == cx(n, 1) &&
              int'(f.payload[11:8]) == cx(n, 2), "header at wrong node");
        cur_seq[n] = 1;
        cur_hdr_cyc[n] = cyc;
        cur_tag[n] = int'(f.payload[15:12]);
      end else begin
        check(cur_seq[n] != 0, "data flit without header");
        if (cur_seq[n] == 1) begin
          cur_id[n] = int'(f.payload) / 16;
          check(exp_dest.exists(cur_id[n]) && exp_dest[cur_id[n]] == n, "message at wrong destination");
          check((cur_id[n] % 16) == cur_tag[n], "header and data of different messages");
        end
        check(int'(f.payload) == cur_id[n] * 16 + cur_seq[n], "data flit out of order");
        check(f.tail == (cur_seq[n] == LEN - 1), "tail flag");
        cur_seq[n]++;
        if (f.tail) begin
          check(!delivered.exists(cur_id[n]), "message delivered twice");
          delivered[cur_id[n]] = 1;
          n_delivered++;
          last_hdr_lat  = cur_hdr_cyc[n];
          last_tail_gap = cyc - cur_hdr_cyc[n];
          cur_seq[n] = 0;
        end
      end
    end

  // ------------------------------------------------------- mechanisms
  int n_fdp = 0, n_sdp = 0, n_ap = 0, n_ap_adaptive_in = 0, n_fdp_high = 0;
  always @(negedge clk) if (!rst)
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < NPORT; i++) if (hdr_grant[n][i]) begin
        if (hdr_fdp[n][i]) begin
          n_fdp++;
          if ((i % NUM_VC) == int'(VC_HIGH)) n_fdp_high++;
        end else if (i != LOCAL && (i % NUM_VC) != int'(VC_ADAPT)) n_sdp++;
        else begin
          n_ap++;
          if (i != LOCAL) n_ap_adaptive_in++;
        end
      end

  // ------------------------------------------------------ stimulus
  task automatic single(int src, int dst, int exp_lat);
    int t0, n_before;
    n_before = n_delivered;
    @(negedge clk);
    queue_msg(src, dst);
    t0 = cyc;
    while (n_delivered == n_before && cyc - t0 < 200) @(negedge clk);
    check(n_delivered == n_before + 1, "single message delivered");
    check(last_hdr_lat - t0 == exp_lat,
          $sformatf("idle latency %0d -> %0d: %0d, want %0d", src, dst, last_hdr_lat - t0, exp_lat));
    check(last_tail_gap == LEN - 1, $sformatf("tail %0d cycles behind header", last_tail_gap));
    repeat (5) @(negedge clk);
  endtask

  function automatic int node(int x, int y, int z);
    return x + K * y + K * K * z;
  endfunction

  initial begin
    for (int n = 0; n < NODES; n++) begin cur_seq[n] = 0; cur_id[n] = 0; end
    inj_valid = '0; inj_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;

    // x only, one router passed straight: 3 (source) + 2 (FDP) + 3 (sink)
    single(node(0, 0, 0), node(2, 0, 0), 8);
    // y then x: source 3, FDP 2, y->x turn 3, sink 3
    single(node(0, 0, 0), node(1, 2, 0), 11);
    // neighbour across the wrap-around link: source 3 + sink 3
    single(node(3, 1, 1), node(0, 1, 1), 6);
    // z with wrap then stays high/low: (0,0,3) -> (0,0,1): z-high to wrap node
    // 0 (3 + 3 since high->low is a type change), then sink 3
    single(node(0, 0, 3), node(0, 0, 1), 9);

    // random uniform traffic, low then high load
    for (int phase = 0; phase < 2; phase++) begin
      int pct;
      pct = (phase == 0) ? 1 : 20;
      for (int c = 0; c < 3000; c++) begin
        @(negedge clk);
        for (int n = 0; n < NODES; n++)
          if (next_id < 4000 && inj_q[n].size() < 4 * LEN && $urandom_range(0, 999) < pct * 10 / LEN) begin
            int d;
            do d = $urandom_range(0, NODES - 1); while (d == n);
            queue_msg(n, d);
          end
      end
    end
    // drain
    begin
      int t0;
      t0 = cyc;
      while (n_delivered < next_id && cyc - t0 < 30000) @(negedge clk);
    end
    check(n_delivered == next_id, $sformatf("delivered %0d of %0d messages", n_delivered, next_id));
    $display("messages=%0d fdp=%0d sdp=%0d ap=%0d ap_from_adaptive_vc=%0d fdp_high=%0d source_stalls=%0d",
             next_id, n_fdp, n_sdp, n_ap, n_ap_adaptive_in, n_fdp_high, n_stall);
    check(n_fdp > 0, "fast deterministic path used");
    check(n_sdp > 0, "slow deterministic path used");
    check(n_ap > 0, "adaptive path used");
    check(n_ap_adaptive_in > 0, "adaptive VC used");
    check(n_fdp_high > 0, "high VC on the fast path used");
    check(n_stall > 0, "source back-pressure seen");
    check(n_delivered > 0, "sink deliveries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
