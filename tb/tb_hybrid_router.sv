// tb_hybrid_router: one router of a 4-ary 3-cube at (1,1,1), 4-flit messages
// and 4-flit buffers. A model of the three downstream routers returns a credit
// two cycles after each flit (or holds them back when told to).
//
// Latency is counted from the clock edge that writes a flit into the router's
// input buffer to the edge that writes it into the next buffer. Checked:
//  * FDP (x-low in, x-low out): header 2 cycles, an isolated data flit 1;
//  * SDP (x-low in, y-low out): header 3 cycles, an isolated data flit 2;
//  * AP (adaptive in): deterministic VC taken when free, header 3 cycles;
//  * AP: adaptive VC taken when the deterministic VC has no room downstream;
//  * source to network and network to sink, sink latency 3 cycles;
//  * every message leaves whole and in order on the expected channel and VC,
//    every input flit returns one credit upstream.
module tb_hybrid_router;
  import hybrid_pkg::*;
  localparam int K = 4, LEN = 4, BUF = 4;

  logic clk = 0, rst = 1;
  coords_t my_coord;
  link_t [N-1:0] in_link, out_link;
  logic [N-1:0][NUM_VC-1:0] in_credit, out_credit;
  logic inj_valid, inj_ready, ej_valid;
  flit_t inj_flit, ej_flit;
  logic [NPORT-1:0] hdr_grant, hdr_fdp;

  hybrid_router #(.K(K), .MSG_LEN(LEN), .BUF_DEPTH(BUF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- monitors
  // Last flit seen per output (dims 0..2, 3 = sink) with the cycle it left.
  flit_t last_flit [N+1];
  int    last_cyc  [N+1];
  int    last_vc   [N+1];
  int    n_out     [N+1];
  int    n_in_credit = 0;
  bit    hold_credit [N][NUM_VC];
  int    credit_due [N][NUM_VC][$];

  always @(negedge clk) if (!rst) begin
    for (int d = 0; d < N; d++) begin
      if (out_link[d].valid) begin
        last_flit[d] = out_link[d].flit;
        last_cyc[d]  = cyc;
        last_vc[d]   = int'(out_link[d].vc);
        n_out[d]++;
        credit_due[d][int'(out_link[d].vc)].push_back(cyc + 2);
      end
      for (int v = 0; v < NUM_VC; v++) if (in_credit[d][v]) n_in_credit++;
    end
    if (ej_valid) begin
      last_flit[N] = ej_flit; last_cyc[N] = cyc; last_vc[N] = 0; n_out[N]++;
    end
  end

  // Downstream model: one credit back per flit, two cycles later.
  always @(negedge clk) begin
    for (int d = 0; d < N; d++)
      for (int v = 0; v < NUM_VC; v++) begin
        out_credit[d][v] = 1'b0;
        if (!hold_credit[d][v] && credit_due[d][v].size() != 0 && credit_due[d][v][0] <= cyc) begin
          void'(credit_due[d][v].pop_front());
          out_credit[d][v] = 1'b1;
        end
      end
  end

  // ----------------------------------------------------------- drivers
  function automatic flit_t mk_head(int x, int y, int z, int tag);
    flit_t f;
    f.head = 1; f.tail = 0;
    f.payload = {4'(tag), 4'(z), 4'(y), 4'(x)};
    return f;
  endfunction

  function automatic flit_t mk_data(int tag, int seq, bit tail);
    flit_t f;
    f.head = 0; f.tail = tail;
    f.payload = 16'((tag << 8) | seq);
    return f;
  endfunction

  // Drive one flit on input channel d, VC v during the current cycle;
  // returns the cycle whose closing edge writes it.
  task automatic drive(int d, vc_type_e v, flit_t f, output int t);
    @(negedge clk);
    in_link[d].valid = 1; in_link[d].vc = v; in_link[d].flit = f;
    t = cyc;
    @(negedge clk);
    in_link[d].valid = 0;
  endtask

  // Wait until output o shows flit f; return the cycle.
  task automatic wait_out(int o, flit_t f, output int t, input int limit = 40);
    int start;
    start = cyc;
    t = -1;
    while (cyc - start < limit) begin
      @(posedge clk); #1;
      if (last_flit[o] == f && last_cyc[o] == cyc - 1) begin t = last_cyc[o]; break; end
    end
    check(t >= 0, $sformatf("flit %h never left on output %0d", f, o));
  endtask

  // Send a whole message with the data flits spaced by 'gap' idle cycles and
  // check the latency of the header and of every data flit.
  task automatic message(int d, vc_type_e v, int x, int y, int z, int tag, int gap,
                         int out, int exp_vc, int hdr_lat, int data_lat, string what);
    int ti, to;
    flit_t f;
    fork
      begin
        f = mk_head(x, y, z, tag);
        drive(d, v, f, ti);
      end
      begin
        wait_out(out, mk_head(x, y, z, tag), to);
      end
    join
    check(to - ti == hdr_lat, $sformatf("%s header latency %0d, want %0d", what, to - ti, hdr_lat));
    if (out < N) check(last_vc[out] == exp_vc, $sformatf("%s header VC %0d, want %0d", what, last_vc[out], exp_vc));
    repeat (gap) @(negedge clk);
    for (int s = 1; s < LEN; s++) begin
      f = mk_data(tag, s, s == LEN - 1);
      fork
        drive(d, v, f, ti);
        wait_out(out, f, to);
      join
      check(to - ti == data_lat, $sformatf("%s data latency %0d, want %0d", what, to - ti, data_lat));
      if (out < N) check(last_vc[out] == exp_vc, $sformatf("%s data VC", what));
      repeat (gap) @(negedge clk);
    end
  endtask

  int n_fdp = 0, n_sdp = 0, n_ap = 0;
  always @(negedge clk) if (!rst)
    for (int i = 0; i < NPORT; i++)
      if (hdr_grant[i]) begin
        if (hdr_fdp[i]) n_fdp++;
        else if (i != LOCAL && (i % NUM_VC) != int'(VC_ADAPT)) n_sdp++;
        else n_ap++;
      end

  initial begin
    int ti, to, sent_flits;
    my_coord[0] = 1; my_coord[1] = 1; my_coord[2] = 1;
    in_link = '0; inj_valid = 0; inj_flit = '0; out_credit = '0;
    for (int d = 0; d < N; d++) for (int v = 0; v < NUM_VC; v++) hold_credit[d][v] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    sent_flits = 0;

    // FDP: in on x-low, destination x=3 (no wrap) -> out x-low
    message(0, VC_LOW, 3, 1, 1, 1, 3, 0, int'(VC_LOW), 2, 1, "FDP");
    check(n_fdp == 1, "FDP grant counted");
    sent_flits += LEN;
    repeat (6) @(negedge clk);

    // FDP on the high VC: destination x=0 (wraps) arriving on x-high
    message(0, VC_HIGH, 0, 1, 1, 2, 3, 0, int'(VC_HIGH), 2, 1, "FDP high");
    sent_flits += LEN;
    repeat (6) @(negedge clk);

    // SDP: in on x-low, x done, y=3 -> out y-low
    message(0, VC_LOW, 1, 3, 1, 3, 3, 1, int'(VC_LOW), 3, 2, "SDP");
    check(n_sdp == 1, "SDP grant counted");
    sent_flits += LEN;
    repeat (6) @(negedge clk);

    // AP, deterministic VC free: in on x-adaptive, z=0 (wraps) -> z-high
    message(0, VC_ADAPT, 1, 1, 0, 4, 3, 2, int'(VC_HIGH), 3, 2, "AP det");
    check(n_ap == 1, "AP grant counted");
    sent_flits += LEN;
    repeat (6) @(negedge clk);

    // AP to the adaptive VC: hold x-low credits, fill x-low with one message,
    // then an adaptive-input message for x=3 must take x-adaptive.
    hold_credit[0][int'(VC_LOW)] = 1;
    message(0, VC_LOW, 3, 1, 1, 5, 0, 0, int'(VC_LOW), 2, 1, "FDP fill");
    sent_flits += LEN;
    repeat (4) @(negedge clk);
    message(1, VC_ADAPT, 3, 1, 1, 6, 0, 0, int'(VC_ADAPT), 3, 2, "AP adaptive");
    sent_flits += LEN;
    hold_credit[0][int'(VC_LOW)] = 0;
    repeat (8) @(negedge clk);

    // A message arriving at its destination goes to the sink (SDP).
    message(2, VC_LOW, 1, 1, 1, 7, 2, N, 0, 3, 2, "to sink");
    sent_flits += LEN;
    repeat (6) @(negedge clk);

    // Source to network: inject a message for (2,1,1) -> x-low, AP.
    begin
      flit_t f;
      for (int s = 0; s < LEN; s++) begin
        f = (s == 0) ? mk_head(2, 1, 1, 8) : mk_data(8, s, s == LEN - 1);
        @(negedge clk);
        inj_valid = 1; inj_flit = f;
        if (s == 0) ti = cyc;
        @(posedge clk); #1;
        check(inj_ready, "source queue ready");
        @(negedge clk); inj_valid = 0;
      end
      wait_out(0, mk_data(8, LEN - 1, 1), to);
      check(last_vc[0] == int'(VC_LOW), "injected message on x-low");
    end

    repeat (10) @(negedge clk);
    check(n_in_credit == sent_flits, $sformatf("credits upstream %0d, want %0d", n_in_credit, sent_flits));
    check(n_out[N] == LEN, "sink got one whole message");
    check(n_fdp == 3 && n_sdp == 2 && n_ap == 3,
          $sformatf("path counts fdp=%0d sdp=%0d ap=%0d", n_fdp, n_sdp, n_ap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
